// tb_rns_fwd_conv: checks the forward converter against integer modulo
// arithmetic for corner values and random 16-bit signed inputs.
module tb_rns_fwd_conv;
  import dwt_pkg::*;
  logic signed [15:0] x;
  rns_t r;
  int checks = 0, failures = 0;

  rns_fwd_conv #(.IN_W(16)) dut (.x, .r);

  function automatic int pmod(int v, int m);
    int t = v % m;
    return (t < 0) ? t + m : t;
  endfunction

  task automatic check(int v);
    x = 16'(v);
    #1;
    for (int c = 0; c < 3; c++) begin
      checks++;
      if (int'(r[c]) != pmod(v, MODS[c])) begin
        failures++;
        $display("FAIL x=%0d ch=%0d got %0d exp %0d", v, c, r[c], pmod(v, MODS[c]));
      end
    end
  endtask

  initial begin
    int corner [12] = '{0, 1, -1, 127, -128, 255, 256, 257, -255, -257, 32767, -32768};
    foreach (corner[i]) check(corner[i]);
    for (int i = 0; i < 3000; i++) check(int'($signed(16'($urandom))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
