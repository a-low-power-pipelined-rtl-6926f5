// tb_rns_rev_conv: checks the reverse converter over the whole signed range
// [-M/2, M/2) using residues computed in the testbench.
module tb_rns_rev_conv;
  import dwt_pkg::*;
  rns_t r;
  logic signed [OUT_W-1:0] x;
  int checks = 0, failures = 0;

  rns_rev_conv dut (.r, .x);

  function automatic int pmod(int v, int m);
    int t = v % m;
    return (t < 0) ? t + m : t;
  endfunction

  task automatic check(int v);
    r[0] = 9'(pmod(v, 255));
    r[1] = 9'(pmod(v, 256));
    r[2] = 9'(pmod(v, 257));
    #1;
    checks++;
    if (int'(x) != v) begin
      failures++;
      $display("FAIL v=%0d got %0d", v, x);
    end
  endtask

  initial begin
    int corner [10] = '{0, 1, -1, 255, 256, -256, 65535, 8388479, -8388480, -8388479};
    foreach (corner[i]) check(corner[i]);
    for (int i = 0; i < 5000; i++)
      check(int'($urandom_range(16776959)) - 8388480);
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
