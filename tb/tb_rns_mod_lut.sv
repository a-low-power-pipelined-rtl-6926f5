// tb_rns_mod_lut: exhaustively checks table multipliers of all three channels,
// including the mod-257 output 256 and the mod-257 input 256.
module tb_rns_mod_lut;
  import dwt_pkg::*;
  res_t r;
  res_t p255, p256, p257a, p257b;
  int checks = 0, failures = 0;

  rns_mod_lut #(.MOD(255), .COEF(-605)) u0 (.r, .p(p255));
  rns_mod_lut #(.MOD(256), .COEF(1142)) u1 (.r, .p(p256));
  rns_mod_lut #(.MOD(257), .COEF(617))  u2 (.r, .p(p257a));
  rns_mod_lut #(.MOD(257), .COEF(-80))  u3 (.r, .p(p257b));

  function automatic int pmod(int v, int m);
    int t = v % m;
    return (t < 0) ? t + m : t;
  endfunction

  task automatic cmp(int got, int exp, string what, int a);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s r=%0d got %0d exp %0d", what, a, got, exp);
    end
  endtask

  int n256 = 0;
  initial begin
    for (int a = 0; a < 257; a++) begin
      r = 9'(a);
      #1;
      if (a < 255) cmp(int'(p255), pmod(-605 * a, 255), "m255", a);
      if (a < 256) cmp(int'(p256), pmod(1142 * a, 256), "m256", a);
      cmp(int'(p257a), pmod(617 * a, 257), "m257a", a);
      cmp(int'(p257b), pmod(-80 * a, 257), "m257b", a);
      if (p257a == 9'd256) n256++;
    end
    cmp(n256, 1, "count of 256 outputs", 0);
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
