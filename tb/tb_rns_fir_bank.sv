// tb_rns_fir_bank: feeds one filter bank with residue products of a random
// signal (computed here), keeps every other step, and checks the interleaved
// L/H outputs and their step latency against integer 9/7 convolutions.
module tb_rns_fir_bank;
  import dwt_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  res_t lp_prod [NCH][LP_UNIQ];
  res_t hp_prod [NCH][HP_UNIQ];
  logic s2_valid = 0, s2_keep = 0;
  logic signed [OUT_W-1:0] y;
  logic y_valid, y_hp;
  int checks = 0, failures = 0;

  rns_fir_bank dut (.clk, .rst_n, .en, .lp_prod, .hp_prod, .s2_valid, .s2_keep,
                    .y, .y_valid, .y_hp);

  always #5 clk = ~clk;

  function automatic int pmod(int v, int m);
    int t = v % m;
    return (t < 0) ? t + m : t;
  endfunction

  int xs [$];
  typedef struct { int due; int val; bit hp; } exp_t;
  exp_t q [$];

  function automatic int fir(bit lp);
    int acc = 0, taps = lp ? 9 : 7, ctr = lp ? 4 : 3;
    for (int k = 0; k < taps; k++) begin
      int d = (k > ctr) ? k - ctr : ctr - k;
      int idx = xs.size() - 1 - k;
      if (idx >= 0) acc += (lp ? LP_COEF[d] : HP_COEF[d]) * xs[idx];
    end
    return acc;
  endfunction

  int nl = 0, nh = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int s = 0; s < 600; s++) begin
      automatic int v = int'($urandom_range(6000)) - 3000;
      @(negedge clk);
      // outputs produced by the previous enable
      if (y_valid) begin
        checks++;
        if (q.size() == 0 || q[0].due != s || q[0].val != int'(y) || q[0].hp != y_hp) begin
          failures++;
          $display("FAIL step %0d y=%0d hp=%0d", s, y, y_hp);
        end
        if (q.size() != 0) void'(q.pop_front());
        if (y_hp) nh++; else nl++;
      end
      xs.push_back(v);
      for (int c = 0; c < NCH; c++) begin
        for (int j = 0; j < LP_UNIQ; j++) lp_prod[c][j] = 9'(pmod(LP_COEF[j] * v, MODS[c]));
        for (int j = 0; j < HP_UNIQ; j++) hp_prod[c][j] = 9'(pmod(HP_COEF[j] * v, MODS[c]));
      end
      s2_valid = 1;
      s2_keep  = (s % 2 == 0) && (s >= 8) && (s < 590);
      if (s2_keep) begin
        q.push_back('{due: s + 3, val: fir(1), hp: 0});
        q.push_back('{due: s + 4, val: fir(0), hp: 1});
      end
      en = 1;
      @(negedge clk);
      en = 0;
    end
    checks++;
    if (q.size() != 0 || nl != 291 || nh != 291) begin
      failures++;
      $display("FAIL counts L=%0d H=%0d left=%0d", nl, nh, q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
