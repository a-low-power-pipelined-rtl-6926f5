// tb_rns_subfilter: drives a random residue sequence through a 9-tap mod-257
// and a 7-tap mod-255 transposed sub-filter (products computed here) and
// compares each output with the direct convolution modulo the channel,
// one enable after the products, with idle cycles between enables.
module tb_rns_subfilter;
  import dwt_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  res_t pa [LP_UNIQ];
  res_t pb [HP_UNIQ];
  res_t ya, yb;
  int checks = 0, failures = 0;
  int xs [$];

  rns_subfilter #(.MOD(257), .TAPS(9)) ua (.clk, .rst_n, .en, .prod(pa), .y(ya));
  rns_subfilter #(.MOD(255), .TAPS(7)) ub (.clk, .rst_n, .en, .prod(pb), .y(yb));

  always #5 clk = ~clk;

  function automatic int pmod(int v, int m);
    int t = v % m;
    return (t < 0) ? t + m : t;
  endfunction

  function automatic int conv(int m, bit lp);
    int acc = 0, taps = lp ? 9 : 7, ctr = lp ? 4 : 3;
    for (int k = 0; k < taps; k++) begin
      int idx = xs.size() - 1 - k;
      int c = lp ? LP_COEF[(k > ctr) ? k - ctr : ctr - k] : HP_COEF[(k > ctr) ? k - ctr : ctr - k];
      if (idx >= 0) acc = pmod(acc + c * xs[idx], m);
    end
    return acc;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 400; n++) begin
      automatic int v = int'($urandom_range(600)) - 300;
      xs.push_back(v);
      @(negedge clk);
      for (int j = 0; j < LP_UNIQ; j++) pa[j] = 9'(pmod(LP_COEF[j] * v, 257));
      for (int j = 0; j < HP_UNIQ; j++) pb[j] = 9'(pmod(HP_COEF[j] * v, 255));
      en = 1;
      @(negedge clk);
      en = 0;
      checks += 2;
      if (int'(ya) != conv(257, 1)) begin failures++; $display("FAIL lp n=%0d", n); end
      if (int'(yb) != conv(255, 0)) begin failures++; $display("FAIL hp n=%0d", n); end
      repeat (n % 3) @(negedge clk);
      checks++;   // output must hold while en is low
      if (int'(ya) != conv(257, 1)) begin failures++; $display("FAIL hold n=%0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
