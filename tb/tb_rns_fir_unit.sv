// tb_rns_fir_unit: drives both filter banks of the unit at once with
// independent random signals (different keep patterns), and checks every
// output value, its L/H tag and its latency in filter steps (L of the sample
// taken at step k is read at step k+5, H at k+6), and the step period.
module tb_rns_fir_unit;
  import dwt_pkg::*;
  localparam int DIV = 4;
  logic clk = 0, rst_n = 0;
  logic step;
  logic signed [15:0] x [2];
  logic xv [2], xk [2];
  logic signed [OUT_W-1:0] y [2];
  logic yv [2], yh [2];
  int checks = 0, failures = 0;

  rns_fir_unit #(.DIV(DIV)) dut (.clk, .rst_n, .step,
    .x0(x[0]), .x1(x[1]), .x0_valid(xv[0]), .x1_valid(xv[1]), .x0_keep(xk[0]), .x1_keep(xk[1]),
    .y0(y[0]), .y1(y[1]), .y0_valid(yv[0]), .y1_valid(yv[1]), .y0_hp(yh[0]), .y1_hp(yh[1]));

  always #5 clk = ~clk;

  int xs0 [$], xs1 [$];
  typedef struct { int due; int val; bit hp; } exp_t;
  exp_t q0 [$], q1 [$];

  function automatic int fir(ref int xs [$], input bit lp);
    int acc = 0, taps = lp ? 9 : 7, ctr = lp ? 4 : 3;
    for (int k = 0; k < taps; k++) begin
      int d = (k > ctr) ? k - ctr : ctr - k;
      int idx = xs.size() - 1 - k;
      if (idx >= 0) acc += (lp ? LP_COEF[d] : HP_COEF[d]) * xs[idx];
    end
    return acc;
  endfunction

  task automatic take(int b, int s, ref exp_t q [$], inout int n);
    if (yv[b]) begin
      checks++;
      n++;
      if (q.size() == 0 || q[0].due != s || q[0].val != int'(y[b]) || q[0].hp != yh[b]) begin
        failures++;
        $display("FAIL bank %0d step %0d y=%0d hp=%0d exp due %0d val %0d", b, s, y[b], yh[b],
                 q.size() ? q[0].due : -1, q.size() ? q[0].val : 0);
      end
      if (q.size() != 0) void'(q.pop_front());
    end
  endtask

  int n0 = 0, n1 = 0, last_step = -1, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && step) begin
      if (last_step >= 0) begin
        checks++;
        if (cyc - last_step != DIV) begin failures++; $display("FAIL step period"); end
      end
      last_step = cyc;
    end
  end

  initial begin
    xv = '{0, 0}; xk = '{0, 0}; x = '{0, 0};
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int s = 0; s < 500; s++) begin
      // wait until the next clock edge is a step
      do @(negedge clk); while (!step);
      take(0, s, q0, n0);
      take(1, s, q1, n1);
      x[0] = 16'(int'($urandom_range(6000)) - 3000);
      x[1] = 16'(int'($urandom_range(6000)) - 3000);
      xs0.push_back(int'(x[0]));
      xs1.push_back(int'(x[1]));
      xv = '{1, 1};
      xk[0] = (s % 2 == 0) && s >= 8 && s < 480;
      xk[1] = (s % 4 == 1) && s >= 9 && s < 480;
      if (xk[0]) begin
        q0.push_back('{due: s + 5, val: fir(xs0, 1), hp: 0});
        q0.push_back('{due: s + 6, val: fir(xs0, 0), hp: 1});
      end
      if (xk[1]) begin
        q1.push_back('{due: s + 5, val: fir(xs1, 1), hp: 0});
        q1.push_back('{due: s + 6, val: fir(xs1, 0), hp: 1});
      end
    end
    checks++;
    if (q0.size() != 0 || q1.size() != 0 || n0 != 472 || n1 != 236) begin
      failures++;
      $display("FAIL counts n0=%0d n1=%0d left %0d %0d", n0, n1, q0.size(), q1.size());
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
