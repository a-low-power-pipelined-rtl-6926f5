// tb_dwt_processor: end-to-end test of the DWT processor at its default
// parameters (32x32 images) with the behavioural DDR SDRAM.
// A job of NIMG random images is downloaded with random host stalls, and the
// uploaded coefficients are compared with a bit-exact integer model of the
// one-level 9/7 transform (symmetric extension, coefficients scaled by
// 2**COEF_FRAC, results rounded to integers after the row and after the column
// pass).  It also checks the length of each filter pass against the pipeline
// (N+8 samples plus the latency), and counts the mechanisms of the design:
// passes with both banks busy (row filtering of image X overlapped with column
// filtering of image X-1), row-only and column-only passes, steps where both
// banks use the shared tables, mirrored (symmetrically extended) samples, L
// and H results through the shared reverse converters, SDRAM refreshes and
// host stalls in both directions.  Each must occur at least once.  The
// transform phase must average at most 205 us (20,500 clocks at 100 MHz) per
// 32x32 image.
module tb_dwt_processor;
  import dwt_pkg::*;
  localparam int N = 32, MAX_IMG = 4, NIMG = 3, ADDR_W = 24, DIV = 4;
  localparam int WORDS = (2 * MAX_IMG + 2) * N * N;

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready;
  logic [3:0] cmd_nimg = 0;
  logic h_in_valid = 0, h_in_ready, h_out_valid, h_out_ready = 0, h_busy, h_done;
  logic [7:0] h_in_data = 0;
  logic [DATA_W-1:0] h_out_data;
  logic mem_ready;
  mem_cmd_e mem_cmd;
  logic [ADDR_W-1:0] mem_addr;
  logic [DATA_W-1:0] dq_to_mem [2], dq_from_mem [2];

  dwt_processor dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd_nimg, .h_in_valid, .h_in_ready, .h_in_data,
    .h_out_valid, .h_out_ready, .h_out_data, .h_busy, .h_done,
    .mem_ready, .mem_cmd, .mem_addr, .mem_dq_in(dq_from_mem), .mem_dq_out(dq_to_mem));

  ddr_sdram_model #(.WORDS(WORDS), .ADDR_W(ADDR_W)) u_mem (
    .clk, .rst_n, .ready(mem_ready), .cmd(mem_cmd), .addr(mem_addr), .dq_in(dq_to_mem),
    .dq_out(dq_from_mem));

  always #5 clk = ~clk;   // 100 MHz

  int checks = 0, failures = 0;
  int pix [NIMG][N][N];
  int expo [NIMG][N][N];

  function automatic int rs(int v);   // drop COEF_FRAC bits with rounding
    return (v + (1 << (COEF_FRAC - 1))) >>> COEF_FRAC;
  endfunction

  function automatic int mir(int p);
    if (p < 0) p = -p;
    if (p > N - 1) p = 2 * (N - 1) - p;
    return p;
  endfunction

  // 1-D analysis of one line: L in [0, N/2), H in [N/2, N)
  function automatic void dwt1(input int x [N], output int y [N]);
    for (int i = 0; i < N / 2; i++) begin
      int l = 0, h = 0;
      for (int k = -4; k <= 4; k++) l += LP_COEF[k < 0 ? -k : k] * x[mir(2 * i + k)];
      for (int k = -3; k <= 3; k++) h += HP_COEF[k < 0 ? -k : k] * x[mir(2 * i + 1 + k)];
      y[i] = rs(l);
      y[N / 2 + i] = rs(h);
    end
  endfunction

  task automatic golden(int im);
    int mid [N][N];
    int line [N], res [N];
    for (int r = 0; r < N; r++) begin
      for (int c = 0; c < N; c++) line[c] = pix[im][r][c];
      dwt1(line, res);
      for (int c = 0; c < N; c++) mid[r][c] = res[c];
    end
    for (int c = 0; c < N; c++) begin
      for (int r = 0; r < N; r++) line[r] = mid[r][c];
      dwt1(line, res);
      for (int r = 0; r < N; r++) expo[im][r][c] = res[r];
    end
  endtask

  // mechanism counters
  int n_both = 0, n_row_only = 0, n_col_only = 0, n_share = 0, n_mirror = 0;
  int n_l = 0, n_h = 0, n_in_stall = 0, n_out_stall = 0;
  longint pass_t0 = 0, cyc = 0, t_start = 0, t_dwt0 = 0, t_dwt1 = 0;
  always @(posedge clk) begin
    cyc++;
    if (dut.u_ctrl.pass_start && dut.u_ctrl.state == dut.u_ctrl.S_PASS) begin
      pass_t0 = cyc;
      case (dut.pass_en)
        2'b11: n_both++;
        2'b01: n_row_only++;
        2'b10: n_col_only++;
        default: ;
      endcase
    end
    if (dut.pass_done) begin
      checks++;
      // N+8 samples, 5 steps until the last H is read, plus phase alignment
      if (cyc - pass_t0 > longint'((N + 8 + 7) * DIV)) begin
        failures++;
        $display("FAIL pass took %0d clocks", cyc - pass_t0);
      end
    end
    if (dut.step && dut.x0_valid && dut.x1_valid) n_share++;
    if (dut.step && (dut.x0_valid || dut.x1_valid) &&
        (dut.u_buf.e < 4 || int'(dut.u_buf.e) > N + 3)) n_mirror++;
    if (dut.step && dut.y0_valid) begin if (dut.y0_hp) n_h++; else n_l++; end
    if (h_in_valid && !h_in_ready) n_in_stall++;
    if (h_out_valid && !h_out_ready) n_out_stall++;
    if (dut.u_ctrl.state == dut.u_ctrl.S_CYC && t_dwt0 == 0) t_dwt0 = cyc;
    if (dut.u_ctrl.state == dut.u_ctrl.S_UL_RD && t_dwt1 == 0) t_dwt1 = cyc;
  end

  task automatic need(int v, string what);
    checks++;
    if (v <= 0) begin failures++; $display("FAIL mechanism never seen: %s", what); end
  endtask

  initial begin
    for (int im = 0; im < NIMG; im++) begin
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++)
          pix[im][r][c] = (im == 1) ? ((r + c) % 2) * 255 : int'($urandom_range(255));
      golden(im);
    end
    repeat (4) @(posedge clk);
    rst_n <= 1;
    // wait for initialisation
    do @(negedge clk); while (!cmd_ready);
    checks++;
    if (dut.u_ctrl.state != dut.u_ctrl.S_IDLE) begin
      failures++; $display("FAIL command ready before initialisation ended");
    end
    cmd_valid = 1; cmd_nimg = 4'(NIMG);
    @(negedge clk);
    cmd_valid = 0;
    t_start = cyc;
    fork
      begin : download
        for (int im = 0; im < NIMG; im++)
          for (int r = 0; r < N; r++)
            for (int c = 0; c < N; c++) begin
              bit acc;
              while ($urandom_range(3) == 0) @(negedge clk);
              h_in_valid = 1; h_in_data = 8'(pix[im][r][c]);
              do begin
                acc = h_in_ready;
                @(negedge clk);
              end while (!acc);
              h_in_valid = 0;
            end
      end
      begin : upload
        for (int im = 0; im < NIMG; im++)
          for (int r = 0; r < N; r++)
            for (int c = 0; c < N; c++) begin
              bit acc;
              int d;
              do begin
                h_out_ready = ($urandom_range(2) != 0);
                acc = h_out_valid && h_out_ready;
                d = int'($signed(h_out_data));
                @(negedge clk);
              end while (!acc);
              h_out_ready = 0;
              checks++;
              if (d != expo[im][r][c]) begin
                failures++;
                if (failures < 10)
                  $display("FAIL img %0d (%0d,%0d) got %0d exp %0d", im, r, c, d, expo[im][r][c]);
              end
            end
      end
    join
    repeat (5) @(posedge clk);
    checks++;
    if (!h_done || h_busy) begin failures++; $display("FAIL done/busy flags"); end
    checks++;
    if (u_mem.errors != 0) begin failures++; $display("FAIL memory protocol errors"); end
    need(n_both, "both banks busy in one pass");
    need(n_row_only, "row-only pass (first cycle)");
    need(n_col_only, "column-only pass (last cycle)");
    need(n_share, "shared tables used by both banks in one step");
    need(n_mirror, "symmetric extension");
    need(n_l, "L results"); need(n_h, "H results");
    need(u_mem.n_ref, "SDRAM refresh");
    need(n_in_stall, "host download stall");
    need(n_out_stall, "host upload stall");
    checks++;
    if (n_both != (NIMG - 1) * N || n_row_only != N || n_col_only != N) begin
      failures++;
      $display("FAIL pass schedule both=%0d row=%0d col=%0d", n_both, n_row_only, n_col_only);
    end
    // throughput: a 32x32 first-level transform within 205 us at 100 MHz,
    // i.e. 20,500 clocks per image, averaged over the job
    checks++;
    if ((t_dwt1 - t_dwt0) > longint'(NIMG) * 20500) begin
      failures++;
      $display("FAIL transform phase too slow: %0d clocks", t_dwt1 - t_dwt0);
    end
    $display("passes: both %0d, row-only %0d, column-only %0d; refreshes %0d; reads %0d writes %0d",
             n_both, n_row_only, n_col_only, u_mem.n_ref, u_mem.n_read, u_mem.n_write);
    $display("DWT phase for %0d images: %0d clocks (%0d us at 100 MHz)", NIMG,
             t_dwt1 - t_dwt0, (t_dwt1 - t_dwt0) / 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
