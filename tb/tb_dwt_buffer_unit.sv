// tb_dwt_buffer_unit: exercises the buffering unit together with the filter
// unit (N = 8).  Input buffers are filled through DDR read beats (four rows
// for bank 0, a four-column strip for bank 1), four passes are run with both
// banks, and the samples presented to the filters are checked against the
// symmetric extension of the buffered lines.  The output buffers are drained
// through DDR write beats and compared with an integer 9/7 model (rounded,
// L half then H half of each line).  The host path (write into output buffer
// 0, read from input buffer 0) is checked as well.
module tb_dwt_buffer_unit;
  import dwt_pkg::*;
  localparam int N = 8, BW = 4 * N;
  logic clk = 0, rst_n = 0;
  logic clr_iptr = 0, clr_optr = 0, clr_hptr = 0, ibuf_sel = 0, obuf_sel = 0;
  logic rd_beat = 0, wr_beat = 0, host_wvalid = 0, host_rtake = 0;
  logic [DATA_W-1:0] rd_data [2], wr_data [2];
  logic [DATA_W-1:0] host_wdata = 0, host_rdata;
  logic pass_start = 0, pass_done;
  logic [1:0] pass_idx = 0, pass_en = 0;
  logic step;
  logic signed [DATA_W-1:0] x0, x1;
  logic x0_valid, x1_valid, x0_keep, x1_keep;
  logic signed [OUT_W-1:0] y0, y1;
  logic y0_valid, y1_valid, y0_hp, y1_hp;
  int checks = 0, failures = 0;

  dwt_buffer_unit #(.N(N)) dut (.*);
  rns_fir_unit #(.DIV(4)) u_fir (.clk, .rst_n, .step, .x0, .x1, .x0_valid, .x1_valid,
    .x0_keep, .x1_keep, .y0, .y1, .y0_valid, .y1_valid, .y0_hp, .y1_hp);

  always #5 clk = ~clk;

  int rows [4][N];      // bank 0 lines
  int cols [4][N];      // bank 1 lines (strip column j, row r)

  function automatic int mir(int p);
    if (p < 0) p = -p;
    if (p > N - 1) p = 2 * (N - 1) - p;
    return p;
  endfunction
  function automatic int rs(int v);
    return (v + (1 << (COEF_FRAC - 1))) >>> COEF_FRAC;
  endfunction
  function automatic int coef(int line [N], int pos);   // pos < N/2: L, else H
    int acc = 0;
    if (pos < N / 2) for (int k = -4; k <= 4; k++) acc += LP_COEF[k < 0 ? -k : k] * line[mir(2 * pos + k)];
    else for (int k = -3; k <= 3; k++) acc += HP_COEF[k < 0 ? -k : k] * line[mir(2 * (pos - N / 2) + 1 + k)];
    return rs(acc);
  endfunction

  task automatic fail(string s);
    failures++;
    if (failures < 20) $display("FAIL %s", s);
  endtask

  // monitor of presented samples
  int e0 = 0, e1 = 0, nmirror = 0;
  always @(posedge clk) if (rst_n && step) begin
    if (x0_valid) begin
      checks++;
      if (int'(x0) != rows[pass_q][mir(e0 - 4)]) fail($sformatf("x0 e=%0d q=%0d got %0d exp %0d de=%0d", e0, pass_q, x0, rows[pass_q][mir(e0 - 4)], dut.e));
      if (x0_keep != (e0 % 2 == 0 && e0 >= 8)) fail("x0 keep");
      if (e0 < 4 || e0 > N + 3) nmirror++;
      e0++;
    end
    if (x1_valid) begin
      checks++;
      if (int'(x1) != cols[pass_q][mir(e1 - 4)]) fail($sformatf("x1 e=%0d", e1));
      e1++;
    end
  end
  int pass_q = 0;

  task automatic beats_in(bit sel, int data [BW]);
    @(negedge clk); clr_iptr = 1; ibuf_sel = sel; @(negedge clk); clr_iptr = 0;
    for (int i = 0; i < BW; i += 2) begin
      rd_beat = 1; rd_data[0] = 16'(data[i]); rd_data[1] = 16'(data[i + 1]);
      @(negedge clk);
      rd_beat = 0;
      if (i % 8 == 6) repeat (3) @(negedge clk);
    end
  endtask

  task automatic beats_out(bit sel, output int data [BW]);
    @(negedge clk); clr_optr = 1; obuf_sel = sel; @(negedge clk); clr_optr = 0;
    for (int i = 0; i < BW; i += 2) begin
      wr_beat = 1;
      data[i] = int'($signed(wr_data[0])); data[i + 1] = int'($signed(wr_data[1]));
      @(negedge clk);
      wr_beat = 0;
    end
  endtask

  initial begin
    int d0 [BW], d1 [BW], o [BW];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 4; r++) for (int c = 0; c < N; c++) begin
      rows[r][c] = int'($urandom_range(255)); d0[r * N + c] = rows[r][c];
    end
    for (int r = 0; r < N; r++) for (int j = 0; j < 4; j++) begin
      cols[j][r] = int'($urandom_range(1400)) - 700; d1[r * 4 + j] = cols[j][r];
    end
    beats_in(0, d0);
    beats_in(1, d1);
    for (int q = 0; q < 4; q++) begin
      automatic int t = 0;
      @(negedge clk);
      pass_q = q; e0 = 0; e1 = 0;
      pass_start = 1; pass_idx = 2'(q); pass_en = 2'b11;
      @(negedge clk);
      pass_start = 0;
      while (!pass_done && t < 1000) begin @(negedge clk); t++; end
      checks += 2;
      if (!pass_done) fail("pass never done");
      if (e0 != N + 8 || e1 != N + 8) fail("samples per pass");
    end
    beats_out(0, o);
    for (int r = 0; r < 4; r++) for (int c = 0; c < N; c++) begin
      checks++;
      if (o[r * N + c] != coef(rows[r], c)) fail($sformatf("row %0d pos %0d got %0d exp %0d", r, c, o[r*N+c], coef(rows[r], c)));
    end
    beats_out(1, o);
    for (int r = 0; r < N; r++) for (int j = 0; j < 4; j++) begin
      checks++;
      if (o[r * 4 + j] != coef(cols[j], r)) fail($sformatf("col %0d pos %0d", j, r));
    end
    checks++;
    if (nmirror != 4 * 8) fail("mirrored samples");
    // host path
    @(negedge clk); clr_hptr = 1; @(negedge clk); clr_hptr = 0;
    for (int i = 0; i < BW; i++) begin
      host_wvalid = 1; host_wdata = 16'(i * 3 + 1); @(negedge clk);
    end
    host_wvalid = 0;
    beats_out(0, o);
    for (int i = 0; i < BW; i++) begin checks++; if (o[i] != i * 3 + 1) fail("host write path"); end
    @(negedge clk); clr_hptr = 1; @(negedge clk); clr_hptr = 0;
    for (int i = 0; i < BW; i++) begin
      checks++;
      if (int'(host_rdata) != d0[i]) fail("host read path");
      host_rtake = 1; @(negedge clk); host_rtake = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
