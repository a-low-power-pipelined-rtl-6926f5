// tb_dwt_main_ctrl: runs the main controller against simple responders for
// the SDRAM controller (fixed burst time), the filter passes and the host
// streams, with N = 8 and two images.  Every burst (read/write, address) and
// every filter pass (line index, enabled banks) is recorded and compared in
// order with the schedule worked out here: download in 4-row groups, nimg+1
// processing cycles with rows of image X on bank 0 and columns of image X-1
// on bank 1, upload.  Also checks the reset of the other units, that nothing
// is requested before the SDRAM is initialised, the word counts on the host
// side and the final done pulse.
module tb_dwt_main_ctrl;
  import dwt_pkg::*;
  localparam int N = 8, MAX_IMG = 3, AW = 16, NIMG = 2, RST = 16;
  localparam int IMG = N * N, G = N / 4;
  logic clk = 0, rst_n = 0;
  logic unit_rst_n, sd_init_done = 0, sd_req, sd_we, sd_ready, sd_done = 0;
  logic [AW-1:0] sd_addr;
  logic start = 0, busy, done, dl_valid = 0, dl_ready, ul_valid, ul_ready = 0;
  logic [3:0] nimg = 0;
  logic [7:0] dl_data = 0;
  logic [DATA_W-1:0] ul_data, host_wdata, host_rdata = 16'h1234;
  logic clr_iptr, clr_optr, clr_hptr, ibuf_sel, obuf_sel, host_wvalid, host_rtake;
  logic pass_start, pass_done = 0;
  logic [1:0] pass_idx, pass_en;
  int checks = 0, failures = 0;

  dwt_main_ctrl #(.N(N), .MAX_IMG(MAX_IMG), .IMG_W(4), .ADDR_W(AW), .RST_CYC(RST)) dut (.*);

  always #5 clk = ~clk;

  task automatic fail(string s);
    failures++;
    if (failures < 20) $display("FAIL %s", s);
  endtask

  // expected event list: {kind, value}; kind 0 read, 1 write, 2 pass
  typedef struct { int kind; int val; } ev_t;
  ev_t expq [$], gotq [$];
  function automatic void burst_rows(int kind, int base, int g);
    for (int b = 0; b < N; b++) expq.push_back('{kind, base + g * 4 * N + 4 * b});
  endfunction
  function automatic void burst_strip(int kind, int base, int g);
    for (int b = 0; b < N; b++) expq.push_back('{kind, base + b * N + 4 * g});
  endfunction
  function automatic void plan();
    for (int k = 0; k < NIMG; k++) for (int g = 0; g < G; g++) burst_rows(1, k * IMG, g);
    for (int x = 0; x <= NIMG; x++)
      for (int g = 0; g < G; g++) begin
        if (x < NIMG) burst_rows(0, x * IMG, g);
        if (x > 0) burst_strip(0, (2 * MAX_IMG + (x - 1) % 2) * IMG, g);
        for (int q = 0; q < 4; q++) expq.push_back('{2, q * 4 + (x > 0) * 2 + (x < NIMG)});
        if (x < NIMG) burst_rows(1, (2 * MAX_IMG + x % 2) * IMG, g);
        if (x > 0) burst_strip(1, (MAX_IMG + x - 1) * IMG, g);
      end
    for (int k = 0; k < NIMG; k++) for (int g = 0; g < G; g++) burst_rows(0, (MAX_IMG + k) * IMG, g);
  endfunction

  // responders
  int rst_low = 0, sd_busy = 0, pass_busy = 0, n_dl = 0, n_ul = 0, n_done = 0;
  assign sd_ready = (sd_busy == 0);
  always @(posedge clk) begin
    if (rst_n && !unit_rst_n) rst_low++;
    sd_done <= 1'b0;
    pass_done <= 1'b0;
    if (rst_n && sd_req && !sd_init_done) fail("request before SDRAM initialised");
    if (sd_req && sd_ready) begin
      gotq.push_back('{sd_we ? 1 : 0, int'(sd_addr)});
      sd_busy <= 4;
    end
    if (sd_busy > 0) begin
      sd_busy <= sd_busy - 1;
      if (sd_busy == 1) sd_done <= 1'b1;
    end
    if (pass_start && pass_busy == 0) begin
      gotq.push_back('{2, int'(pass_idx) * 4 + int'(pass_en)});
      pass_busy <= 6;
    end
    if (pass_busy > 0) begin
      pass_busy <= pass_busy - 1;
      if (pass_busy == 1) pass_done <= 1'b1;
    end
    if (host_wvalid) begin
      n_dl++;
      if (host_wdata != {8'b0, dl_data}) fail("pixel data");
    end
    if (host_rtake) n_ul++;
    if (rst_n && done) n_done++;
    dl_valid <= ($urandom_range(3) != 0);
    dl_data  <= 8'($urandom);
    ul_ready <= ($urandom_range(2) != 0);
  end

  initial begin
    plan();
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (RST + 20) @(posedge clk);
    checks++;
    if (!busy) fail("not busy while waiting for the memory");
    sd_init_done = 1;
    @(negedge clk);
    checks++;
    if (rst_low != RST) begin fail($sformatf("unit reset held %0d clocks", rst_low)); end
    checks++;
    if (busy) fail("busy before start");
    @(negedge clk);
    start = 1; nimg = 4'(NIMG);
    @(negedge clk);
    start = 0;
    while (n_done == 0) @(negedge clk);
    repeat (5) @(negedge clk);
    checks++;
    if (gotq.size() != expq.size()) fail($sformatf("%0d events, expected %0d", gotq.size(), expq.size()));
    for (int i = 0; i < gotq.size() && i < expq.size(); i++) begin
      checks++;
      if (gotq[i].kind != expq[i].kind || gotq[i].val != expq[i].val)
        fail($sformatf("event %0d: got %0d/%0d exp %0d/%0d", i, gotq[i].kind, gotq[i].val,
                       expq[i].kind, expq[i].val));
    end
    checks += 3;
    if (n_dl != NIMG * IMG) fail("pixel count");
    if (n_ul != NIMG * IMG) fail("coefficient count");
    if (n_done != 1 || busy) fail("done/busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
