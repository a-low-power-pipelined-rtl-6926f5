// tb_sdram_ctrl: runs the SDRAM controller against the behavioural memory.
// Writes random bursts to random aligned addresses, reads them back and
// compares, and checks: no command before the memory is ready, read data
// exactly CAS_LAT clocks after the READ, write beats the two clocks after the
// WRITE, two beats per burst, req_done once per burst, and refreshes at the
// programmed period.
module tb_sdram_ctrl;
  import dwt_pkg::*;
  localparam int AW = 12, WORDS = 1 << AW, CL = 2, REF = 60;
  logic clk = 0, rst_n = 0;
  logic init_done, req = 0, req_we = 0, req_ready, req_done, rd_beat, wr_beat, mem_ready;
  logic [AW-1:0] req_addr = 0;
  mem_cmd_e mem_cmd;
  logic [AW-1:0] mem_addr;
  logic [DATA_W-1:0] dq_w [2], dq_r [2];
  int checks = 0, failures = 0;

  sdram_ctrl #(.ADDR_W(AW), .CAS_LAT(CL), .REF_PERIOD(REF), .T_RFC(4)) dut (
    .clk, .rst_n, .init_done, .req, .req_we, .req_addr, .req_ready, .req_done,
    .rd_beat, .wr_beat, .mem_ready, .mem_cmd, .mem_addr);
  ddr_sdram_model #(.WORDS(WORDS), .ADDR_W(AW), .CAS_LAT(CL), .INIT_CYC(30),
                    .MAX_REF_GAP(REF + 20)) u_mem (
    .clk, .rst_n, .ready(mem_ready), .cmd(mem_cmd), .addr(mem_addr), .dq_in(dq_w), .dq_out(dq_r));

  always #5 clk = ~clk;

  task automatic fail(string s);
    failures++;
    $display("FAIL %s", s);
  endtask

  int cyc = 0, cmd_cyc = -1, nbeat = 0;
  bit is_wr = 0;
  logic [DATA_W-1:0] shadow [WORDS];
  always @(posedge clk) begin
    cyc++;
    if (rst_n && !init_done && mem_cmd != MEM_NOP) fail("command before initialisation");
    if (mem_cmd == MEM_READ || mem_cmd == MEM_WRITE) begin
      cmd_cyc = cyc; nbeat = 0; is_wr = (mem_cmd == MEM_WRITE);
    end
    if (rd_beat) begin
      checks++;
      if (is_wr || cyc - cmd_cyc != CL + nbeat) fail("read beat timing");
      nbeat++;
    end
    if (wr_beat) begin
      checks++;
      if (!is_wr || cyc - cmd_cyc != 1 + nbeat) fail("write beat timing");
      nbeat++;
    end
    if (req_done) begin
      checks++;
      if (nbeat != BEATS - 1 && !(rd_beat || wr_beat)) fail("done before the last beat");
    end
  end

  task automatic burst(bit we, int a, ref logic [DATA_W-1:0] data [BURST_LEN]);
    int j = 0;
    @(negedge clk);
    req = 1; req_we = we; req_addr = AW'(a);
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    req = 0;
    forever begin
      if (wr_beat) begin dq_w[0] = data[2*j]; dq_w[1] = data[2*j+1]; end
      if (rd_beat) begin data[2*j] = dq_r[0]; data[2*j+1] = dq_r[1]; end
      if (rd_beat || wr_beat) j++;
      if (req_done) break;
      @(posedge clk); #1;
    end
    checks++;
    if (j != BEATS) fail("beat count");
  endtask

  initial begin
    logic [DATA_W-1:0] d [BURST_LEN];
    int addrs [$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    checks++;
    if (init_done) fail("init_done before memory ready");
    wait (init_done);
    for (int i = 0; i < 60; i++) begin
      automatic int a = int'($urandom_range(WORDS / BURST_LEN - 1)) * BURST_LEN;
      foreach (d[w]) begin d[w] = 16'($urandom); shadow[a + w] = d[w]; end
      addrs.push_back(a);
      burst(1, a, d);
    end
    foreach (addrs[i]) begin
      burst(0, addrs[i], d);
      foreach (d[w]) begin
        checks++;
        if (d[w] !== shadow[addrs[i] + w]) fail($sformatf("data at %0d", addrs[i] + w));
      end
    end
    checks++;
    if (u_mem.n_ref < cyc / REF - 3 || u_mem.errors != 0) fail("refresh / protocol");
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
