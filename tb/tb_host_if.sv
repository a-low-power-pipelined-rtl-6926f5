// tb_host_if: checks the host interface: a command becomes one start pulse
// with the image count, only while the controller is idle; pixel and
// coefficient streams pass through in order under random stalls on both
// sides; busy and done report the job state.
module tb_host_if;
  import dwt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready;
  logic [3:0] cmd_nimg = 0;
  logic h_in_valid = 0, h_in_ready, h_out_valid, h_out_ready = 0, h_busy, h_done;
  logic [7:0] h_in_data = 0;
  logic [DATA_W-1:0] h_out_data;
  logic ctl_busy = 0, ctl_done = 0, start, dl_valid, dl_ready = 0, ul_valid = 0, ul_ready;
  logic [3:0] nimg;
  logic [7:0] dl_data;
  logic [DATA_W-1:0] ul_data = 0;
  int checks = 0, failures = 0, nstart = 0;

  host_if #(.IMG_W(4)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (start) nstart++;

  task automatic fail(string s);
    failures++;
    $display("FAIL %s", s);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    cmd_valid = 1; cmd_nimg = 4'd3;
    do @(negedge clk); while (!start);
    cmd_valid = 0;
    checks++;
    if (nimg != 4'd3 || nstart != 0) fail("start/nimg");
    ctl_busy = 1;
    @(negedge clk);
    checks++;
    if (!h_busy || cmd_ready) fail("busy while the job runs");
    fork
      for (int i = 0; i < 200; i++) begin          // host -> pixels
        bit acc;
        while ($urandom_range(2) == 0) @(negedge clk);
        h_in_valid = 1; h_in_data = 8'(i * 7);
        do begin acc = h_in_ready; @(negedge clk); end while (!acc);
        h_in_valid = 0;
      end
      for (int i = 0; i < 200; i++) begin          // controller takes pixels
        bit acc;
        logic [7:0] d;
        do begin
          dl_ready = ($urandom_range(3) != 0);
          acc = dl_valid && dl_ready; d = dl_data;
          @(negedge clk);
        end while (!acc);
        dl_ready = 0;
        checks++;
        if (d != 8'(i * 7)) fail("pixel order");
      end
      for (int i = 0; i < 200; i++) begin          // controller -> coefficients
        bit acc;
        while ($urandom_range(2) == 0) @(negedge clk);
        ul_valid = 1; ul_data = 16'(i * 301 - 5000);
        do begin acc = ul_ready; @(negedge clk); end while (!acc);
        ul_valid = 0;
      end
      for (int i = 0; i < 200; i++) begin          // host takes coefficients
        bit acc;
        logic [15:0] d;
        do begin
          h_out_ready = ($urandom_range(3) != 0);
          acc = h_out_valid && h_out_ready; d = h_out_data;
          @(negedge clk);
        end while (!acc);
        h_out_ready = 0;
        checks++;
        if (d != 16'(i * 301 - 5000)) fail("coefficient order");
      end
    join
    checks++;
    if (h_done) fail("done too early");
    ctl_done = 1; @(negedge clk); ctl_done = 0; ctl_busy = 0;
    @(negedge clk);
    checks++;
    if (!h_done || h_busy || !cmd_ready || nstart != 1) fail("done/busy at the end");
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
