// host_if: host interface of the DWT processor.
//
// The host starts a job by presenting a command (number of images) with
// cmd_valid; the command is registered and handed to the main controller as
// a one-clock start pulse while the processor is idle.  Image pixels (8 bits)
// are downloaded, and transformed coefficients (16 bits) uploaded, through
// small FIFOs with valid/ready handshakes on both sides, which decouple the
// host's pace from the controller's.  busy/done report the job state.
// Following the source design: download and upload of image data to and from
// the host.  This design's own choice: the handshakes, the FIFO depth and the
// command format.
module host_if
  import dwt_pkg::*;
#(
  parameter int IMG_W  = 4,     // width of the image-count field
  parameter int FIFO_D = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  // host side
  input  logic             cmd_valid,
  output logic             cmd_ready,
  input  logic [IMG_W-1:0] cmd_nimg,
  input  logic             h_in_valid,
  output logic             h_in_ready,
  input  logic [7:0]       h_in_data,
  output logic             h_out_valid,
  input  logic             h_out_ready,
  output logic [DATA_W-1:0] h_out_data,
  output logic             h_busy,
  output logic             h_done,
  // main controller side
  input  logic             ctl_busy,
  input  logic             ctl_done,
  output logic             start,
  output logic [IMG_W-1:0] nimg,
  output logic             dl_valid,
  input  logic             dl_ready,
  output logic [7:0]       dl_data,
  input  logic             ul_valid,
  output logic             ul_ready,
  input  logic [DATA_W-1:0] ul_data
);
  assign cmd_ready = !ctl_busy && !start;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start <= 1'b0; nimg <= '0; h_done <= 1'b0;
    end else begin
      start <= cmd_valid && cmd_ready;
      if (cmd_valid && cmd_ready) begin
        nimg   <= cmd_nimg;
        h_done <= 1'b0;
      end
      if (ctl_done) h_done <= 1'b1;
    end
  end
  assign h_busy = ctl_busy || start;

  sync_fifo #(.W(8), .DEPTH(FIFO_D)) u_dl (
    .clk, .rst_n, .in_valid(h_in_valid), .in_ready(h_in_ready), .in_data(h_in_data),
    .out_valid(dl_valid), .out_ready(dl_ready), .out_data(dl_data));

  sync_fifo #(.W(DATA_W), .DEPTH(FIFO_D)) u_ul (
    .clk, .rst_n, .in_valid(ul_valid), .in_ready(ul_ready), .in_data(ul_data),
    .out_valid(h_out_valid), .out_ready(h_out_ready), .out_data(h_out_data));
endmodule
