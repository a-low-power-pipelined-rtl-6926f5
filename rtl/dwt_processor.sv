// dwt_processor: low-power pipelined 2-D discrete wavelet transform processor
// using residue number arithmetic (moduli 255, 256, 257) and the 9/7
// biorthogonal filters; one level of decomposition per image.
//
// Blocks: host interface, main controller, buffering and DDR interfacing
// unit, SDRAM controller, and the RNS FIR filter bank unit (two four-stage
// pipelined banks sharing 27 look-up-table multipliers; bank 0 filters rows,
// bank 1 columns).  The external DDR SDRAM sits outside: the memory port is
// a command/address bus, a ready flag, and a data path of two 16-bit words
// per clock in each direction.  Everything runs from one clock `clk` (the
// 100 MHz control clock); the filter banks advance on an internal enable
// every DIV clocks (25 MHz for DIV = 4).  rst_n is an asynchronous, active-low
// reset; the main controller then resets the other units itself.
// Host protocol: present cmd_nimg with cmd_valid; stream nimg*N*N pixels
// (row-major, image by image) into h_in; read nimg*N*N 16-bit coefficients
// from h_out, per image row-major with LL | HL in the top half and LH | HH in
// the bottom half (L/H of the row transform left/right, of the column
// transform top/bottom); h_done rises when the job is finished.
module dwt_processor
  import dwt_pkg::*;
#(
  parameter int N       = 32,
  parameter int MAX_IMG = 4,
  parameter int IMG_W   = 4,
  parameter int DIV     = 4,
  parameter int ADDR_W  = 24,
  parameter int CAS_LAT = 2
) (
  input  logic clk,
  input  logic rst_n,
  // host
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  logic [IMG_W-1:0]  cmd_nimg,
  input  logic              h_in_valid,
  output logic              h_in_ready,
  input  logic [7:0]        h_in_data,
  output logic              h_out_valid,
  input  logic              h_out_ready,
  output logic [DATA_W-1:0] h_out_data,
  output logic              h_busy,
  output logic              h_done,
  // external DDR SDRAM
  input  logic              mem_ready,
  output mem_cmd_e          mem_cmd,
  output logic [ADDR_W-1:0] mem_addr,
  input  logic [DATA_W-1:0] mem_dq_in  [2],
  output logic [DATA_W-1:0] mem_dq_out [2]
);
  logic ctl_rst_n, urst_n;
  // the other units are reset by the main controller and by the chip reset
  assign urst_n = rst_n && ctl_rst_n;

  // host interface <-> main controller
  logic start, ctl_busy, ctl_done, dl_valid, dl_ready, ul_valid, ul_ready;
  logic [IMG_W-1:0] nimg;
  logic [7:0] dl_data;
  logic [DATA_W-1:0] ul_data;

  // SDRAM controller
  logic sd_init_done, sd_req, sd_we, sd_ready, sd_done, rd_beat, wr_beat;
  logic [ADDR_W-1:0] sd_addr;

  // buffering unit
  logic clr_iptr, clr_optr, clr_hptr, ibuf_sel, obuf_sel, host_wvalid, host_rtake;
  logic [DATA_W-1:0] host_wdata, host_rdata;
  logic pass_start, pass_done;
  logic [1:0] pass_idx, pass_en;

  // filter unit
  logic step;
  logic signed [DATA_W-1:0] x0, x1;
  logic x0_valid, x1_valid, x0_keep, x1_keep;
  logic signed [OUT_W-1:0] y0, y1;
  logic y0_valid, y1_valid, y0_hp, y1_hp;

  host_if #(.IMG_W(IMG_W)) u_host (
    .clk, .rst_n(urst_n),
    .cmd_valid, .cmd_ready, .cmd_nimg, .h_in_valid, .h_in_ready, .h_in_data,
    .h_out_valid, .h_out_ready, .h_out_data, .h_busy, .h_done,
    .ctl_busy, .ctl_done, .start, .nimg, .dl_valid, .dl_ready, .dl_data,
    .ul_valid, .ul_ready, .ul_data);

  dwt_main_ctrl #(.N(N), .MAX_IMG(MAX_IMG), .IMG_W(IMG_W), .ADDR_W(ADDR_W)) u_ctrl (
    .clk, .rst_n, .unit_rst_n(ctl_rst_n),
    .sd_init_done, .sd_req, .sd_we, .sd_addr, .sd_ready, .sd_done,
    .start, .nimg, .busy(ctl_busy), .done(ctl_done),
    .dl_valid, .dl_ready, .dl_data, .ul_valid, .ul_ready, .ul_data,
    .clr_iptr, .clr_optr, .clr_hptr, .ibuf_sel, .obuf_sel,
    .host_wvalid, .host_wdata, .host_rtake, .host_rdata,
    .pass_start, .pass_idx, .pass_en, .pass_done);

  sdram_ctrl #(.ADDR_W(ADDR_W), .CAS_LAT(CAS_LAT)) u_sdram (
    .clk, .rst_n(urst_n),
    .init_done(sd_init_done), .req(sd_req), .req_we(sd_we), .req_addr(sd_addr),
    .req_ready(sd_ready), .req_done(sd_done), .rd_beat, .wr_beat,
    .mem_ready, .mem_cmd, .mem_addr);

  dwt_buffer_unit #(.N(N)) u_buf (
    .clk, .rst_n(urst_n),
    .clr_iptr, .clr_optr, .clr_hptr, .ibuf_sel, .obuf_sel,
    .rd_beat, .rd_data(mem_dq_in), .wr_beat, .wr_data(mem_dq_out),
    .host_wvalid, .host_wdata, .host_rtake, .host_rdata,
    .pass_start, .pass_idx, .pass_en, .pass_done,
    .step, .x0, .x1, .x0_valid, .x1_valid, .x0_keep, .x1_keep,
    .y0, .y1, .y0_valid, .y1_valid, .y0_hp, .y1_hp);

  rns_fir_unit #(.DIV(DIV), .IN_W(DATA_W)) u_fir (
    .clk, .rst_n(urst_n), .step,
    .x0, .x1, .x0_valid, .x1_valid, .x0_keep, .x1_keep,
    .y0, .y1, .y0_valid, .y1_valid, .y0_hp, .y1_hp);
endmodule
