// dwt_main_ctrl: main controller (finite state machine) of the DWT processor.
//
// After reset it holds the other units in reset for RST_CYC clocks and waits
// for the SDRAM controller to report the memory initialised.  A job of nimg
// images then runs in three phases:
//   download  pixels from the host are collected 4 rows at a time in output
//             buffer 0 and written to the image's input area in SDRAM
//   DWT       nimg+1 processing cycles.  In cycle X filter bank 0 filters the
//             rows of image X while filter bank 1 filters the columns of the
//             row-transformed image X-1 (first the L half, then the H half),
//             so both banks are busy except in the first and last cycle.  A
//             cycle is done in groups of 4 rows / 4 columns: read 4 rows of
//             image X into input buffer 0 and a 4-column strip of the row
//             results of image X-1 into input buffer 1, run 4 passes through
//             both banks, write the 4 row results to a ping-pong intermediate
//             area and the 4 column results to the image's output area
//   upload    output areas are read back 4 rows at a time and sent to the host
// SDRAM map, in words of N*N: input areas 0..MAX_IMG-1, output areas
// MAX_IMG..2*MAX_IMG-1, two intermediate areas after them.  All memory traffic
// is in bursts of 4 words through the SDRAM controller.
// busy is high from reset until the memory is initialised and during a job;
// start is taken only while it is low.  dl_data/host_wdata and
// host_rdata/ul_data are the host streams routed through the buffer unit.
// Following the source design: reset of other units, waiting for the SDRAM,
// host download, processing part of an image at a time, the row-bank/column-
// bank schedule across images, upload.  This design's own choice: the group
// size, memory map and every handshake.
module dwt_main_ctrl
  import dwt_pkg::*;
#(
  parameter int N       = 32,
  parameter int MAX_IMG = 4,
  parameter int IMG_W   = 4,
  parameter int ADDR_W  = 24,
  parameter int RST_CYC = 16
) (
  input  logic clk,
  input  logic rst_n,
  output logic unit_rst_n,
  // SDRAM controller
  input  logic              sd_init_done,
  output logic              sd_req,
  output logic              sd_we,
  output logic [ADDR_W-1:0] sd_addr,
  input  logic              sd_ready,
  input  logic              sd_done,
  // host interface
  input  logic              start,
  input  logic [IMG_W-1:0]  nimg,
  output logic              busy,
  output logic              done,
  input  logic              dl_valid,
  output logic              dl_ready,
  input  logic [7:0]        dl_data,
  output logic              ul_valid,
  input  logic              ul_ready,
  output logic [DATA_W-1:0] ul_data,
  // buffering unit
  output logic clr_iptr, clr_optr, clr_hptr,
  output logic ibuf_sel, obuf_sel,
  output logic host_wvalid,
  output logic [DATA_W-1:0] host_wdata,
  output logic host_rtake,
  input  logic [DATA_W-1:0] host_rdata,
  output logic pass_start,
  output logic [1:0] pass_idx,
  output logic [1:0] pass_en,
  input  logic pass_done
);
  localparam int IMG  = N * N;
  localparam int GRP  = 4 * N;          // words per group
  localparam int NG   = N / 4;          // groups per image
  localparam int GW   = $clog2(NG + 1);
  localparam int WW   = $clog2(GRP + 1);
  localparam int BWID = $clog2(N + 1);

  initial assert (2 * MAX_IMG + 2 <= (1 << (ADDR_W - $clog2(IMG))))
    else $error("dwt_main_ctrl: ADDR_W too small for the memory map");

  typedef enum logic [3:0] {
    S_RST, S_WAIT_SD, S_IDLE, S_LD_HOST, S_LD_WR, S_CYC, S_RD0, S_RD1,
    S_PASS, S_PASS_WAIT, S_WR0, S_WR1, S_NEXT, S_UL_RD, S_UL_SEND, S_DONE
  } state_e;
  state_e state;

  logic [$clog2(RST_CYC+1)-1:0] rcnt;
  logic [IMG_W-1:0] nk, k;      // image count, image index (download/upload)
  logic [IMG_W:0]   xc;         // DWT processing cycle 0..nk
  logic [GW-1:0]    g;
  logic [BWID-1:0]  b;
  logic [WW-1:0]    w;
  logic [1:0]       p;
  logic             sent;

  logic bursting, last_burst, row_active, col_active, last_group;
  assign bursting   = state inside {S_LD_WR, S_RD0, S_RD1, S_WR0, S_WR1, S_UL_RD};
  assign last_burst = (b == BWID'(N - 1)) && sd_done;
  assign row_active = (IMG_W+1)'(xc) < (IMG_W+1)'(nk);
  assign col_active = (xc != '0);
  assign last_group = (g == GW'(NG - 1));

  // burst addresses
  function automatic logic [ADDR_W-1:0] area(int a);
    return ADDR_W'(a) * ADDR_W'(IMG);
  endfunction
  logic [ADDR_W-1:0] seq_off, col_off;
  always_comb begin
    seq_off = ADDR_W'(g) * ADDR_W'(GRP) + ADDR_W'(b) * ADDR_W'(4);   // 4 whole rows
    col_off = ADDR_W'(b) * ADDR_W'(N) + ADDR_W'(g) * ADDR_W'(4);     // 4-column strip
    unique case (state)
      S_LD_WR: sd_addr = area(int'(k)) + seq_off;
      S_RD0:   sd_addr = area(int'(xc)) + seq_off;
      S_RD1:   sd_addr = area(2 * MAX_IMG + (xc[0] ? 0 : 1)) + col_off;
      S_WR0:   sd_addr = area(2 * MAX_IMG + int'(xc[0])) + seq_off;
      S_WR1:   sd_addr = area(MAX_IMG + int'(xc) - 1) + col_off;
      S_UL_RD: sd_addr = area(MAX_IMG + int'(k)) + seq_off;
      default: sd_addr = '0;
    endcase
  end

  assign sd_req      = bursting && !sent;
  assign sd_we       = state inside {S_LD_WR, S_WR0, S_WR1};
  assign ibuf_sel    = (state == S_RD1);
  assign obuf_sel    = (state == S_WR1);
  assign dl_ready    = (state == S_LD_HOST) && !clr_hptr;
  assign host_wvalid = dl_valid && dl_ready;
  assign host_wdata  = {8'b0, dl_data};
  assign ul_valid    = (state == S_UL_SEND) && !clr_hptr;
  assign ul_data     = host_rdata;
  assign host_rtake  = ul_valid && ul_ready;
  assign pass_start  = (state == S_PASS);
  assign pass_idx    = p;
  assign pass_en     = {col_active, row_active};
  // busy also covers initialisation, so no command is taken before the
  // memory is ready
  assign busy        = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_RST; rcnt <= '0; unit_rst_n <= 1'b0;
      nk <= '0; k <= '0; xc <= '0; g <= '0; b <= '0; w <= '0; p <= '0; sent <= 1'b0;
      clr_iptr <= 1'b0; clr_optr <= 1'b0; clr_hptr <= 1'b0; done <= 1'b0;
    end else begin
      clr_iptr <= 1'b0; clr_optr <= 1'b0; clr_hptr <= 1'b0; done <= 1'b0;
      // burst engine shared by all burst states
      if (bursting) begin
        if (sd_req && sd_ready) sent <= 1'b1;
        if (sd_done) begin
          sent <= 1'b0;
          b    <= b + 1'b1;
        end
      end
      unique case (state)
        S_RST: begin
          rcnt <= rcnt + 1'b1;
          if (rcnt == ($bits(rcnt))'(RST_CYC - 1)) begin
            unit_rst_n <= 1'b1;
            state      <= S_WAIT_SD;
          end
        end
        S_WAIT_SD: if (sd_init_done) state <= S_IDLE;
        S_IDLE: if (start) begin
          nk <= (nimg > IMG_W'(MAX_IMG)) ? IMG_W'(MAX_IMG) : nimg;
          k <= '0; g <= '0; w <= '0; clr_hptr <= 1'b1;
          state <= (nimg == '0) ? S_DONE : S_LD_HOST;
        end
        S_LD_HOST: if (host_wvalid) begin
          w <= w + 1'b1;
          if (w == WW'(GRP - 1)) begin
            b <= '0; clr_optr <= 1'b1; state <= S_LD_WR;
          end
        end
        S_LD_WR: if (last_burst) begin
          w <= '0; clr_hptr <= 1'b1;
          g <= last_group ? '0 : g + 1'b1;
          if (last_group) k <= k + 1'b1;
          if (last_group && k == nk - 1'b1) begin
            xc <= '0; g <= '0; state <= S_CYC;
          end else state <= S_LD_HOST;
        end
        S_CYC: begin
          b <= '0; clr_iptr <= 1'b1;
          state <= row_active ? S_RD0 : S_RD1;
        end
        S_RD0: if (last_burst) begin
          b <= '0; clr_iptr <= 1'b1; p <= '0;
          state <= col_active ? S_RD1 : S_PASS;
        end
        S_RD1: if (last_burst) begin
          p <= '0; state <= S_PASS;
        end
        S_PASS: state <= S_PASS_WAIT;
        S_PASS_WAIT: if (pass_done) begin
          p <= p + 1'b1;
          if (p == 2'd3) begin
            b <= '0; clr_optr <= 1'b1;
            state <= row_active ? S_WR0 : S_WR1;
          end else state <= S_PASS;
        end
        S_WR0: if (last_burst) begin
          b <= '0; clr_optr <= 1'b1;
          state <= col_active ? S_WR1 : S_NEXT;
        end
        S_WR1: if (last_burst) state <= S_NEXT;
        S_NEXT: begin
          g <= last_group ? '0 : g + 1'b1;
          if (last_group) xc <= xc + 1'b1;
          if (last_group && xc == (IMG_W+1)'(nk)) begin
            k <= '0; b <= '0; clr_iptr <= 1'b1; state <= S_UL_RD;
          end else state <= S_CYC;
        end
        S_UL_RD: if (last_burst) begin
          w <= '0; clr_hptr <= 1'b1; state <= S_UL_SEND;
        end
        S_UL_SEND: if (host_rtake) begin
          w <= w + 1'b1;
          if (w == WW'(GRP - 1)) begin
            g <= last_group ? '0 : g + 1'b1;
            if (last_group) k <= k + 1'b1;
            b <= '0; clr_iptr <= 1'b1;
            state <= (last_group && k == nk - 1'b1) ? S_DONE : S_UL_RD;
          end
        end
        S_DONE: begin
          done <= 1'b1; state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) sd_done |-> bursting && sent);
endmodule
