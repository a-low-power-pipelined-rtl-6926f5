// dwt_buffer_unit: buffering and DDR interfacing unit.
//
// Holds two input buffers and two output buffers of 4*N words each:
//   ibuf0  four image rows for filter bank 0 (row r, column c at r*N + c)
//   ibuf1  a strip of four columns for filter bank 1 (row r, strip column c
//          at r*4 + c) - exactly the order in which bursts of 4 words of the
//          row-major image arrive
//   obuf0  the four row results, L coefficients in the left half of each
//          row and H coefficients in the right half
//   obuf1  the four column results, L in the top half, H in the bottom half
// DDR interface: on rd_beat a word pair from the memory is written into the
// selected input buffer; on wr_beat a word pair of the selected output buffer
// is driven to the memory.  Both use auto-incrementing pointers that the main
// controller clears.  Host words go into obuf0 and come from ibuf0 through a
// third pointer.
// Control unit: a pass (pass_start, line index 0..3 in the group, enabled
// banks) presents one line per bank to the filter unit, one sample per
// filter step, with whole-sample symmetric extension: N+8 samples
// x[-4..N+3], x[-p] = x[p], x[N-1+p] = x[N-1-p].  Samples at even positions
// from 8 on are tagged keep, so bank outputs are L[i] (centred on x[2i]) and
// H[i] (centred on x[2i+1]).  Results are rounded (COEF_FRAC fraction bits
// dropped), saturated to 16 bits and stored; pass_done pulses when N results
// per enabled bank are stored.
// Following the source design: input/output buffers, DDR data interface,
// symmetric extension by presenting buffered data.  This design's own choice:
// buffer organisation, 4-line groups, pointer scheme, rounding.
module dwt_buffer_unit
  import dwt_pkg::*;
#(
  parameter int N = 32
) (
  input  logic clk,
  input  logic rst_n,
  // pointer control and buffer selection from the main controller
  input  logic clr_iptr,
  input  logic clr_optr,
  input  logic clr_hptr,
  input  logic ibuf_sel,
  input  logic obuf_sel,
  // DDR data interface
  input  logic rd_beat,
  input  logic [DATA_W-1:0] rd_data [2],
  input  logic wr_beat,
  output logic [DATA_W-1:0] wr_data [2],
  // host data path
  input  logic host_wvalid,
  input  logic [DATA_W-1:0] host_wdata,
  input  logic host_rtake,
  output logic [DATA_W-1:0] host_rdata,
  // filter passes
  input  logic pass_start,
  input  logic [1:0] pass_idx,
  input  logic [1:0] pass_en,
  output logic pass_done,
  // filter unit
  input  logic step,
  output logic signed [DATA_W-1:0] x0, x1,
  output logic x0_valid, x1_valid, x0_keep, x1_keep,
  input  logic signed [OUT_W-1:0] y0, y1,
  input  logic y0_valid, y1_valid, y0_hp, y1_hp
);
  localparam int BW  = 4 * N;
  localparam int AW  = $clog2(BW);
  localparam int EW  = $clog2(N + 8);
  localparam int HN  = N / 2;

  initial assert (N % 4 == 0 && N >= 8) else $error("dwt_buffer_unit: N must be a multiple of 4, >= 8");

  logic [DATA_W-1:0] ibuf0 [BW];
  logic [DATA_W-1:0] ibuf1 [BW];
  logic [DATA_W-1:0] obuf0 [BW];
  logic [DATA_W-1:0] obuf1 [BW];
  logic [AW-1:0] iptr, optr, hptr;

  // ---------------- DDR interface and host path ----------------
  assign wr_data[0] = obuf_sel ? obuf1[optr]      : obuf0[optr];
  assign wr_data[1] = obuf_sel ? obuf1[optr + 1'b1] : obuf0[optr + 1'b1];
  assign host_rdata = ibuf0[hptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iptr <= '0; optr <= '0; hptr <= '0;
    end else begin
      if (clr_iptr) iptr <= '0; else if (rd_beat) iptr <= iptr + AW'(2);
      if (clr_optr) optr <= '0; else if (wr_beat) optr <= optr + AW'(2);
      if (clr_hptr) hptr <= '0; else if (host_wvalid || host_rtake) hptr <= hptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rd_beat) begin
      if (ibuf_sel) begin ibuf1[iptr] <= rd_data[0]; ibuf1[iptr + 1'b1] <= rd_data[1]; end
      else          begin ibuf0[iptr] <= rd_data[0]; ibuf0[iptr + 1'b1] <= rd_data[1]; end
    end
  end

  // ---------------- control unit: sample presentation ----------------
  logic feeding, running;
  logic [EW-1:0] e;
  logic [1:0] q;
  logic [1:0] ben;

  function automatic logic [AW-1:0] ext(logic [EW-1:0] pos);
    int p;
    p = int'(pos) - 4;
    if (p < 0)     p = -p;
    if (p > N - 1) p = 2 * (N - 1) - p;
    return AW'(p);
  endfunction

  logic [AW-1:0] mpos;
  always_comb begin
    mpos     = ext(e);
    x0       = $signed(ibuf0[AW'(q) * AW'(N) + mpos]);
    x1       = $signed(ibuf1[mpos * AW'(4) + AW'(q)]);
    x0_valid = feeding && ben[0];
    x1_valid = feeding && ben[1];
    x0_keep  = x0_valid && !e[0] && (e >= EW'(8));
    x1_keep  = x1_valid && !e[0] && (e >= EW'(8));
  end

  // ---------------- result collection ----------------
  function automatic logic [DATA_W-1:0] round_sat(logic signed [OUT_W-1:0] y);
    logic signed [OUT_W:0] t;
    t = (OUT_W+1)'(y) + (OUT_W+1)'(1 << (COEF_FRAC - 1));
    t = t >>> COEF_FRAC;
    if (t > (OUT_W+1)'(32767))       return 16'h7fff;
    else if (t < -(OUT_W+1)'(32768)) return 16'h8000;
    else                             return DATA_W'(t);
  endfunction

  logic [$clog2(N+1)-1:0] n0, n1;     // results stored per bank
  logic [AW-1:0] wa0, wa1;
  always_comb begin
    wa0 = AW'(q) * AW'(N) + (y0_hp ? AW'(HN) : '0) + AW'(n0 >> 1);
    wa1 = ((y1_hp ? AW'(HN) : '0) + AW'(n1 >> 1)) * AW'(4) + AW'(q);
  end

  always_ff @(posedge clk) begin
    if (host_wvalid) obuf0[hptr] <= host_wdata;
    else if (running && step && y0_valid) obuf0[wa0] <= round_sat(y0);
    if (running && step && y1_valid) obuf1[wa1] <= round_sat(y1);
  end

  logic all_in;
  assign all_in = (!ben[0] || n0 == ($bits(n0))'(N)) && (!ben[1] || n1 == ($bits(n1))'(N));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      feeding <= 1'b0; running <= 1'b0; e <= '0; q <= '0; ben <= '0;
      n0 <= '0; n1 <= '0; pass_done <= 1'b0;
    end else begin
      pass_done <= 1'b0;
      if (pass_start && !running) begin
        running <= 1'b1; feeding <= 1'b1; e <= '0; q <= pass_idx; ben <= pass_en;
        n0 <= '0; n1 <= '0;
      end else if (running) begin
        if (step) begin
          if (feeding) begin
            if (e == EW'(N + 7)) feeding <= 1'b0;
            e <= e + 1'b1;
          end
          if (y0_valid) n0 <= n0 + 1'b1;
          if (y1_valid) n1 <= n1 + 1'b1;
        end
        if (!feeding && all_in) begin
          running   <= 1'b0;
          pass_done <= 1'b1;
        end
      end
    end
  end

  // the output sequence of a bank alternates L, H starting with L
  assert property (@(posedge clk) disable iff (!rst_n)
                   running && step && y0_valid |-> y0_hp == n0[0]);
  assert property (@(posedge clk) disable iff (!rst_n)
                   running && step && y1_valid |-> y1_hp == n1[0]);
endmodule
