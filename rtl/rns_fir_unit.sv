// rns_fir_unit: the RNS FIR filter bank unit - two 4-stage pipelined filter
// banks (bank 0: row filtering, bank 1: column filtering) sharing one set of
// 27 look-up-table multipliers.
//
// The filter clock is a clock enable, `step`, one system clock in every DIV
// (DIV = 4: 100 MHz control clock, 25 MHz filter rate).  Pipeline:
//   stage 1  input register, forward converters, residue register (per bank)
//   stage 2  look-up-table multipliers; the 27 tables (3 channels x (5 LP +
//            4 HP distinct coefficients)) are time-shared: in the first system
//            clock after a step they are addressed by bank 0's residues, in the
//            second by bank 1's, each result going to that bank's registers
//   stage 3  modular adder/delay chains (sub-filters), in rns_fir_bank
//   stage 4  down-sampling and the shared reverse converter, in rns_fir_bank
// Interface: a sample xb with tags valid/keep is taken on every step; keep
// marks the steps whose filter outputs are retained by the down-sampler.
// Outputs yb/yb_valid/yb_hp change right after a step and hold until the
// next.  Latency: L result of the sample taken at step k is valid after step
// k+4 (so it is read at step k+5), its H result one step later.
// Following the source design: the four stages, 27 shared tables, the
// bank-0-then-bank-1 access order.  This design's own choice: clock enables
// instead of separate clocks, the input tags.
module rns_fir_unit
  import dwt_pkg::*;
#(
  parameter int DIV  = 4,
  parameter int IN_W = DATA_W
) (
  input  logic clk,
  input  logic rst_n,
  output logic step,
  input  logic signed [IN_W-1:0] x0, x1,
  input  logic x0_valid, x1_valid, x0_keep, x1_keep,
  output logic signed [OUT_W-1:0] y0, y1,
  output logic y0_valid, y1_valid, y0_hp, y1_hp
);
  initial assert (DIV >= 3) else $error("rns_fir_unit: DIV must be at least 3");

  // filter-clock phase generator
  logic [$clog2(DIV)-1:0] ph;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)         ph <= '0;
    else if (step)      ph <= '0;
    else                ph <= ph + 1'b1;
  assign step = (ph == ($clog2(DIV))'(DIV - 1));

  // stage 1
  logic signed [IN_W-1:0] xin [2];
  logic in_v [2], in_k [2], s1_v [2], s1_k [2], s2_v [2], s2_k [2];
  rns_t fc [2], s1 [2];

  rns_fwd_conv #(.IN_W(IN_W)) u_fc0 (.x(xin[0]), .r(fc[0]));
  rns_fwd_conv #(.IN_W(IN_W)) u_fc1 (.x(xin[1]), .r(fc[1]));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < 2; b++) begin
        xin[b] <= '0; in_v[b] <= 1'b0; in_k[b] <= 1'b0;
        s1[b] <= '0; s1_v[b] <= 1'b0; s1_k[b] <= 1'b0;
      end
    end else if (step) begin
      xin[0] <= x0; in_v[0] <= x0_valid; in_k[0] <= x0_keep;
      xin[1] <= x1; in_v[1] <= x1_valid; in_k[1] <= x1_keep;
      for (int b = 0; b < 2; b++) begin
        s1[b] <= fc[b]; s1_v[b] <= in_v[b]; s1_k[b] <= in_k[b];
      end
    end
  end

  // stage 2: shared tables, select S = 0 (bank 0) in phase 0, S = 1 in phase 1
  logic sel;
  rns_t addr;
  res_t lut_lp [NCH][LP_UNIQ];
  res_t lut_hp [NCH][HP_UNIQ];
  assign sel  = (ph == 1);
  assign addr = sel ? s1[1] : s1[0];

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    for (genvar j = 0; j < LP_UNIQ; j++) begin : g_lp
      rns_mod_lut #(.MOD(MODS[c]), .COEF(LP_COEF[j])) u_lut (.r(addr[c]), .p(lut_lp[c][j]));
    end
    for (genvar j = 0; j < HP_UNIQ; j++) begin : g_hp
      rns_mod_lut #(.MOD(MODS[c]), .COEF(HP_COEF[j])) u_lut (.r(addr[c]), .p(lut_hp[c][j]));
    end
  end

  res_t p_lp [2][NCH][LP_UNIQ];
  res_t p_hp [2][NCH][HP_UNIQ];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_lp <= '{default: '0};
      p_hp <= '{default: '0};
      for (int b = 0; b < 2; b++) begin s2_v[b] <= 1'b0; s2_k[b] <= 1'b0; end
    end else if (ph == 0 || ph == 1) begin
      p_lp[sel] <= lut_lp;
      p_hp[sel] <= lut_hp;
      s2_v[sel] <= s1_v[sel];
      s2_k[sel] <= s1_k[sel];
    end
  end

  // stages 3 and 4
  rns_fir_bank u_bank0 (.clk, .rst_n, .en(step), .lp_prod(p_lp[0]), .hp_prod(p_hp[0]),
    .s2_valid(s2_v[0]), .s2_keep(s2_k[0]), .y(y0), .y_valid(y0_valid), .y_hp(y0_hp));
  rns_fir_bank u_bank1 (.clk, .rst_n, .en(step), .lp_prod(p_lp[1]), .hp_prod(p_hp[1]),
    .s2_valid(s2_v[1]), .s2_keep(s2_k[1]), .y(y1), .y_valid(y1_valid), .y_hp(y1_hp));
endmodule
