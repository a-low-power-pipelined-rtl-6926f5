// rns_fir_bank: one RNS filter bank (low-pass 9-tap and high-pass 7-tap) with
// down-sampling ahead of a single shared reverse converter.
//
// Inputs are the stage-2 product registers of the three residue channels
// (computed by the shared look-up tables of the filter unit) with the tags of
// the sample they belong to.  Stage 3: six transposed sub-filters (LP and HP,
// channels 255/256/257).  Stage 4: down-sampling by two and reverse-converter
// sharing.  On a step whose sample is tagged `keep` the LP residues enter the
// converter input register while the HP residues are parked in a hold
// register; on the following (discarded) step the parked HP residues are
// converted.  The converted value is registered at the output, so the bank
// produces L, H, L, H ... one value per filter step.
// Timing: everything advances on `en`.  The L result of a sample whose stage-2
// products were registered before enable k is in `y` after enable k+3, its H
// result after enable k+4.  keep-tagged samples must be at least two steps apart.
// Following the source design: sub-filter structure, down-sampling before the
// converter and the LP/HP converter sharing.  This design's own choice: the
// keep tag that marks which steps are kept.
module rns_fir_bank
  import dwt_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  res_t lp_prod [NCH][LP_UNIQ],
  input  res_t hp_prod [NCH][HP_UNIQ],
  input  logic s2_valid,
  input  logic s2_keep,
  output logic signed [OUT_W-1:0] y,
  output logic y_valid,
  output logic y_hp          // 0: y is a low-pass result, 1: high-pass
);
  rns_t lp_y, hp_y;
  logic s3_valid, s3_keep;

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    rns_subfilter #(.MOD(MODS[c]), .TAPS(LP_TAPS)) u_lp (
      .clk, .rst_n, .en, .prod(lp_prod[c]), .y(lp_y[c]));
    rns_subfilter #(.MOD(MODS[c]), .TAPS(HP_TAPS)) u_hp (
      .clk, .rst_n, .en, .prod(hp_prod[c]), .y(hp_y[c]));
  end

  // stage 4: down-sampling, LP/HP multiplexing, shared reverse converter
  rns_t rc_in, hp_hold;
  logic rc_valid, rc_hp, hp_pending;
  logic signed [OUT_W-1:0] rc_out;

  rns_rev_conv u_rc (.r(rc_in), .x(rc_out));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s3_valid <= 1'b0; s3_keep <= 1'b0;
      rc_in <= '0; hp_hold <= '0; rc_valid <= 1'b0; rc_hp <= 1'b0; hp_pending <= 1'b0;
      y <= '0; y_valid <= 1'b0; y_hp <= 1'b0;
    end else if (en) begin
      s3_valid <= s2_valid;
      s3_keep  <= s2_keep;
      if (s3_valid && s3_keep) begin
        rc_in      <= lp_y;
        hp_hold    <= hp_y;
        rc_valid   <= 1'b1;
        rc_hp      <= 1'b0;
        hp_pending <= 1'b1;
      end else if (hp_pending) begin
        rc_in      <= hp_hold;
        rc_valid   <= 1'b1;
        rc_hp      <= 1'b1;
        hp_pending <= 1'b0;
      end else begin
        rc_valid   <= 1'b0;
      end
      y       <= rc_out;
      y_valid <= rc_valid;
      y_hp    <= rc_hp;
    end
  end

  // a kept sample may not arrive while an HP result still waits for the converter
  assert property (@(posedge clk) disable iff (!rst_n)
                   en && s3_valid && s3_keep |-> !hp_pending)
    else $error("rns_fir_bank: kept samples closer than two steps");
endmodule
