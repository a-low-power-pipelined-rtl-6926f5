// rns_subfilter: one residue channel of a symmetric FIR filter, transposed form.
//
// The products of the current input with the distinct coefficients arrive
// already computed (prod[j] = c[j]*x mod MOD, c[0] the centre tap).  Tap k of
// the TAPS-tap filter uses prod[|k - (TAPS-1)/2|].  A chain of delay registers
// z[1..TAPS-1] with modular adders between them accumulates
//   y[n] = sum_k c_k * x[n-k]  (mod MOD)
// and the result is held in an output register.  Everything advances on `en`
// (one filter clock).  This is pipeline stage 3 of the filter unit; y is valid
// one enable after the matching products.
// Following the source design: transposed form, modular adders and delays.
module rns_subfilter
  import dwt_pkg::*;
#(
  parameter int MOD   = 257,
  parameter int TAPS  = 9,
  parameter int NUNIQ = (TAPS + 1) / 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  res_t prod [NUNIQ],
  output res_t y
);
  localparam int CTR = (TAPS - 1) / 2;

  function automatic int uidx(int k);
    return (k >= CTR) ? k - CTR : CTR - k;
  endfunction

  res_t z [1:TAPS-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y <= '0;
      for (int k = 1; k < TAPS; k++) z[k] <= '0;
    end else if (en) begin
      y <= mod_add(prod[uidx(0)], z[1], MOD);
      for (int k = 1; k < TAPS - 1; k++) z[k] <= mod_add(prod[uidx(k)], z[k+1], MOD);
      z[TAPS-1] <= prod[uidx(TAPS-1)];
    end
  end
endmodule
