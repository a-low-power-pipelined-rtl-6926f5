// rns_mod_lut: constant-coefficient modular multiplier built as a look-up table.
//
// Computes (COEF * r) mod MOD for a residue r.  The table has 256 entries of
// 8 bits, filled at elaboration with (COEF mod MOD) * i mod MOD.  For MOD = 257
// the product can be 256, which needs a 9th bit: since COEF is invertible
// modulo 257 exactly one address gives 256, so the 9th bit is a comparator
// on that address and the table stores 0 there.  A modulo-257 input residue
// of 256 (= -1) is also decoded by logic, giving -COEF mod 257.
// Combinational; the filter unit registers the output (pipeline stage 2).
// Following the source design: 256 x 8-bit tables and the logic-generated
// 9th bit.  This design's own choice: the decode of input residue 256.
module rns_mod_lut
  import dwt_pkg::*;
#(
  parameter int MOD  = 257,
  parameter int COEF = 617
) (
  input  res_t r,
  output res_t p
);
  localparam int CRES = cmod(COEF, MOD);
  localparam int NEG  = cmod(-COEF, MOD);      // product for r = 256 (mod 257)

  // address whose product is 256 (only meaningful for MOD = 257)
  function automatic int addr_of_256();
    for (int i = 0; i < 256; i++)
      if ((CRES * i) % MOD == 256) return i;
    return -1;
  endfunction
  localparam int A256 = (MOD == 257) ? addr_of_256() : -1;

  logic [7:0] rom [256];
  for (genvar i = 0; i < 256; i++) begin : g_rom
    assign rom[i] = 8'((CRES * i) % MOD);
  end

  always_comb begin
    p = {1'b0, rom[r[7:0]]};
    if (MOD == 257) begin
      if (r[8])                          p = 9'(NEG);
      else if (32'(r[7:0]) == A256)      p = 9'd256;
    end
  end
endmodule
