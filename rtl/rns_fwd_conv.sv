// rns_fwd_conv: forward converter, signed binary -> residues mod 255, 256, 257.
//
// The input (IN_W <= 16 bits, two's complement) is sign-extended to 16 bits
// and offset by 2**15 so that it is non-negative; the offset is removed again
// in the residue domain.  Because 2**8 = 1 (mod 255) the modulo-255 residue is
// the end-around-carry sum of the two bytes; because 2**8 = -1 (mod 257) the
// modulo-257 residue is the difference of the bytes.  The modulo-256 residue
// is simply the low byte of the two's complement input.  Purely combinational;
// the pipeline registers around it belong to the filter unit.
// Following the source design: the three channels and the trivial mod-256
// path.  This design's own choice: the offset method used to handle signs.
module rns_fwd_conv
  import dwt_pkg::*;
#(
  parameter int IN_W = DATA_W
) (
  input  logic signed [IN_W-1:0] x,
  output rns_t                   r     // r[0]: mod 255, r[1]: mod 256, r[2]: mod 257
);
  localparam int OFF255 = 32768 % 255;   // 128
  localparam int OFF257 = 32768 % 257;   // 129

  logic [15:0] u;
  logic [8:0]  s255;
  logic [7:0]  f255;
  logic signed [9:0] d257;
  logic [8:0]  f257;
  logic signed [9:0] t255, t257;

  initial assert (IN_W <= 16) else $error("rns_fwd_conv: IN_W must be <= 16");

  always_comb begin
    u = 16'($signed(x)) ^ 16'h8000;                 // x + 2**15
    // modulo 255: byte sum with end-around carry
    s255 = {1'b0, u[7:0]} + {1'b0, u[15:8]};
    f255 = s255[7:0] + {7'b0, s255[8]};
    if (f255 == 8'd255) f255 = 8'd0;
    t255 = $signed({2'b0, f255}) - 10'sd128;        // remove the offset
    if (t255 < 0) t255 = t255 + 10'sd255;
    // modulo 257: alternating byte sum
    d257 = $signed({2'b0, u[7:0]}) - $signed({2'b0, u[15:8]});
    if (d257 < 0) d257 = d257 + 10'sd257;
    f257 = d257[8:0];
    t257 = $signed({1'b0, f257}) - 10'sd129;
    if (t257 < 0) t257 = t257 + 10'sd257;
    r[0] = t255[8:0];
    r[1] = {1'b0, u[7:0]};                          // low byte; 2**15 = 0 mod 256
    r[2] = t257[8:0];
  end

  // the constants above are written out; keep them tied to the derivation
  initial assert (OFF255 == 128 && OFF257 == 129);
endmodule
