// rns_rev_conv: reverse converter, residues {255, 256, 257} -> signed binary.
//
// With a, b, c the residues mod 256, 255, 257 the number is X = a + 256*Y,
// 0 <= Y < 255*257, where Y = b - a (mod 255) and Y = a - c (mod 257) because
// 256 = 1 (mod 255) and 256 = -1 (mod 257).  Y is rebuilt from its two
// residues u, w as Y = u + 255*v with v = 128*(w - u) mod 257 (128 is the
// inverse of 255 modulo 257); the product by 128 is a shift folded modulo 257.
// A final comparison with M/2 and subtraction of M gives the signed value in
// [-M/2, M/2).  Combinational; registered by the filter bank (stage 4).
// Following the source design: conversion for this moduli set with a
// compare-and-subtract for signed results.  This design's own choice: the
// mixed-radix formulation above.
module rns_rev_conv
  import dwt_pkg::*;
(
  input  rns_t                    r,   // r[0]: mod 255, r[1]: mod 256, r[2]: mod 257
  output logic signed [OUT_W-1:0] x
);
  logic [7:0]  a;
  logic signed [9:0] u, w, d;
  logic [15:0] t;
  logic signed [9:0] v;
  logic [16:0] y;
  logic [24:0] xu;

  always_comb begin
    a = r[1][7:0];
    // Y mod 255
    u = $signed({2'b0, r[0][7:0]}) - ((a == 8'd255) ? 10'sd0 : $signed({2'b0, a}));
    if (u < 0) u = u + 10'sd255;
    // Y mod 257
    w = $signed({2'b0, a}) - $signed({1'b0, r[2]});
    if (w < 0) w = w + 10'sd257;
    // v = 128 * (w - u) mod 257
    d = w - u;
    if (d < 0) d = d + 10'sd257;
    t = {d[8:0], 7'b0};
    v = $signed({2'b0, t[7:0]}) - $signed({2'b0, t[15:8]});
    if (v < 0) v = v + 10'sd257;
    y  = 17'(u) + 17'(v) * 17'd255;
    xu = {y, 8'b0} + 25'(a);
    if (xu >= 25'(RNS_HALF)) x = OUT_W'(signed'(xu) - 25'sd16776960);
    else                     x = OUT_W'(xu);
  end
endmodule
