// clefia_s1: the 8-bit S-box S1 of CLEFIA, purely combinational.
//
// S1(x) = g(f(x)^-1): an affine map f, inversion over GF(2^8) mod
// z^8+z^4+z^3+z^2+1 (with 0 mapped to 0), and a second affine map g, in the
// three stages of the design's S1 drawing. The inversion is computed as
// x^254 with a chain of squarings and multiplications, which is simple and
// correct but not the smallest circuit (a composite-field inverter would be
// smaller); that choice is this design's own. The affine matrices and
// constants are those of the CLEFIA algorithm (see clefia_pkg).
//
// Interface: x (8 bits) in, y (8 bits) out, no clock.
module clefia_s1
  import clefia_pkg::*;
(
  input  logic [7:0] x,
  output logic [7:0] y
);
  logic [7:0] fx, inv;

  always_comb begin
    fx  = bit_matrix(S1_F_COL, x) ^ S1_F_CONST;
    inv = gf8_inv(fx);
    y   = bit_matrix(S1_G_COL, inv) ^ S1_G_CONST;
  end
endmodule
