// clefia_s0: the 8-bit S-box S0 of CLEFIA, purely combinational.
//
// The input byte is split into nibbles; the upper nibble goes through SS0 and
// the lower through SS1. The two results are mixed by a 2x2 matrix over
// GF(2^4) (u0 = t0 ^ 2*t1, u1 = 2*t0 ^ t1) and then passed through SS2 (upper
// output nibble) and SS3 (lower output nibble). This structure follows the
// S0 drawing of the design; the SS tables and the field polynomial z^4+z+1
// are those of the CLEFIA specification.
//
// Interface: x (8 bits) in, y (8 bits) out, no clock.
module clefia_s0
  import clefia_pkg::*;
(
  input  logic [7:0] x,
  output logic [7:0] y
);
  logic [3:0] t0, t1, u0, u1;

  always_comb begin
    t0 = SS0[x[7:4]];
    t1 = SS1[x[3:0]];
    u0 = t0 ^ gf4_x2(t1);
    u1 = gf4_x2(t0) ^ t1;
    y  = {SS2[u0], SS3[u1]};
  end
endmodule
