// clefia_f: the shared F-function unit (F0 or F1) of the CLEFIA-128 core.
//
// One 32-bit word x is XORed with a 32-bit key word rk (a round key or a
// constant), split into bytes T0..T3 (T0 most significant), passed through
// the S-box layer and multiplied by a 4x4 diffusion matrix over GF(2^8):
//   F0 (f1_sel = 0): S0 S1 S0 S1, then M0 = [1 2 4 6 / 2 1 6 4 / 4 6 1 2 / 6 4 2 1]
//   F1 (f1_sel = 1): S1 S0 S1 S0, then M1 = [1 8 2 A / 8 1 A 2 / 2 A 1 8 / A 2 8 1]
// The data path computes one F-function per clock, so a single unit serves
// both F0 and F1, switched by f1_sel; this sharing follows the design's one
// "F0/F1" box. Since F0 and F1 use the same S-boxes on swapped byte
// positions, two S0 and two S1 instances behind byte-routing muxes suffice
// (this routing is this implementation's choice). The matrices are those of
// the CLEFIA algorithm.
//
// Interface: combinational; f1_sel, rk[31:0], x[31:0] in, y[31:0] out.
module clefia_f
  import clefia_pkg::*;
(
  input  logic  f1_sel,
  input  word_t rk,
  input  word_t x,
  output word_t y
);
  word_t      t;
  logic [7:0] s0_in  [2];
  logic [7:0] s1_in  [2];
  logic [7:0] s0_out [2];
  logic [7:0] s1_out [2];
  logic [7:0] v      [4];   // S-box layer output, v[0] most significant
  logic [7:0] v2     [4];   // 2*v
  logic [7:0] v4     [4];   // 4*v
  logic [7:0] v8     [4];   // 8*v
  logic [7:0] yb     [4];

  assign t = rk ^ x;

  // Byte pair j = (2j, 2j+1) shares one S0 and one S1. F0 sends the even
  // byte to S0 and the odd byte to S1; F1 swaps them.
  for (genvar j = 0; j < 2; j++) begin : g_sbox
    assign s0_in[j] = f1_sel ? t[23-16*j -: 8] : t[31-16*j -: 8];
    assign s1_in[j] = f1_sel ? t[31-16*j -: 8] : t[23-16*j -: 8];
    clefia_s0 u_s0 (.x(s0_in[j]), .y(s0_out[j]));
    clefia_s1 u_s1 (.x(s1_in[j]), .y(s1_out[j]));
  end

  always_comb begin
    for (int j = 0; j < 2; j++) begin
      v[2*j]   = f1_sel ? s1_out[j] : s0_out[j];
      v[2*j+1] = f1_sel ? s0_out[j] : s1_out[j];
    end
    for (int i = 0; i < 4; i++) begin
      v2[i] = gf8_x2(v[i]);
      v4[i] = gf8_x2(v2[i]);
      v8[i] = gf8_x2(v4[i]);
    end
    if (!f1_sel) begin
      // M0
      yb[0] = v[0]         ^ v2[1]         ^ v4[2]         ^ (v4[3] ^ v2[3]);
      yb[1] = v2[0]        ^ v[1]          ^ (v4[2] ^ v2[2]) ^ v4[3];
      yb[2] = v4[0]        ^ (v4[1] ^ v2[1]) ^ v[2]        ^ v2[3];
      yb[3] = (v4[0] ^ v2[0]) ^ v4[1]      ^ v2[2]         ^ v[3];
    end else begin
      // M1
      yb[0] = v[0]         ^ v8[1]         ^ v2[2]         ^ (v8[3] ^ v2[3]);
      yb[1] = v8[0]        ^ v[1]          ^ (v8[2] ^ v2[2]) ^ v2[3];
      yb[2] = v2[0]        ^ (v8[1] ^ v2[1]) ^ v[2]        ^ v8[3];
      yb[3] = (v8[0] ^ v2[0]) ^ v2[1]      ^ v8[2]         ^ v[3];
    end
    y = {yb[0], yb[1], yb[2], yb[3]};
  end
endmodule
