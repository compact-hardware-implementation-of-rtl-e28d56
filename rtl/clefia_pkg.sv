// clefia_pkg: types, constants and pure functions shared by the CLEFIA-128 core.
//
// Holds the three 16-bit seeds of the constant generator (IV, P, Q for a
// 128-bit key), the 4-bit S-boxes SS0..SS3 from which S0 is built, the 8-bit
// S-box S1 affine maps, multiplication over GF(2^4) and GF(2^8), the multiplication by
// z^-1 over GF(2^16) that steps the constant generator, and the DoubleSwap
// permutation that updates the intermediate key L.
//
// The structure (S0 from SS0..SS3 with x2 over GF(2^4), S1 as affine f,
// inversion over GF(2^8), affine g; z^-1 per the bit equation of the
// constant generator; DoubleSwap as a 7/57/57/7 bit split) follows the
// design description. The SS tables, the matrices and constants of the two
// affine maps of S1, the field polynomials and the seeds are those of the
// CLEFIA algorithm (the affine maps are given as the column images of their
// matrices, which reproduce the standard S1 for all 256 inputs).
package clefia_pkg;

  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;

  // Seeds of the constant generator for 128-bit keys.
  localparam logic [15:0] CON_IV = 16'h428a;
  localparam logic [15:0] CON_P  = 16'hb7e1;
  localparam logic [15:0] CON_Q  = 16'h243f;

  // Number of GFN rounds: 12 to derive L, 18 to encrypt (128-bit key).
  localparam int unsigned L_ROUNDS   = 12;
  localparam int unsigned ENC_ROUNDS = 18;

  // 4-bit S-boxes composing S0.
  localparam logic [3:0] SS0 [16] = '{4'he, 4'h6, 4'hc, 4'ha, 4'h8, 4'h7, 4'h2, 4'hf,
                                      4'hb, 4'h1, 4'h4, 4'h0, 4'h5, 4'h9, 4'hd, 4'h3};
  localparam logic [3:0] SS1 [16] = '{4'h6, 4'h4, 4'h0, 4'hd, 4'h2, 4'hb, 4'ha, 4'h3,
                                      4'h9, 4'hc, 4'he, 4'hf, 4'h8, 4'h7, 4'h5, 4'h1};
  localparam logic [3:0] SS2 [16] = '{4'hb, 4'h8, 4'h5, 4'he, 4'ha, 4'h6, 4'h4, 4'hc,
                                      4'hf, 4'h7, 4'h2, 4'h3, 4'h1, 4'h0, 4'hd, 4'h9};
  localparam logic [3:0] SS3 [16] = '{4'ha, 4'h2, 4'h6, 4'hd, 4'h3, 4'h4, 4'h5, 4'he,
                                      4'h0, 4'h7, 4'h8, 4'h9, 4'hb, 4'hf, 4'hc, 4'h1};

  // S1(x) = g(f(x)^-1) over GF(2^8) mod z^8+z^4+z^3+z^2+1, with the affine
  // maps f(x) = Mf*x ^ 8'h1e and g(x) = Mg*x ^ 8'h69. Each matrix is given by
  // its columns: entry i is the image of input bit i (bit 0 = LSB).
  localparam logic [7:0] S1_F_COL [8] = '{8'h0e, 8'h69, 8'h68, 8'h5b, 8'h35, 8'h40, 8'h19, 8'hba};
  localparam logic [7:0] S1_F_CONST   = 8'h1e;
  localparam logic [7:0] S1_G_COL [8] = '{8'hd3, 8'h94, 8'h07, 8'hb9, 8'h75, 8'h4e, 8'hfb, 8'h84};
  localparam logic [7:0] S1_G_CONST   = 8'h69;

  // Multiplication by z over GF(2^4) mod z^4+z+1.
  function automatic logic [3:0] gf4_x2(input logic [3:0] a);
    return {a[2:0], 1'b0} ^ (a[3] ? 4'h3 : 4'h0);
  endfunction

  // Multiplication by z over GF(2^8) mod z^8+z^4+z^3+z^2+1.
  function automatic logic [7:0] gf8_x2(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1d : 8'h00);
  endfunction

  // General multiplication over GF(2^8) mod z^8+z^4+z^3+z^2+1.
  function automatic logic [7:0] gf8_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] r, s;
    r = '0;
    s = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r = r ^ s;
      s = gf8_x2(s);
    end
    return r;
  endfunction

  // Inversion over GF(2^8) as x^254 = x^2 * x^4 * ... * x^128 (0 maps to 0).
  function automatic logic [7:0] gf8_inv(input logic [7:0] a);
    logic [7:0] sq, r;
    sq = gf8_mul(a, a);
    r  = sq;
    for (int i = 0; i < 6; i++) begin
      sq = gf8_mul(sq, sq);
      r  = gf8_mul(r, sq);
    end
    return r;
  endfunction

  // Product of an 8x8 bit matrix, given by its columns, with a byte.
  function automatic logic [7:0] bit_matrix(input logic [7:0] cols [8], input logic [7:0] x);
    logic [7:0] r;
    r = '0;
    for (int i = 0; i < 8; i++) if (x[i]) r = r ^ cols[i];
    return r;
  endfunction

  // Multiplication by z^-1 over GF(2^16) mod z^16+z^15+z^13+z^11+z^5+z^4+1.
  function automatic logic [15:0] gf16_zinv(input logic [15:0] a);
    return {a[0], a[15] ^ a[0], a[14], a[13] ^ a[0], a[12], a[11] ^ a[0],
            a[10], a[9], a[8], a[7], a[6], a[5] ^ a[0], a[4] ^ a[0],
            a[3], a[2], a[1]};
  endfunction

  // DoubleSwap: with bit 0 the most significant bit of X,
  // Sigma(X) = X[7-63] | X[121-127] | X[0-6] | X[64-120].
  function automatic block_t double_swap(input block_t x);
    return {x[120:64], x[6:0], x[127:121], x[63:7]};
  endfunction

endpackage
