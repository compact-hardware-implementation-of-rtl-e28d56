// clefia_ref_pkg: behavioural reference pieces for the testbenches, written
// independently of the RTL: the CLEFIA-128 constants by polynomial division,
// DoubleSwap by explicit bit numbering, and the round-key schedule from L.
package clefia_ref_pkg;

  // T_j: IV multiplied j times by z^-1 mod z^16+z^15+z^13+z^11+z^5+z^4+1.
  function automatic logic [15:0] ref_t(input int j);
    logic [16:0] t;
    t = 17'h0428a;
    for (int n = 0; n < j; n++) begin
      if (t[0]) t = t ^ 17'h1a831;
      t = t >> 1;
    end
    return t[15:0];
  endfunction

  function automatic logic [15:0] rotl16(input logic [15:0] v, input int s);
    return (v << s) | (v >> (16 - s));
  endfunction

  // CON_i for a 128-bit key.
  function automatic logic [31:0] ref_con(input int i);
    logic [15:0] t;
    t = ref_t(i / 2);
    if (i % 2 == 0) return {t ^ 16'hb7e1, rotl16(~t, 1)};
    else            return {~t ^ 16'h243f, rotl16(t, 8)};
  endfunction

  // DoubleSwap with specification bit numbering (bit 0 = MSB):
  // Y = X[7-63] | X[121-127] | X[0-6] | X[64-120].
  function automatic logic [127:0] ref_sigma(input logic [127:0] x);
    logic [127:0] y;
    int o;
    o = 0;
    for (int b = 7;   b <= 63;  b++) begin y[127 - o] = x[127 - b]; o++; end
    for (int b = 121; b <= 127; b++) begin y[127 - o] = x[127 - b]; o++; end
    for (int b = 0;   b <= 6;   b++) begin y[127 - o] = x[127 - b]; o++; end
    for (int b = 64;  b <= 120; b++) begin y[127 - o] = x[127 - b]; o++; end
    return y;
  endfunction

  // Round key RK_n (n = 0..35) from L and K.
  function automatic logic [31:0] ref_rk(input logic [127:0] l, input logic [127:0] k,
                                         input int n);
    logic [127:0] ll, t;
    ll = l;
    for (int i = 0; i <= n / 4; i++) begin
      t = ll ^ {ref_con(24 + 4 * i), ref_con(25 + 4 * i),
                ref_con(26 + 4 * i), ref_con(27 + 4 * i)};
      ll = ref_sigma(ll);
      if (i % 2 == 1) t = t ^ k;
    end
    return t[127 - 32 * (n % 4) -: 32];
  endfunction

endpackage
