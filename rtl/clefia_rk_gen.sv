// clefia_rk_gen: on-the-fly round-key generator for CLEFIA-128.
//
// Produces the 36 round keys RK_0..RK_35, one 32-bit word per clock, from the
// intermediate key L, the main key K and the constants CON_24..CON_59 that
// arrive one per clock from the constant generator. Group i (i = 0..8) is
//   T = L ^ (CON_24+4i | CON_25+4i | CON_26+4i | CON_27+4i)
//   L = DoubleSwap(L)
//   if i is odd: T = T ^ K
//   RK_4i .. RK_4i+3 = T (most significant word first)
// Blocks, following the design's round-key generator drawing:
//   * a 4x32-bit serial-in parallel-out register gathers four constants;
//   * a 128-bit L register, loaded from the data path or from the
//     DoubleSwap of itself (the "st0" mux);
//   * the even/odd group flag Ct0, a flip-flop that toggles per group, picks
//     T (even) or T ^ K (odd);
//   * a 4x32-bit parallel-in serial-out register emits one word per clock.
//
// Interface and timing: l_load captures l_in (and clears Ct0). con_shift
// shifts con into the SIPO at the clock edge. rk_load computes the next group
// from the SIPO contents and loads the PISO; it has priority over rk_shift,
// which moves the PISO up one word. rk is the PISO's top word (registered).
module clefia_rk_gen
  import clefia_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  word_t  con,
  input  logic   con_shift,
  input  logic   l_load,
  input  block_t l_in,
  input  block_t k_in,
  input  logic   rk_load,
  input  logic   rk_shift,
  output word_t  rk
);
  block_t sipo_q, piso_q, l_q, t;
  logic   ct0_q;

  always_comb begin
    t = l_q ^ sipo_q;
    if (ct0_q) t = t ^ k_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sipo_q <= '0;
      piso_q <= '0;
      l_q    <= '0;
      ct0_q  <= 1'b0;
    end else begin
      if (con_shift) sipo_q <= {sipo_q[95:0], con};
      if (l_load) begin
        l_q   <= l_in;
        ct0_q <= 1'b0;
      end else if (rk_load) begin
        l_q   <= double_swap(l_q);
        ct0_q <= ~ct0_q;
      end
      if (rk_load)       piso_q <= t;
      else if (rk_shift) piso_q <= {piso_q[95:0], 32'h0};
    end
  end

  assign rk = piso_q[127:96];

  a_no_load_clash: assert property (@(posedge clk) !(l_load && rk_load));
endmodule
