// clefia_data_proc: 32-bit word-serial data path of the 4-branch generalized
// Feistel network (GFN) of CLEFIA.
//
// A GFN round maps (X0,X1,X2,X3) to (F0(X0)^X1, X2, F1(X2)^X3, X0). This
// path evaluates one F-function per clock, so a round takes two clocks:
//   even clock (f1_sel = 0): c = F0(rk, a) ^ b   with a = X0, b = X1
//   odd  clock (f1_sel = 1): c = F1(rk, a) ^ b   with a = X2, b = X3
// Unrolling the word rotation gives fixed delays: the F input a at clock t is
// the result c of clock t-2, and the XOR operand b is the F input of clock
// t-1 (even clocks) or t-3 (odd clocks). Three registers delay a (a_d1..a_d3)
// and two delay c (c_d1, c_d2); after the last round (which has no word
// rotation) the block is (X0, X1, X2, X3) = (a_d2, c_d2, a_d1, c_d1).
//
// The same path computes the intermediate key L (12 rounds, constants as
// keys) and the encryption (18 rounds, round keys). Correspondence with the
// design's drawing: the 4:1 input word muxes (selmux1, selmux4) and the
// input/feedback muxes (selmux2, selmux5) select a and b, the operand mux
// (selmux3) picks a_d1 or a_d3, one shared F0/F1 unit is followed by the
// XOR, and the result words form out1..out4. The drawing registers the
// F output before the XOR; here the XOR result is registered instead, so a
// round still takes two clocks with no extra pipeline stage. The exact delay
// arrangement is this design's own.
//
// Interface and timing: en advances the path one clock. With load_in = 1 the
// operands come from din (clock with f1_sel = 0: words 0 and 1; f1_sel = 1:
// words 2 and 3); these two clocks are the first round. rk is the F-function
// key word of the current clock. dout is valid in the clock after the last
// enabled clock of the last round. Words are numbered from the most
// significant end (word 0 = din[127:96]).
module clefia_data_proc
  import clefia_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  logic   load_in,
  input  logic   f1_sel,
  input  word_t  rk,
  input  block_t din,
  output block_t dout
);
  word_t a, b, f_out, c;
  word_t a_d1, a_d2, a_d3, c_d1, c_d2;

  always_comb begin
    if (load_in) begin
      a = f1_sel ? din[63:32] : din[127:96];
      b = f1_sel ? din[31:0]  : din[95:64];
    end else begin
      a = c_d2;
      b = f1_sel ? a_d3 : a_d1;
    end
  end

  clefia_f u_f (.f1_sel(f1_sel), .rk(rk), .x(a), .y(f_out));

  assign c = f_out ^ b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_d1 <= '0;
      a_d2 <= '0;
      a_d3 <= '0;
      c_d1 <= '0;
      c_d2 <= '0;
    end else if (en) begin
      a_d1 <= a;
      a_d2 <= a_d1;
      a_d3 <= a_d2;
      c_d1 <= c;
      c_d2 <= c_d1;
    end
  end

  assign dout = {a_d2, c_d2, a_d1, c_d1};
endmodule
