// clefia_const_gen: on-the-fly generator of the CLEFIA-128 constants CON_i.
//
// A 16-bit register T (the "t_i" register) is seeded with IV. Each T yields
// two 32-bit constants, one per clock:
//   even i (odd_phase = 0): CON_i = (T ^ P)  | (~T <<< 1)
//   odd  i (odd_phase = 1): CON_i = (~T ^ Q) | (T <<< 8)
// After the odd constant T is replaced by T * z^-1 over GF(2^16), so the
// register is written only every second clock. The 60 constants of a 128-bit
// key come out in 60 clocks. This replaces a constant ROM.
//
// The datapath (T register with IV/z^-1 input mux, inverter, <<<1 and <<<8,
// T/~T and P/Q muxes, XOR) follows the design's generator drawing and its
// bit equation for z^-1. The design gates the T register's clock every second
// cycle; here an enable does the same job, which is this design's choice.
//
// Interface: load (1 clock) seeds T with iv and selects CON_0. step advances
// to the next constant at the clock edge. con is combinational from the
// registers, so it is valid in the cycle after load or step. iv, p and q are
// ports so the top can supply the 128-bit-key seeds.
module clefia_const_gen
  import clefia_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] iv,
  input  logic [15:0] p,
  input  logic [15:0] q,
  input  logic        load,
  input  logic        step,
  output word_t       con,
  output logic        odd_phase
);
  logic [15:0] t_q;
  logic [15:0] t_n;   // ~T
  logic        odd_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_q   <= '0;
      odd_q <= 1'b0;
    end else if (load) begin
      t_q   <= iv;
      odd_q <= 1'b0;
    end else if (step) begin
      odd_q <= ~odd_q;
      if (odd_q) t_q <= gf16_zinv(t_q);
    end
  end

  always_comb begin
    t_n = ~t_q;
    if (!odd_q) con = {t_q ^ p, t_n[14:0], t_n[15]};
    else        con = {t_n ^ q, t_q[7:0], t_q[15:8]};
  end

  assign odd_phase = odd_q;

  // load and step are never requested together by the controller.
  a_load_step_excl: assert property (@(posedge clk) !(load && step));
endmodule
