// clefia_top: compact CLEFIA block cipher core, 128-bit block, 128-bit key.
//
// The core keeps no constant or round-key memory. A constant generator makes
// the 60 constants one per clock, a single 32-bit word-serial data path first
// derives the intermediate key L from the key K (12 GFN rounds keyed by
// CON_0..CON_23), then encrypts the block (18 rounds), fed with round keys
// that a round-key generator builds one per clock from L, K and CON_24..59.
// The selconrk signal switches the data path's input between K and the
// whitened plaintext, and its F-function key between the constants and the
// round keys. Whitening keys are the words of K: WK0, WK1 are XORed into
// plaintext words 1 and 3, WK2, WK3 into the output words 1 and 3.
//
// The block partition and the Selconrk muxing follow the design's top-level
// drawing. Where that drawing places the whitening on words 0 and 2, this
// core follows the CLEFIA algorithm (words 1 and 3), which is what reproduces
// the published test vector.
//
// Interface and timing: plaintext and key are captured when start is
// accepted (busy low). done is high for one clock, 68 clocks after the start
// edge, and ciphertext is valid from then until the next operation starts.
// l_valid is high for one clock 26 clocks after the start edge, when l_key
// shows the intermediate key L. Words are big-endian: word 0 is bits 127:96.
module clefia_top
  import clefia_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  block_t plaintext,
  input  block_t key,
  output logic   busy,
  output logic   done,
  output block_t ciphertext,
  output logic   l_valid,
  output block_t l_key
);
  block_t p_q, k_q, dp_in, dp_out;
  word_t  con, rk, f_key;
  logic   selconrk, cg_load, cg_step, dp_en, dp_load, f1_sel;
  logic   l_load, con_shift, rk_load, rk_shift, con_odd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_q <= '0;
      k_q <= '0;
    end else if (start && !busy) begin
      p_q <= plaintext;
      k_q <= key;
    end
  end

  clefia_ctrl u_ctrl (
    .clk, .rst_n, .start, .busy, .done, .selconrk, .cg_load, .cg_step,
    .dp_en, .dp_load, .f1_sel, .l_load, .con_shift, .rk_load, .rk_shift
  );

  clefia_const_gen u_cg (
    .clk, .rst_n, .iv(CON_IV), .p(CON_P), .q(CON_Q),
    .load(cg_load), .step(cg_step), .con, .odd_phase(con_odd)
  );

  // Selconrk input muxes: K for the L phase, whitened plaintext otherwise.
  always_comb begin
    if (selconrk) dp_in = k_q;
    else dp_in = {p_q[127:96], p_q[95:64] ^ k_q[127:96],
                  p_q[63:32],  p_q[31:0]  ^ k_q[95:64]};
    f_key = selconrk ? con : rk;
  end

  clefia_data_proc u_dp (
    .clk, .rst_n, .en(dp_en), .load_in(dp_load), .f1_sel, .rk(f_key),
    .din(dp_in), .dout(dp_out)
  );

  clefia_rk_gen u_rk (
    .clk, .rst_n, .con, .con_shift, .l_load, .l_in(dp_out), .k_in(k_q),
    .rk_load, .rk_shift, .rk
  );

  assign ciphertext = {dp_out[127:96], dp_out[95:64] ^ k_q[63:32],
                       dp_out[63:32],  dp_out[31:0]  ^ k_q[31:0]};
  assign l_valid = l_load;
  assign l_key   = dp_out;

  // Constants alternate even/odd in step with the F0/F1 selection of the
  // L phase: F0 takes CON_2i, F1 takes CON_2i+1.
  a_con_parity: assert property (@(posedge clk)
    (selconrk && dp_en) |-> (con_odd == f1_sel));
endmodule
