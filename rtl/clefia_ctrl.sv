// clefia_ctrl: sequencer of the CLEFIA-128 core.
//
// One operation (key setup and encryption of one block) is a fixed schedule
// of 68 clocks counted by cnt = 0..67 after start is seen in idle:
//   cnt 0       constant generator seeded with IV (buffer clock)
//   cnt 1..24   12 GFN rounds on K with CON_0..CON_23 as keys -> L
//   cnt 25      L settles at the data-path output and is captured by the
//               round-key generator (end of the 26-clock L phase)
//   cnt 26..61  CON_24..CON_59 shifted into the round-key SIPO
//   cnt 30,34..62  round-key PISO loaded with the next four round keys
//   cnt 31..66  18 GFN rounds on the whitened plaintext, RK_0..RK_35
//   cnt 67      ciphertext valid, done = 1 (end of the 42-clock
//               encryption phase)
// The 26 + 42 = 68 clock budget follows the design's reported timing; the
// placement of every event inside it is this design's own. selconrk is 1
// during the L phase (K and constants feed the data path) and 0 during
// encryption (plaintext and round keys). f1_sel alternates F0/F1 each clock.
//
// Interface: start is sampled only when idle. All outputs are decoded from
// the counter and are valid in the clock they describe.
module clefia_ctrl
  import clefia_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic busy,
  output logic done,
  output logic selconrk,
  output logic cg_load,
  output logic cg_step,
  output logic dp_en,
  output logic dp_load,
  output logic f1_sel,
  output logic l_load,
  output logic con_shift,
  output logic rk_load,
  output logic rk_shift
);
  localparam int L_FIRST   = 1;
  localparam int L_LAST    = L_FIRST + 2 * L_ROUNDS - 1;          // 24
  localparam int L_CAPTURE = L_LAST + 1;                          // 25
  localparam int CON_FIRST = L_CAPTURE + 1;                       // 26
  localparam int CON_LAST  = CON_FIRST + 2 * ENC_ROUNDS - 1;      // 61
  localparam int RK_FIRST_LOAD = CON_FIRST + 4;                   // 30
  localparam int RK_LAST_LOAD  = RK_FIRST_LOAD + 2 * ENC_ROUNDS - 4; // 62
  localparam int E_FIRST   = RK_FIRST_LOAD + 1;                   // 31
  localparam int E_LAST    = E_FIRST + 2 * ENC_ROUNDS - 1;        // 66
  localparam int DONE_CNT  = E_LAST + 1;                          // 67

  typedef enum logic [1:0] {IDLE, L_PHASE, ENC_PHASE} phase_e;

  phase_e     phase;
  logic [6:0] cnt;
  int         c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= IDLE;
      cnt   <= '0;
    end else begin
      unique case (phase)
        IDLE: if (start) begin
          phase <= L_PHASE;
          cnt   <= '0;
        end
        L_PHASE: begin
          cnt <= cnt + 7'd1;
          if (int'(cnt) == L_CAPTURE) phase <= ENC_PHASE;
        end
        ENC_PHASE: begin
          if (int'(cnt) == DONE_CNT) begin
            phase <= IDLE;
            cnt   <= '0;
          end else begin
            cnt <= cnt + 7'd1;
          end
        end
        default: phase <= IDLE;
      endcase
    end
  end

  always_comb begin
    c         = int'(cnt);
    busy      = (phase != IDLE);
    selconrk  = (phase == L_PHASE);
    done      = (phase == ENC_PHASE) && (c == DONE_CNT);
    cg_load   = (phase == L_PHASE) && (c == 0);
    cg_step   = ((phase == L_PHASE) && (c >= L_FIRST) && (c <= L_LAST)) ||
                ((phase == ENC_PHASE) && (c >= CON_FIRST) && (c <= CON_LAST));
    dp_en     = ((phase == L_PHASE) && (c >= L_FIRST) && (c <= L_LAST)) ||
                ((phase == ENC_PHASE) && (c >= E_FIRST) && (c <= E_LAST));
    dp_load   = ((phase == L_PHASE) && (c == L_FIRST || c == L_FIRST + 1)) ||
                ((phase == ENC_PHASE) && (c == E_FIRST || c == E_FIRST + 1));
    f1_sel    = ~cnt[0];
    l_load    = (phase == L_PHASE) && (c == L_CAPTURE);
    con_shift = (phase == ENC_PHASE) && (c >= CON_FIRST) && (c <= CON_LAST);
    rk_load   = (phase == ENC_PHASE) && (c >= RK_FIRST_LOAD) && (c <= RK_LAST_LOAD) &&
                (((c - RK_FIRST_LOAD) % 4) == 0);
    rk_shift  = (phase == ENC_PHASE) && (c >= E_FIRST) && (c <= E_LAST);
  end

  // F0 must land on odd counts so that each round starts with F0.
  initial assert ((L_FIRST % 2) == 1 && (E_FIRST % 2) == 1);
endmodule
