# Compact CLEFIA-128 encryption core

CLEFIA is a 128-bit block cipher built on a four-branch generalized Feistel
network (GFN). A straightforward hardware version keeps a table of 60
key-schedule constants and 36 round keys (96 words of 32 bits). This core
keeps neither. A small LFSR-like **constant generator** makes the constants
one per clock, and a **round-key generator** turns them into round keys one
per clock, just in time for the data path. A single 32-bit **word-serial data
path** does both jobs. It first derives the intermediate key L from the key
K, then encrypts the block with the round keys. It evaluates one F-function
per clock.

It supports a 128-bit key and encryption only. One call to the core does a
full key setup followed by the encryption of one block, in 68 clocks.

## Algorithm in brief

Words are numbered from the most significant end: word 0 is bits 127:96.

* **GFN round.** `(X0,X1,X2,X3) -> (F0(RK_2i,X0)^X1, X2, F1(RK_2i+1,X2)^X3, X0)`.
  The last round does not rotate the words.
* **F0 / F1.** XOR with a 32-bit key word, then four byte S-boxes, then a 4x4
  matrix over GF(2^8) (polynomial z^8+z^4+z^3+z^2+1).
  * F0 uses S0 S1 S0 S1 and M0 = [1 2 4 6; 2 1 6 4; 4 6 1 2; 6 4 2 1].
  * F1 uses S1 S0 S1 S0 and M1 = [1 8 2 A; 8 1 A 2; 2 A 1 8; A 2 8 1].
* **S0.** Split the byte into nibbles. Apply SS0 to the high nibble and SS1 to
  the low one, mix the two with x2 over GF(2^4), then apply SS2 and SS3.
* **S1.** `g(f(x)^-1)`: an affine map, inversion in GF(2^8), and a second
  affine map.
* **Key setup.** L = 12 GFN rounds on K, keyed by CON_0..CON_23. Then for
  i = 0..8:
  * T = L ^ CON_24+4i..27+4i
  * L = DoubleSwap(L)
  * if i is odd, T ^= K
  * RK_4i..4i+3 = T
* **Whitening.** WK0..WK3 = K0..K3. WK0 and WK1 are XORed into plaintext
  words 1 and 3. WK2 and WK3 are XORed into output words 1 and 3.
* **Encryption.** 18 GFN rounds with RK_0..RK_35.

## The 68-clock schedule

`clefia_ctrl` counts the clocks of an operation, numbered from the first clock
after the start edge:

| clock   | constant generator       | data path                                   | round-key generator                  |
|---------|--------------------------|---------------------------------------------|--------------------------------------|
| 0       | seeded with IV           | idle                                        |                                      |
| 1-24    | CON_0..CON_23, one/clock | 12 rounds on K, constants as keys           |                                      |
| 25      | holds CON_24             | L on its output (`l_valid`)                 | captures L                           |
| 26-61   | CON_24..CON_59           |                                             | SIPO shifts in one constant/clock    |
| 30,34..62 |                        |                                             | PISO loaded with the next 4 keys      |
| 31-66   |                          | 18 rounds on whitened P, round keys as keys | PISO emits RK_0..RK_35, one/clock    |
| 67      |                          | result on output                            | `done`, `ciphertext` valid           |

This is 26 clocks for L and 42 for the ciphertext, which matches the original
architecture's 26 + 42 = 68. The placement of each event inside those budgets
is this implementation's own. The 6 clocks between L and the end of
encryption that are not rounds break down as follows:

* 4 clocks to fill the SIPO with the first four constants;
* 1 clock to load the PISO;
* 1 output clock.

`selconrk` is 1 during clocks 0-25 and 0 afterwards. It switches two things:

* the data-path input, between K and the whitened plaintext;
* the F-function key, between the constants and the round keys.

## Word-serial GFN data path (`clefia_data_proc`)

This is the least obvious part of the design. A round has two F-functions, F0
on X0 and F1 on X2, and the path has one shared F unit. So a round takes two
clocks:

    even clock:  c = F0(rk, a) ^ b     a = X0, b = X1
    odd  clock:  c = F1(rk, a) ^ b     a = X2, b = X3

The word rotation between rounds is not done by moving words around. It is
unrolled into fixed delays. Call the F input of clock t `a(t)` and the XOR
result `c(t)`. Writing out two rounds gives:

* `a(t) = c(t-2)`: the new X0 is the previous F0 result, and the new X2 is the
  previous F1 result.
* `b(t) = a(t-1)` on even clocks, because the new X1 is the old X2.
* `b(t) = a(t-3)` on odd clocks, because the new X3 is the old X0.

So the path needs:

* three registers that delay `a` (`a_d1..a_d3`);
* two registers that delay `c` (`c_d1, c_d2`);
* one 2:1 mux on the XOR operand (`a_d1` or `a_d3`, chosen by F0/F1);
* input muxes used in the first round only (`load_in`). They pick words 0/1
  on the F0 clock and words 2/3 on the F1 clock.

After the last round the block is `(a_d2, c_d2, a_d1, c_d1)`. This is read
straight from the registers, one clock after the last F step, and it keeps
that value until the path is enabled again.

The original drawing registers the F output before the XOR. Here the XOR
result is registered instead, so each F step is one register-to-register
path: key XOR, S-box, matrix, XOR. The clock budget is unchanged.

## Constant generator (`clefia_const_gen`)

A 16-bit register T starts at IV = 0x428a. Each T value gives two constants:

    CON_2i   = (T ^ 0xb7e1) | (~T <<< 1)
    CON_2i+1 = (~T ^ 0x243f) | (T <<< 8)

After each pair, T is multiplied by z^-1 in GF(2^16) modulo
z^16+z^15+z^13+z^11+z^5+z^4+1. This is a shift right, with bit 0 fed back
into bits 15, 14, 12, 10, 4 and 3. A phase flip-flop picks the even or odd
form. T has a clock enable and is written every second clock; the original
gates its clock for this. The output `con` is combinational from the
registers.

## Round-key generator (`clefia_rk_gen`)

It is built from these parts:

* a 4 x 32-bit serial-in/parallel-out register that collects constants;
* a 128-bit L register, loaded from the data path or from DoubleSwap of
  itself;
* a group-parity flip-flop `ct0` that adds K to every odd group;
* a 4 x 32-bit parallel-in/serial-out register that emits one round key per
  clock.

The next group is loaded in the same clock that shifts out the last word of
the previous group, so round keys come out with no gaps.

DoubleSwap, with bit 0 the MSB, is
`X[7-63] | X[121-127] | X[0-6] | X[64-120]`. In Verilog bit order that is
`{x[120:64], x[6:0], x[127:121], x[63:7]}`.

## F unit and S-boxes (`clefia_f`, `clefia_s0`, `clefia_s1`)

One `clefia_f` serves as both F0 and F1, selected by `f1_sel`. F0 and F1 use
the same S-boxes with the byte positions swapped. So two S0 and two S1
instances, behind byte-routing muxes, cover both F types. The matrix step
applies M0 or M1 using only xtime (x2) chains.

`clefia_s0` is built from its four 4-bit tables.

`clefia_s1` computes `g(f(x)^-1)` directly:

* The affine maps are in `clefia_pkg` as the column images of their
  matrices, with constants 0x1e (f) and 0x69 (g). They reproduce the standard
  S1 for all 256 inputs.
* The inversion is x^254, computed with a chain of squarings and multiplies.
  This is correct and easy to read, but it is much larger than a
  composite-field inverter. Replace it with one if area matters.

## Interface of `clefia_top`

| port         | dir | width | meaning                                                   |
|--------------|-----|-------|-----------------------------------------------------------|
| `clk`        | in  | 1     | clock, rising edge                                        |
| `rst_n`      | in  | 1     | asynchronous reset, active low                            |
| `start`      | in  | 1     | captures `plaintext` and `key` when not busy              |
| `plaintext`  | in  | 128   | block to encrypt                                          |
| `key`        | in  | 128   | 128-bit key                                               |
| `busy`       | out | 1     | operation in progress; `start` is ignored                 |
| `done`       | out | 1     | one-clock pulse, 68 clocks after the start edge           |
| `ciphertext` | out | 128   | valid from `done` until the next operation starts         |
| `l_valid`    | out | 1     | one-clock pulse, 26 clocks after the start edge           |
| `l_key`      | out | 128   | the intermediate key L while `l_valid` is high            |

A new `start` may be given in the clock after `done`. Nothing is pipelined
across operations: every block repeats the key setup.

## Where this implementation departs from the original architecture, or fills gaps

* **Whitening position.** The original top-level drawing puts the whitening
  XORs on words 0 and 2. The cipher, and its published test vector, put them
  on words 1 and 3, and this core follows the cipher.
* **Controller.** The original gives only the control signal names
  (selmux1-5, sel2, sel, Ct0, load, Selconrk). The counter-based controller,
  the start/busy/done handshake and the reset are this implementation's own.
* **Data path arrangement.** The exact delay arrangement and the register
  placement in the data path are derived here from the GFN round (see
  above).
* **Constants and tables.** The field polynomials, the SS tables, the affine
  maps of S1, M0/M1 and IV come from the CLEFIA algorithm itself.
* **Key sizes and decryption.** Only 128-bit keys are built. The 192- and
  256-bit key schedules (an 8-branch GFN, more constants and more rounds) and
  decryption are not built.
* **No area claims.** No area figure is claimed for this RTL. In particular,
  the x^254 inverter makes S1 far larger than an optimized one.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

* `tb_clefia_s0`, `tb_clefia_s1`: sample values, and that the S-box is a
  permutation.
* `tb_clefia_f`: F0 and F1 on four random (key, data) pairs.
* `tb_clefia_const_gen`: all 60 constants against a bit-level reference
  (`tb/clefia_ref_pkg.sv`), plus hold and reload.
* `tb_clefia_rk_gen`: all 36 round keys of the standard test key, on the
  right clocks.
* `tb_clefia_data_proc`: L and C for five vectors, with reference constants
  and round keys.
* `tb_clefia_ctrl`: the clock of every event and how often each happens.
* `tb_clefia_top`: the whole core at its default size. It runs five key and
  plaintext pairs back to back, including the standard vector:
  * K = ffeeddccbbaa99887766554433221100
  * P = 000102030405060708090a0b0c0d0e0f
  * C = de2bf2fd9b74aacdf1298555459494fd

  It checks L, C, the 26/42/68-clock latencies and the ignored `start`, and
  counts that each mechanism happened: both round-key group parities, the
  PISO reload overlap and the `selconrk` switch.

Run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/clefia_pkg.sv tb/clefia_ref_pkg.sv tb/tb_clefia_top.sv \
        --top-module tb_clefia_top
    ./obj_dir/Vtb_clefia_top

For another testbench, swap in its file and top name. Only the `tb_clefia_const_gen`,
`tb_clefia_rk_gen` and `tb_clefia_data_proc` testbenches need
`tb/clefia_ref_pkg.sv`, but listing it for all of them is harmless. Lint a
module with
`verilator --lint-only -Wall -Irtl rtl/clefia_pkg.sv rtl/<module>.sv`.

## Files

* `rtl/clefia_pkg.sv`: shared types, constants, S-box tables, and field and
  permutation functions.
* `rtl/clefia_s0.sv`, `rtl/clefia_s1.sv`: the S-boxes.
* `rtl/clefia_f.sv`: the shared F0/F1 unit.
* `rtl/clefia_const_gen.sv`: the constant generator.
* `rtl/clefia_rk_gen.sv`: the round-key generator.
* `rtl/clefia_data_proc.sv`: the word-serial GFN data path.
* `rtl/clefia_ctrl.sv`: the 68-clock sequencer.
* `rtl/clefia_top.sv`: the core.
* `tb/`: one testbench per module, plus `clefia_ref_pkg.sv`, the reference
  functions the testbenches use.
