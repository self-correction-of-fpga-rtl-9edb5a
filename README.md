# Self-correcting FSM with a Hamming-coded state register

A control unit is usually a finite state machine: a block of combinational
logic plus a register holding the present state. If a particle strike or
overheating flips a bit of that register, the machine jumps to a wrong (or
illegal) state and the whole system it controls misbehaves. This design
protects the state register with an extended Hamming code (SEC-DED): the
register stores the state code together with parity bits, and a corrector on
the register's output repairs any single flipped bit **in the same clock
cycle**, before the next-state logic sees it. Double flips are detected and
flagged. The protection is independent of how the states are encoded and of
the FSM's size, so the encoder and corrector can be dropped into any FSM.

The worked example is *sec1*, a five-state Moore sequence detector that
raises its output after the input pattern `1 1 0 1`, in Gray, binary or
one-hot encoding.

## The loop

```
            +-------------------------------------------+
   x  ----->|  sec1_logic  (next state, output y)       |-----> y
            +-------------------------------------------+
                 ^ corrected state          | next state
                 |                          v
         +----------------+          +----------------+
         | code_corrector |          | parity_encoder |
         +----------------+          +----------------+
                 ^                          | {overall, parity, next state}
         +----------------+                 |
         | error_inserter |<-- inject,      |
         +----------------+    err_mask     |
                 ^                          v
                 +-------- fsm_register <---+   (clk, rst_n)
```

* `parity_encoder` computes the parity bits of the **next** state, so what is
  written at the clock edge is always a valid code word.
* `fsm_register` holds the word `{overall, parity[P-1:0], state[N-1:0]}`.
* `error_inserter` is a test hook on the read path: while `inject` is high it
  flips the bits set in `err_mask` (state, parity or overall bits, one or
  several). It does not alter the register itself.
* `code_corrector` recomputes parity from the state bits read, forms the
  syndrome and repairs the state.
* `sec1_logic` is the ordinary FSM logic; it only ever sees the corrected
  state.

All four blocks between the register's output and its input are
combinational, so correction adds logic depth to the one clock period but no
latency. Because the corrected state is what the logic uses, a single upset
never changes `y` or the state sequence, and the register is written back
clean at the next edge: an upset does not persist.

## The code

Number the bits of a code word from position 1. Positions that are powers of
two (1, 2, 4, 8, ...) hold parity bits `p0, p1, p2, ...`; all other positions
(3, 5, 6, 7, 9, 10, ...) hold the state bits `d0, d1, d2, ...` in order. For
11 state bits and 4 parity bits:

| position | 15  | 14 | 13 | 12 | 11 | 10 | 9  | 8  | 7  | 6  | 5  | 4  | 3  | 2  | 1  |
|----------|-----|----|----|----|----|----|----|----|----|----|----|----|----|----|----|
| bit      | d10 | d9 | d8 | d7 | d6 | d5 | d4 | p3 | d3 | d2 | d1 | p2 | d0 | p1 | p0 |

Parity bit `pk` is the XOR of the state bits whose position has bit `k` set,
so each group has even parity. For 11 bits, `p0` covers `d0 d1 d3 d4 d6 d8
d10`. `d` state bits need the smallest `p` with `d <= 2^p - 1 - p`: 3 bits
need 3 parity bits, 5 need 4, 11 need 4, and 120 need 7.

The XOR of the stored parity bits with the parity recomputed from the stored
state is the *syndrome*. If exactly one bit flipped, the syndrome equals that
bit's position. One more bit, the overall parity bit, makes the parity of the
whole word even. Together they decide what to do:

| syndrome | whole word parity | meaning                      | action                                  |
|----------|-------------------|------------------------------|-----------------------------------------|
| 0        | even              | no error                     | none                                    |
| 0        | odd               | overall parity bit flipped   | none, the state is fine (`err_overall`) |
| not 0    | odd               | single error                 | invert the state bit at that position (`err_single`) |
| not 0    | even              | double error                 | none, cannot correct (`err_double`)     |

A single error whose syndrome points at a parity position leaves the state
unchanged (its mask is all zero), and is still reported as `err_single`.

The correction is a mask that is all zero except at the state bit named by
the syndrome, XORed into the state. Group membership and mask positions are
computed from the position numbering when the design is elaborated (functions
in `hamming_pkg`). There is no stored table, which is why any width from 1
to 120 state bits works without editing code.

## The sec1 detector

| state | code (Gray) | next, x=0 | next, x=1 | y |
|-------|-------------|-----------|-----------|---|
| S0    | 000         | S0        | S1        | 0 |
| S1    | 001         | S0        | S2        | 0 |
| S2    | 011         | S3        | S2        | 0 |
| S3    | 010         | S0        | S4        | 0 |
| S4    | 110         | S0        | S2        | 1 |

Any other code is illegal: the output is 0 and the next state is S0. `y` is a
Moore output, 1 exactly when the last four inputs were `1 1 0 1` (overlaps
allowed). Reset is asynchronous and active low, and loads the code word of S0.

`sec1_pkg` also provides binary codes (S*i* = *i*) and one-hot codes
(S*i* = bit *i*). One-hot needs 5 state bits and 4 parity bits, against 3 + 3
for Gray or binary, so its encoder and corrector are larger and slower.

## Files

| file | contents |
|------|----------|
| `rtl/hamming_pkg.sv`    | code construction: `num_parity`, `data_position`, `parity_group`, `calc_parity`, `calc_parity_word` |
| `rtl/parity_encoder.sv` | `parity_encoder #(N=11, P)`: parity and overall bits of an N-bit word |
| `rtl/code_corrector.sv` | `code_corrector #(N=11, P, DED=1)`: syndrome, decision, corrected state, status flags |
| `rtl/error_inserter.sv` | `error_inserter #(W=7)`: masked bit flips under an enable |
| `rtl/fsm_register.sv`   | `fsm_register #(W=7, RESET_VALUE=0)`: state register, asynchronous active-low reset |
| `rtl/sec1_pkg.sv`       | state encodings of the detector (`enc_e`, `state_bits`, `state_code`) |
| `rtl/sec1_logic.sv`     | `sec1_logic #(ENC)`: next-state and output logic of the detector |
| `rtl/sec1_selfcorr.sv`  | top level `sec1_selfcorr #(ENC=ENC_GRAY, DED=1)` |

The top's ports are `clk`, `rst_n`, `x`, `y`, the test hook `inject` and
`err_mask[W-1:0]`, and the diagnostic outputs `state_out` (the corrected
state), `syndrome`, `err_single`, `err_double` and `err_overall`. The widths
are `N` = 3 (Gray, binary) or 5 (one-hot), `P` = 3 or 4, and `W = N + P + 1`.
Tie `inject` low in a real system.

### Protecting another FSM

Keep the structure of `sec1_selfcorr` and swap `sec1_logic` for your own
next-state logic. Instantiate `parity_encoder` and `code_corrector` with your
state width `N` (`P` defaults to the minimum). Make the register's reset
value the full code word of your initial state:
`{^{code, par}, par, code}` with `par = hamming_pkg::calc_parity_word(code, N, P)`.
With `DED = 0` the corrector ignores the overall bit and treats every nonzero
syndrome as a single error. That is a plain distance-3 code: it still corrects
single errors, but a double error is miscorrected instead of flagged.

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>`:

* `tb_parity_encoder`: all 2048 values of the 11-bit default against the
  explicit 11-bit group table, plus 3-, 5- and 120-bit instances against a
  positional reference (the XOR of the positions of all set bits of a valid
  word is zero).
* `tb_code_corrector`: 11, 3, 10 and 3-bit (`DED=0`) instances
  exhaustively, over every state with no error, every single flip and every
  double flip of the stored word. The 120-bit instance is tested randomly.
  The reference decoder works from bit positions, not from the design's
  tables. The test also includes a hand-worked example: a 10-bit all-zero
  state with the bit at position 3 set gives syndrome `0011` and is corrected
  to zero.
* `tb_error_inserter`, `tb_fsm_register` (including reset in mid-period),
  `tb_sec1_logic` (all codes and inputs, all three encodings).
* `tb_sec1_selfcorr`: the top with all defaults, 20 000 cycles of random input
  with random single and double errors injected (shared stimulus in
  `tb/sec1_checker.sv`). Outputs are checked in the same cycle as each
  injection against a state-level model, and `y` is also checked against
  "the last four inputs were 1101". The test fails if any of these never
  happened: state-bit correction, parity-bit error, overall-bit error, double
  error, recovery from an illegal state, detection, asynchronous reset.
* `tb_sec1_encodings`: the same run for the binary and one-hot variants, and
  for Gray with `DED = 0` (single errors only).

To run one with Verilator:

```
verilator --binary --timing --assert -Wall -Wno-fatal -y rtl -y tb \
    rtl/hamming_pkg.sv rtl/sec1_pkg.sv tb/tb_sec1_selfcorr.sv \
    --top-module tb_sec1_selfcorr
./obj_dir/Vtb_sec1_selfcorr
```

All testbenches finish in about a second. `sec1_selfcorr` also carries a
concurrent assertion (active with `--assert`): in any cycle without injection
the corrector must report no error, i.e. the register only ever holds valid
code words.

## Where this differs from the method as originally described

* **Overall parity bit.** The method is described as SEC-DED, but the
  original example FSM stores only the Hamming parity bits. Here the overall
  bit is always stored, and double-error detection is on by default (`DED=1`).
* **Tables.** The original tables cover 11 state bits. Here the same tables
  are computed, for any width up to 120.
* **Status outputs.** The syndrome and the three error flags are additions
  for diagnosis. The original corrector has only the corrected state as its
  output.
* **Error inserter.** Only its purpose and position are given (flip single or
  multiple bits of the stored state for diagnosis). The mask-plus-enable form
  is this design's own. It also reaches the parity and overall bits.
* **Binary and one-hot codes** for the detector are this design's choice.
  Only the Gray codes are given.
* **Encoder/corrector default size** is 11 state bits with 4 parity bits, the
  size of the original tables.
* The second benchmark machine (*sec2*: 4 inputs, 3 outputs, 17 states) is
  not included, because its state table is not available.
* Reported FPGA figures (slices, clock rate on a Spartan-IIE part) are not
  reproduced here. The expected trend is that one-hot costs the most, because
  it needs the most state and parity bits.
