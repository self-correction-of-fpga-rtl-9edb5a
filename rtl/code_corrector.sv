// code_corrector: same-cycle SEC-DED correction of the FSM present state.
//
// Purely combinational. It recomputes the parity bits from the stored state,
// XORs them with the stored parity bits to form the syndrome (the code-word
// position of a flipped bit), and checks the overall parity of the whole
// stored word. The action follows the usual SEC-DED decision:
//   syndrome = 0, overall even : no error, state passes unchanged
//   syndrome = 0, overall odd  : only the overall parity bit flipped; harmless
//   syndrome /= 0, overall odd : single error; the state bit at the syndrome's
//                                position is inverted (a parity-bit position
//                                gives an all-zero mask)
//   syndrome /= 0, overall even: double error; not correctable, mask is zero
// The mask is XORed into the state, so without a single error the state
// passes through unchanged.
//
// With DED = 0 the overall bit is ignored and every nonzero syndrome is
// treated as a single error (plain distance-3 Hamming code).
//
// Interface: state[N-1:0], in_parity[P-1:0], in_overall in; corr_state out,
// plus the syndrome and three status flags for diagnosis (the flags are this
// design's addition). Timing: no registers, result valid in the same cycle.
module code_corrector #(
  parameter int unsigned N   = 11,
  parameter int unsigned P   = hamming_pkg::num_parity(N),
  parameter bit          DED = 1'b1
) (
  input  logic [N-1:0] state,
  input  logic [P-1:0] in_parity,
  input  logic         in_overall,
  output logic [N-1:0] corr_state,
  output logic [P-1:0] syndrome,
  output logic         err_single,   // single error seen (corrected if in a state bit)
  output logic         err_double,   // uncorrectable double error seen
  output logic         err_overall   // only the overall parity bit is wrong
);
  import hamming_pkg::*;

  initial assert (N >= 1 && N <= MAX_DATA && P >= num_parity(N) && P <= MAX_PAR)
    else $error("code_corrector: unsupported N=%0d P=%0d", N, P);

  logic [P-1:0] new_parity;
  logic         overall_odd;
  logic         syn_nz;
  logic [N-1:0] hit;   // hit[i]: the syndrome names the position of state bit i
  logic [N-1:0] mask;

  for (genvar k = 0; k < P; k++) begin : g_par
    localparam logic [N-1:0] GROUP_K = N'(parity_group(N, k));
    assign new_parity[k] = ^(state & GROUP_K);
  end

  for (genvar i = 0; i < N; i++) begin : g_hit
    localparam logic [P-1:0] POS_I = P'(data_position(i));
    assign hit[i] = (syndrome == POS_I);
  end

  assign syndrome    = in_parity ^ new_parity;
  assign syn_nz      = |syndrome;
  assign overall_odd = ^{state, in_parity, in_overall};

  always_comb begin
    err_single  = syn_nz && (overall_odd || !DED);
    err_double  = syn_nz && !overall_odd && DED;
    err_overall = !syn_nz && overall_odd && DED;
    mask        = err_single ? hit : '0;
  end

  assign corr_state = state ^ mask;

endmodule
