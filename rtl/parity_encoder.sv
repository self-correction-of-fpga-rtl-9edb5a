// parity_encoder: Hamming parity generator for an N-bit FSM state.
//
// Purely combinational. Each parity bit p_k is the XOR of the state bits whose
// code-word position has bit k set (see hamming_pkg), which makes every parity
// group even. The overall parity bit is the XOR of all state and parity bits,
// so that the whole stored word has even parity; it lets the code corrector
// tell double errors from single ones.
//
// Interface: state[N-1:0] in; parity[P-1:0] (p0 in bit 0) and overall out.
// Timing: no registers, result valid in the same cycle.
//
// The group membership and the default size (11 state bits, 4 parity bits)
// follow the standard Hamming construction; computing the groups from the position
// numbering rather than from a stored table is this design's choice, and
// lets N go up to 120 bits.
module parity_encoder #(
  parameter int unsigned N = 11,
  parameter int unsigned P = hamming_pkg::num_parity(N)
) (
  input  logic [N-1:0] state,
  output logic [P-1:0] parity,
  output logic         overall
);
  import hamming_pkg::*;

  initial assert (N >= 1 && N <= MAX_DATA && P >= num_parity(N) && P <= MAX_PAR)
    else $error("parity_encoder: unsupported N=%0d P=%0d", N, P);

  // Group k covers the state bits selected by GROUP_k (elaboration constant).
  for (genvar k = 0; k < P; k++) begin : g_par
    localparam logic [N-1:0] GROUP_K = N'(parity_group(N, k));
    assign parity[k] = ^(state & GROUP_K);
  end

  assign overall = ^{state, parity};

endmodule
