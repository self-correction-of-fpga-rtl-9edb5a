// sec1_selfcorr: self-correcting sec1 sequence detector (top level).
//
// The FSM register stores the state code together with its Hamming parity
// bits and an overall parity bit: {overall, parity[P-1:0], state[N-1:0]}.
// On the read path an error inserter can flip any of those bits. The code
// corrector repairs a single flipped bit in the same cycle, so the
// combinational circuit always sees the corrected present state; the parity
// encoder then computes the parity of the next state, and the full code word
// is written back at the clock edge. A single upset therefore never changes
// the output or the state sequence. Double errors are flagged and passed on
// uncorrected; an illegal code then sends the machine to S0.
//
// Interface: clk, rst_n (active-low, asynchronous), x in, y out; inject and
// err_mask[W-1:0] drive the error inserter; state_out is the corrected present
// state and syndrome the corrector's syndrome; err_single, err_double and err_overall report what the corrector saw
// in the current cycle. W = N + P + 1 where N = state bits of the encoding
// (3 for Gray and binary, 5 for one-hot) and P = parity bits (3 or 4).
//
// Timing: one clock per input symbol; y is a Moore output of the corrected
// present state. The default (Gray encoding) is the detector as specified;
// the word layout, the status outputs and the reset value computed from the
// initial state's code are this design's choices. An assertion checks that,
// without injection, the corrector never reports an error.
module sec1_selfcorr #(
  parameter sec1_pkg::enc_e ENC = sec1_pkg::ENC_GRAY,
  parameter bit             DED = 1'b1,
  localparam int unsigned   N   = sec1_pkg::state_bits(ENC),
  localparam int unsigned   P   = hamming_pkg::num_parity(N),
  localparam int unsigned   W   = N + P + 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         x,
  output logic         y,
  input  logic         inject,
  input  logic [W-1:0] err_mask,
  output logic [N-1:0] state_out,
  output logic [P-1:0] syndrome,
  output logic         err_single,
  output logic         err_double,
  output logic         err_overall
);
  import hamming_pkg::*;

  // Code word of the initial state S0.
  localparam logic [N-1:0] S0_CODE  = N'(sec1_pkg::state_code(ENC, 0));
  localparam logic [P-1:0] S0_PAR   = P'(calc_parity_word(data_t'(S0_CODE), N, P));
  localparam logic [W-1:0] RST_WORD = {^{S0_CODE, S0_PAR}, S0_PAR, S0_CODE};

  logic [W-1:0] reg_q, reg_d, read_word;
  logic [N-1:0] corr_state, next_state;
  logic [P-1:0] next_parity;
  logic         next_overall;

  fsm_register #(.W(W), .RESET_VALUE(RST_WORD)) u_register (
    .clk   (clk),
    .rst_n (rst_n),
    .d     (reg_d),
    .q     (reg_q)
  );

  error_inserter #(.W(W)) u_inserter (
    .code_in  (reg_q),
    .inject   (inject),
    .err_mask (err_mask),
    .code_out (read_word)
  );

  code_corrector #(.N(N), .P(P), .DED(DED)) u_corrector (
    .state       (read_word[N-1:0]),
    .in_parity   (read_word[N+P-1:N]),
    .in_overall  (read_word[W-1]),
    .corr_state  (corr_state),
    .syndrome    (syndrome),
    .err_single  (err_single),
    .err_double  (err_double),
    .err_overall (err_overall)
  );

  sec1_logic #(.ENC(ENC), .N(N)) u_logic (
    .state      (corr_state),
    .x          (x),
    .next_state (next_state),
    .y          (y)
  );

  parity_encoder #(.N(N), .P(P)) u_encoder (
    .state   (next_state),
    .parity  (next_parity),
    .overall (next_overall)
  );

  assign reg_d     = {next_overall, next_parity, next_state};

  // The register only ever receives encoder output, so with no injected error
  // the corrector must find nothing to report.
  a_clean_word: assert property (@(posedge clk) disable iff (!rst_n)
                                 !inject |-> !(err_single || err_double || err_overall))
    else $error("sec1_selfcorr: stored word is not a valid code word");
  assign state_out = corr_state;

endmodule
