// error_inserter: fault injection into the word read from the FSM register.
//
// Sits between the FSM register and the code corrector. While inject is high
// the W-bit stored word (state, parity and overall parity bits) is XORed with
// err_mask, so any single or multiple bit pattern can be flipped on the read
// path; while inject is low the word passes unchanged. The injection is
// transient: it affects only the cycles in which inject is high, and the
// register content itself is untouched (it is rewritten from the corrected
// next state at the next clock edge).
//
// Interface: code_in, err_mask [W-1:0], inject in; code_out [W-1:0] out.
// Timing: combinational. Its placement follows the self-correcting FSM's
// structure; the mask-and-enable form is this design's choice.
module error_inserter #(
  parameter int unsigned W = 7
) (
  input  logic [W-1:0] code_in,
  input  logic         inject,
  input  logic [W-1:0] err_mask,
  output logic [W-1:0] code_out
);
  assign code_out = inject ? (code_in ^ err_mask) : code_in;
endmodule
