// sec1_logic: combinational circuit of the sec1 sequence detector.
//
// A five-state Moore machine with one input x and one output y:
//   S0: x=0 -> S0, x=1 -> S1          y = 0
//   S1: x=0 -> S0, x=1 -> S2          y = 0
//   S2: x=0 -> S3, x=1 -> S2          y = 0
//   S3: x=0 -> S0, x=1 -> S4          y = 0
//   S4: x=0 -> S0, x=1 -> S2          y = 1
// so y is 1 for one cycle after the input pattern 1,1,0,1. A present-state
// code that is not one of the five (an illegal state) gives y = 0 and next
// state S0.
//
// Interface: state[N-1:0] (the corrected present state) and x in; next_state
// and y out, with N = sec1_pkg::state_bits(ENC). Timing: combinational.
// The state table and the Gray codes are the detector's own; the binary and
// one-hot codes are this design's choice (see sec1_pkg).
module sec1_logic #(
  parameter sec1_pkg::enc_e ENC = sec1_pkg::ENC_GRAY,
  parameter int unsigned    N   = sec1_pkg::state_bits(ENC)
) (
  input  logic [N-1:0] state,
  input  logic         x,
  output logic [N-1:0] next_state,
  output logic         y
);
  import sec1_pkg::*;

  initial assert (N == state_bits(ENC))
    else $error("sec1_logic: N=%0d does not match the encoding", N);

  localparam logic [N-1:0] C0 = N'(state_code(ENC, 0));
  localparam logic [N-1:0] C1 = N'(state_code(ENC, 1));
  localparam logic [N-1:0] C2 = N'(state_code(ENC, 2));
  localparam logic [N-1:0] C3 = N'(state_code(ENC, 3));
  localparam logic [N-1:0] C4 = N'(state_code(ENC, 4));

  always_comb begin
    y          = 1'b0;
    next_state = C0;
    case (state)
      C0: next_state = x ? C1 : C0;
      C1: next_state = x ? C2 : C0;
      C2: next_state = x ? C2 : C3;
      C3: next_state = x ? C4 : C0;
      C4: begin
        y          = 1'b1;
        next_state = x ? C2 : C0;
      end
      default: next_state = C0;
    endcase
  end
endmodule
