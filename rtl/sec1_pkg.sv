// sec1_pkg: state encodings of the sec1 sequence detector.
//
// sec1 is a Moore FSM with five states S0..S4 that raises its output in S4.
// Three encodings are supported, the three compared for this machine: Gray
// (the codes of the detector's state table: 000, 001, 011, 010, 110), plain
// binary (S_i encoded as i, a choice of this design) and one-hot (S_i encoded
// as bit i set, also a choice of this design). Codes are returned
// right-aligned in a 5-bit field; only the low state_bits() bits are used.
package sec1_pkg;

  typedef enum logic [1:0] {
    ENC_GRAY   = 2'd0,
    ENC_BINARY = 2'd1,
    ENC_ONEHOT = 2'd2
  } enc_e;

  localparam int MAX_BITS   = 5;

  typedef logic [MAX_BITS-1:0] code_t;

  // Number of state bits an encoding needs.
  function automatic int state_bits(input enc_e enc);
    return (enc == ENC_ONEHOT) ? 5 : 3;
  endfunction

  // Code of state S_idx (idx = 0..4) under an encoding.
  function automatic code_t state_code(input enc_e enc, input int idx);
    code_t c;
    case (enc)
      ENC_BINARY: c = code_t'(idx);
      ENC_ONEHOT: c = code_t'(1) << idx;
      default: begin
        case (idx)
          0: c = 5'b00000;
          1: c = 5'b00001;
          2: c = 5'b00011;
          3: c = 5'b00010;
          default: c = 5'b00110;
        endcase
      end
    endcase
    return c;
  endfunction

endpackage
