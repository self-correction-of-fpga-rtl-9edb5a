// tb_parity_encoder: self-checking test of the Hamming parity encoder.
//
// The default 11-bit instance is checked exhaustively against the printed
// group table for 11 state bits (one row per parity bit, state bit 10 on the
// left), applied to every state as an XOR of the selected bits. Instances of
// 3, 5 and 120 bits are checked against a positional construction: placing
// data and parity bits at their code-word positions, the XOR of the positions
// of all set bits must be zero. Every instance must also give a word of even
// overall parity. The encoder is combinational; results are read 1 time unit
// after the input changes.
module tb_parity_encoder;
  localparam logic [10:0] TABLE11 [4] = '{11'b10101011011, 11'b11001101101,
                                           11'b11110001110, 11'b11111110000};

  logic [10:0]  s11;  logic [3:0] p11; logic o11;
  logic [2:0]   s3;   logic [2:0] p3;  logic o3;
  logic [4:0]   s5;   logic [3:0] p5;  logic o5;
  logic [119:0] s120; logic [6:0] p120; logic o120;

  parity_encoder                   u_11  (.state(s11),  .parity(p11),  .overall(o11));
  parity_encoder #(.N(3),   .P(3)) u_3   (.state(s3),   .parity(p3),   .overall(o3));
  parity_encoder #(.N(5))          u_5   (.state(s5),   .parity(p5),   .overall(o5));
  parity_encoder #(.N(120))        u_120 (.state(s120), .parity(p120), .overall(o120));

  int checks = 0, failures = 0;

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int dpos(input int i);
    int c = -1;
    for (int q = 1; q < 128; q++)
      if ((q & (q - 1)) != 0) begin
        c++;
        if (c == i) return q;
      end
    return -1;
  endfunction

  // XOR of the positions of all set bits of a positional code word.
  function automatic int pos_xor(input logic [119:0] d, input int n,
                                 input logic [6:0] p, input int np);
    int s = 0;
    for (int i = 0; i < n; i++) if (d[i]) s ^= dpos(i);
    for (int k = 0; k < np; k++) if (p[k]) s ^= (1 << k);
    return s;
  endfunction

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Parity p0 of 11 bits covers state bits 0, 1, 3, 4, 6, 8 and 10.
    s11 = 11'b10101011011; #1;
    check("p0 group of 11 bits has 7 members", p11[0] == 1'b1);
    for (int v = 0; v < 2048; v++) begin
      s11 = 11'(v); #1;
      for (int k = 0; k < 4; k++)
        check($sformatf("11-bit p%0d of %0h", k, v), p11[k] == ^(s11 & TABLE11[k]));
      check("11-bit overall", ^{s11, p11, o11} == 1'b0);
    end
    for (int v = 0; v < 8; v++) begin
      s3 = 3'(v); #1;
      check($sformatf("3-bit word %0d", v), pos_xor(120'(s3), 3, 7'(p3), 3) == 0);
      check("3-bit overall", ^{s3, p3, o3} == 1'b0);
    end
    for (int v = 0; v < 32; v++) begin
      s5 = 5'(v); #1;
      check($sformatf("5-bit word %0d", v), pos_xor(120'(s5), 5, 7'(p5), 4) == 0);
      check("5-bit overall", ^{s5, p5, o5} == 1'b0);
    end
    for (int t = 0; t < 2000; t++) begin
      s120 = {$urandom, $urandom, $urandom, $urandom}; #1;
      check("120-bit word", pos_xor(s120, 120, p120, 7) == 0);
      check("120-bit overall", ^{s120, p120, o120} == 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
