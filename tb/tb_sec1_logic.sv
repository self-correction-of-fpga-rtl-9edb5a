// tb_sec1_logic: self-checking test of the detector's combinational circuit
// for all three encodings. Every present-state code and input value is
// applied; legal codes must give the next state and output of the state
// table, illegal codes must give S0 and output 0. The table is written here
// as lists of state numbers and code lists, independently of the design.
module tb_sec1_logic;
  // Next state number for x = 0 and x = 1, and Moore output, per state.
  localparam int NXT0[5] = '{0, 0, 3, 0, 0};
  localparam int NXT1[5] = '{1, 2, 2, 4, 2};
  localparam bit YOUT[5] = '{0, 0, 0, 0, 1};
  localparam logic [4:0] GRAY[5]   = '{5'b000, 5'b001, 5'b011, 5'b010, 5'b110};
  localparam logic [4:0] BIN[5]    = '{5'd0, 5'd1, 5'd2, 5'd3, 5'd4};
  localparam logic [4:0] ONEHOT[5] = '{5'b00001, 5'b00010, 5'b00100, 5'b01000, 5'b10000};

  logic [2:0] sg, ng, sb, nb;
  logic [4:0] so, no;
  logic x, yg, yb, yo;
  int checks = 0, failures = 0;

  sec1_logic                                 u_gray   (.state(sg), .x(x), .next_state(ng), .y(yg));
  sec1_logic #(.ENC(sec1_pkg::ENC_BINARY))   u_binary (.state(sb), .x(x), .next_state(nb), .y(yb));
  sec1_logic #(.ENC(sec1_pkg::ENC_ONEHOT))   u_onehot (.state(so), .x(x), .next_state(no), .y(yo));

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int lookup(input logic [4:0] c, input logic [4:0] codes [5]);
    for (int i = 0; i < 5; i++) if (codes[i] == c) return i;
    return -1;
  endfunction

  task automatic expect_next(input string enc, input logic [4:0] code, input logic xv,
                             input logic [4:0] codes [5], input logic [4:0] got_n, input logic got_y);
    int s = lookup(code, codes);
    logic [4:0] en = codes[0];
    logic       ey = 1'b0;
    if (s >= 0) begin
      en = codes[xv ? NXT1[s] : NXT0[s]];
      ey = YOUT[s];
    end
    check($sformatf("%s code %b x=%b next", enc, code, xv), got_n == en);
    check($sformatf("%s code %b x=%b y", enc, code, xv), got_y == ey);
  endtask

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++)
      for (int xv = 0; xv < 2; xv++) begin
        x = xv[0]; so = 5'(v); sg = 3'(v); sb = 3'(v); #1;
        expect_next("onehot", so, x, ONEHOT, no, yo);
        if (v < 8) begin
          expect_next("gray", 5'(sg), x, GRAY, 5'(ng), yg);
          expect_next("binary", 5'(sb), x, BIN, 5'(nb), yb);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
