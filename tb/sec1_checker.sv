// sec1_checker: stimulus and checking for the self-correcting sec1 detector,
// shared by the end-to-end testbenches.
//
// Drives random input symbols (biased towards ones so that the pattern 1101
// occurs often) and, in random cycles, injects errors through the design's
// error-inserter port: single flips of a state bit, of a parity bit or of the
// overall parity bit, and double flips. Inputs change on the falling clock
// edge; outputs are checked one time unit before the rising edge. Two
// references are used:
//  * a state-level model built from the state table and codes written out
//    here, with the stored word's parity computed by the positional method
//    (XOR of the positions of all set bits is zero). With at most one flipped
//    bit the corrected state must equal the model's, in the same cycle; with
//    two the double-error flag must rise and the state must be passed on
//    unchanged (an illegal code then leads to S0);
// With DED = 0 (overall bit ignored) only single errors are injected.
//  * the detector's function itself: y must be 1 exactly when the last four
//    inputs were 1,1,0,1, counted from the last reset or double error.
// The asynchronous reset is also pulsed in the middle of a clock period.
// Counters of each mechanism are reported so the caller can check that each
// happened. done rises when NCYC cycles have been run.
module sec1_checker #(
  parameter sec1_pkg::enc_e ENC  = sec1_pkg::ENC_GRAY,
  parameter int             NCYC = 20000,
  parameter bit             DED  = 1'b1
) (
  output int checks,
  output int failures,
  output int n_single_data,   // single flip of a state bit, corrected
  output int n_single_par,    // single flip of a parity bit
  output int n_overall,       // flip of the overall parity bit only
  output int n_double,        // double flip detected
  output int n_illegal,       // recovery from an illegal state
  output int n_detect,        // cycles with y = 1
  output int n_reset,         // asynchronous resets during the run
  output bit done
);
  localparam int N = sec1_pkg::state_bits(ENC);
  localparam int P = (N == 3) ? 3 : 4;
  localparam int W = N + P + 1;

  localparam int NXT0[5] = '{0, 0, 3, 0, 0};
  localparam int NXT1[5] = '{1, 2, 2, 4, 2};
  localparam logic [4:0] GRAY[5]   = '{5'b000, 5'b001, 5'b011, 5'b010, 5'b110};
  localparam logic [4:0] BIN[5]    = '{5'd0, 5'd1, 5'd2, 5'd3, 5'd4};
  localparam logic [4:0] ONEHOT[5] = '{5'b00001, 5'b00010, 5'b00100, 5'b01000, 5'b10000};

  logic clk = 1'b0, rst_n, x, y, inject;
  logic [W-1:0] err_mask;
  logic [N-1:0] state_out;
  logic [P-1:0] syndrome;
  logic e1, e2, eo;

  if (ENC == sec1_pkg::ENC_GRAY && DED) begin : g_default
    sec1_selfcorr u_dut (
      .clk(clk), .rst_n(rst_n), .x(x), .y(y), .inject(inject), .err_mask(err_mask),
      .state_out(state_out), .syndrome(syndrome),
      .err_single(e1), .err_double(e2), .err_overall(eo));
  end else if (ENC == sec1_pkg::ENC_GRAY) begin : g_noded
    sec1_selfcorr #(.DED(DED)) u_dut (
      .clk(clk), .rst_n(rst_n), .x(x), .y(y), .inject(inject), .err_mask(err_mask),
      .state_out(state_out), .syndrome(syndrome),
      .err_single(e1), .err_double(e2), .err_overall(eo));
  end else begin : g_enc
    sec1_selfcorr #(.ENC(ENC), .DED(DED)) u_dut (
      .clk(clk), .rst_n(rst_n), .x(x), .y(y), .inject(inject), .err_mask(err_mask),
      .state_out(state_out), .syndrome(syndrome),
      .err_single(e1), .err_double(e2), .err_overall(eo));
  end

  always #5 clk = ~clk;

  function automatic logic [4:0] code_of(input int s);
    case (ENC)
      sec1_pkg::ENC_BINARY: return BIN[s];
      sec1_pkg::ENC_ONEHOT: return ONEHOT[s];
      default:              return GRAY[s];
    endcase
  endfunction

  function automatic int state_of(input logic [4:0] c);
    for (int s = 0; s < 5; s++) if (code_of(s) == c) return s;
    return -1;
  endfunction

  function automatic int dpos(input int i);
    int c = -1;
    for (int q = 1; q < 32; q++)
      if ((q & (q - 1)) != 0) begin
        c++;
        if (c == i) return q;
      end
    return -1;
  endfunction

  // Stored word {overall, parity, state} of a state code.
  function automatic logic [W-1:0] word_of(input logic [4:0] c);
    int s = 0;
    logic [P-1:0] p;
    for (int i = 0; i < N; i++) if (c[i]) s ^= dpos(i);
    p = P'(s);
    return {^{c[N-1:0], p}, p, c[N-1:0]};
  endfunction

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL enc=%0d t=%0t: %s", ENC, $time, what);
    end
  endtask

  initial begin
    int st, hist, hlen, nflip, a, b, r, seen, elapsed;
    logic [N-1:0] code, exp_corr;
    checks = 0; failures = 0; done = 1'b0;
    n_single_data = 0; n_single_par = 0; n_overall = 0; n_double = 0;
    n_illegal = 0; n_detect = 0; n_reset = 0;
    rst_n = 1'b0; x = 1'b0; inject = 1'b0; err_mask = '0;
    #12 rst_n = 1'b1;
    st = 0; hist = 0; hlen = 0;
    for (int t = 0; t < NCYC; t++) begin
      @(negedge clk);
      // Occasional asynchronous reset in mid-period, with an upset injected.
      elapsed = 0;
      if (t % 3001 == 1500) begin
        inject = 1'b1; err_mask = '0; err_mask[0] = 1'b1;
        #1 rst_n = 1'b0; #1;
        check("reset to S0", state_out == N'(code_of(0)) && e1 && !e2 && !eo);
        inject = 1'b0;
        rst_n = 1'b1;
        elapsed = 2;
        n_reset++;
        st = 0; hist = 0; hlen = 0;
      end
      // Inputs and error injection for this cycle.
      x = ($urandom_range(99) < 65);
      r = $urandom_range(99);
      err_mask = '0;
      nflip = 0;
      if (r < 25) begin
        a = $urandom_range(W - 1);
        err_mask[a] = 1'b1;
        nflip = 1;
      end else if (r < 30 && DED) begin
        a = $urandom_range(W - 1);
        b = (a + 1 + $urandom_range(W - 2)) % W;
        err_mask[a] = 1'b1;
        err_mask[b] = 1'b1;
        nflip = 2;
      end
      inject = (nflip != 0);
      // Check one time unit before the rising edge.
      #(4 - elapsed);
      code = N'(code_of(st));
      exp_corr = (nflip == 2) ? (code ^ err_mask[N-1:0]) : code;
      seen = state_of(5'(exp_corr));
      check("corrected state", state_out == exp_corr);
      check("syndrome zero without error", nflip != 0 || syndrome == '0);
      check("single flag", e1 == (nflip == 1 && !err_mask[W-1]));
      check("overall flag", eo == (nflip == 1 && err_mask[W-1] && DED));
      check("double flag", e2 == (nflip == 2));
      check("output y", y == (seen == 4));
      if (nflip == 1 && err_mask[N-1:0] != '0) n_single_data++;
      if (nflip == 1 && err_mask[N+P-1:N] != '0) n_single_par++;
      if (nflip == 1 && err_mask[W-1]) n_overall++;
      if (nflip == 2) n_double++;
      if (nflip == 2 && seen < 0) n_illegal++;
      if (y) n_detect++;
      // Function check: y is 1 after the inputs 1,1,0,1.
      if (nflip == 2) begin
        hist = 0; hlen = 0;
      end else begin
        if (hlen >= 4) check("y means last inputs were 1101", y == ((hist & 15) == 13));
        hist = (hist << 1) | int'(x);
        hlen++;
      end
      // Model update at the rising edge.
      if (seen < 0) st = 0;
      else st = x ? NXT1[seen] : NXT0[seen];
    end
    @(negedge clk);
    done = 1'b1;
  end
endmodule
