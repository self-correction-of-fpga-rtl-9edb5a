// tb_code_corrector: self-checking test of the SEC-DED code corrector.
//
// Five instances are tested: 11 state bits (the default), 3 bits (the size of
// the Gray/binary detector), 10 bits (the size of the worked bit-position
// example), 3 bits with double-error detection disabled, and 120 bits (the
// largest size). The reference builds each code word in positional form:
// data bits at the positions that are not powers of two, parity bit p_k at
// position 2^k, chosen so that the XOR of the positions of all set bits is
// zero. The syndrome of a corrupted word is then the XOR of the positions of
// its set bits. This method is independent of the group tables the design
// uses. Small sizes are tested exhaustively over all states with no, every
// single and every double bit error; the 120-bit instance is tested randomly.
// The corrector is combinational, so each result is checked 1 time unit after
// the inputs change (same-cycle correction).
module tb_code_corrector;
  localparam int NI = 5;
  localparam int NV[NI]   = '{11, 3, 10, 3, 120};
  localparam int PV[NI]   = '{4, 3, 4, 3, 7};
  localparam bit DEDV[NI] = '{1'b1, 1'b1, 1'b1, 1'b0, 1'b1};

  logic [119:0] st   [NI];
  logic [6:0]   par  [NI];
  logic         ovl  [NI];
  logic [119:0] corr [NI];
  logic [6:0]   syn  [NI];
  logic         e1   [NI];
  logic         e2   [NI];
  logic         eo   [NI];

  int checks = 0, failures = 0;

  for (genvar j = 0; j < NI; j++) begin : g_dut
    localparam int N = NV[j];
    localparam int P = PV[j];
    if (N < 120) begin : g_pad
      assign corr[j][119:N] = '0;
    end
    if (P < 7) begin : g_pad_s
      assign syn[j][6:P] = '0;
    end
    if (j == 0) begin : g_default
      code_corrector u_dut (
        .state(st[j][N-1:0]), .in_parity(par[j][P-1:0]), .in_overall(ovl[j]),
        .corr_state(corr[j][N-1:0]), .syndrome(syn[j][P-1:0]),
        .err_single(e1[j]), .err_double(e2[j]), .err_overall(eo[j]));
    end else begin : g_sized
      code_corrector #(.N(N), .P(P), .DED(DEDV[j])) u_dut (
        .state(st[j][N-1:0]), .in_parity(par[j][P-1:0]), .in_overall(ovl[j]),
        .corr_state(corr[j][N-1:0]), .syndrome(syn[j][P-1:0]),
        .err_single(e1[j]), .err_double(e2[j]), .err_overall(eo[j]));
    end
  end

  // Position of data bit i by direct enumeration of non-powers of two.
  function automatic int dpos(input int i);
    int c = -1;
    for (int q = 1; q < 128; q++)
      if (!((q & (q - 1)) == 0)) begin
        c++;
        if (c == i) return q;
      end
    return -1;
  endfunction

  // Parity bits of data d (n bits, p parity bits), positional construction.
  function automatic logic [6:0] ref_parity(input logic [119:0] d, input int n, input int p);
    int s = 0;
    logic [6:0] r = '0;
    for (int i = 0; i < n; i++) if (d[i]) s ^= dpos(i);
    // Setting parity bit at 2^k for each 1 in s makes the XOR of positions zero.
    for (int k = 0; k < p; k++) r[k] = s[k];
    return r;
  endfunction

  task automatic check(input int j, input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL inst %0d (N=%0d): %s", j, NV[j], what);
    end
  endtask

  // Apply a stored word {ov, par, d} with flips given as a W-bit vector and
  // compare against the positional reference decoder.
  task automatic apply(input int j, input logic [119:0] d, input logic [127:0] flips);
    int n = NV[j], p = PV[j];
    logic [6:0]   pr;
    logic [119:0] dc;
    logic [6:0]   pc;
    logic         oc;
    int           s, nflip;
    logic         odd;
    logic [119:0] exp_corr;
    logic         exp_e1, exp_e2, exp_eo;
    pr = ref_parity(d, n, p);
    dc = d ^ flips[119:0];
    for (int i = n; i < 120; i++) dc[i] = 1'b0;
    pc = '0;
    for (int k = 0; k < p; k++) pc[k] = pr[k] ^ flips[n + k];
    oc = (^d[119:0]) ^ (^pr) ^ flips[n + p];
    st[j] = dc; par[j] = pc; ovl[j] = oc;
    #1;
    // Reference syndrome: XOR of positions of all set bits.
    s = 0;
    for (int i = 0; i < n; i++) if (dc[i]) s ^= dpos(i);
    for (int k = 0; k < p; k++) if (pc[k]) s ^= (1 << k);
    odd = (^dc) ^ (^pc) ^ oc;
    nflip = 0;
    for (int b = 0; b < n + p + 1; b++) if (flips[b]) nflip++;
    exp_corr = dc;
    exp_e1 = 1'b0; exp_e2 = 1'b0; exp_eo = 1'b0;
    if (s != 0 && (odd || !DEDV[j])) begin
      exp_e1 = 1'b1;
      for (int i = 0; i < n; i++) if (dpos(i) == s) exp_corr[i] = ~exp_corr[i];
    end else if (s != 0) exp_e2 = 1'b1;
    else if (odd && DEDV[j]) exp_eo = 1'b1;
    check(j, "syndrome", int'(syn[j]) == s);
    check(j, "corrected state", corr[j] == exp_corr);
    check(j, "single flag", e1[j] == exp_e1);
    check(j, "double flag", e2[j] == exp_e2);
    check(j, "overall flag", eo[j] == exp_eo);
    // Direct expectations that do not depend on the reference decoder.
    if (nflip <= 1) check(j, "no/single error restored", corr[j] == d);
    if (nflip == 2 && DEDV[j]) check(j, "double detected, not changed",
                                     e2[j] && corr[j] == dc && !e1[j]);
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < NI; j++) begin
      st[j] = '0; par[j] = '0; ovl[j] = 1'b0;
    end
    #1;
    // Worked example: 10 data bits, all zero, the bit at position 3 read as 1.
    st[2] = 120'd1; par[2] = '0; ovl[2] = 1'b0;
    #1;
    check(2, "example syndrome 0011", syn[2] == 7'd3);
    check(2, "example corrected to zero", corr[2] == '0 && e1[2]);

    // Exhaustive sizes.
    for (int j = 0; j < 4; j++) begin
      int n = NV[j], w = NV[j] + PV[j] + 1;
      for (int v = 0; v < (1 << n); v++) begin
        logic [119:0] d = 120'(v);
        apply(j, d, '0);
        for (int a = 0; a < w; a++) begin
          apply(j, d, 128'(1) << a);
          for (int b = a + 1; b < w; b++) apply(j, d, (128'(1) << a) | (128'(1) << b));
        end
      end
    end
    // 120-bit instance, random data and flips.
    for (int t = 0; t < 3000; t++) begin
      logic [119:0] d = {$urandom, $urandom, $urandom, $urandom};
      int a = $urandom_range(127), b = $urandom_range(127);
      d = d & {120{1'b1}};
      apply(4, d, '0);
      apply(4, d, 128'(1) << a);
      if (a != b) apply(4, d, (128'(1) << a) | (128'(1) << b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
