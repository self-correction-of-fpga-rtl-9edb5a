// tb_sec1_selfcorr: end-to-end test of the self-correcting detector with the
// default (Gray-encoded) configuration and all parameters at their defaults.
// 20000 clock cycles of random input with random single and double bit errors
// injected on the register read path (see sec1_checker). Fails if any check
// fails or if any of these never happened: a corrected state-bit error, a
// parity-bit error, an overall-parity-bit error, a detected double error, a
// recovery from an illegal state, a detected 1101 sequence, an asynchronous
// reset.
module tb_sec1_selfcorr;
  int checks, failures;
  int n_single_data, n_single_par, n_overall, n_double, n_illegal, n_detect, n_reset;
  bit done;

  sec1_checker u_chk (
    .checks(checks), .failures(failures),
    .n_single_data(n_single_data), .n_single_par(n_single_par), .n_overall(n_overall),
    .n_double(n_double), .n_illegal(n_illegal), .n_detect(n_detect), .n_reset(n_reset),
    .done(done));

  initial begin
    #1_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int c, f;
    wait (done);
    c = checks; f = failures;
    $display("state-bit corrections %0d, parity-bit errors %0d, overall-bit errors %0d",
             n_single_data, n_single_par, n_overall);
    $display("double errors %0d (illegal states %0d), detections %0d, resets %0d",
             n_double, n_illegal, n_detect, n_reset);
    c += 7;
    if (n_single_data == 0) f++;
    if (n_single_par == 0) f++;
    if (n_overall == 0) f++;
    if (n_double == 0) f++;
    if (n_illegal == 0) f++;
    if (n_detect == 0) f++;
    if (n_reset == 0) f++;
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end
endmodule
