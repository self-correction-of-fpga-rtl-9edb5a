// tb_sec1_encodings: end-to-end test of the self-correcting detector in its
// other configurations: binary encoding (3 state bits, 3 parity bits),
// one-hot encoding (5 state bits, 4 parity bits), and Gray encoding with
// double-error detection switched off (DED = 0: only single errors are
// injected, so double errors and illegal states are not required there).
// Each runs 20000 clock cycles of random input with injected bit errors (see
// sec1_checker), and each mechanism counted there must have happened at
// least once.
module tb_sec1_encodings;
  int checks [3], failures [3];
  int n_single_data [3], n_single_par [3], n_overall [3], n_double [3];
  int n_illegal [3], n_detect [3], n_reset [3];
  bit done [3];

  sec1_checker #(.ENC(sec1_pkg::ENC_BINARY)) u_binary (
    .checks(checks[0]), .failures(failures[0]),
    .n_single_data(n_single_data[0]), .n_single_par(n_single_par[0]), .n_overall(n_overall[0]),
    .n_double(n_double[0]), .n_illegal(n_illegal[0]), .n_detect(n_detect[0]), .n_reset(n_reset[0]),
    .done(done[0]));

  sec1_checker #(.ENC(sec1_pkg::ENC_ONEHOT)) u_onehot (
    .checks(checks[1]), .failures(failures[1]),
    .n_single_data(n_single_data[1]), .n_single_par(n_single_par[1]), .n_overall(n_overall[1]),
    .n_double(n_double[1]), .n_illegal(n_illegal[1]), .n_detect(n_detect[1]), .n_reset(n_reset[1]),
    .done(done[1]));

  sec1_checker #(.DED(1'b0)) u_no_ded (
    .checks(checks[2]), .failures(failures[2]),
    .n_single_data(n_single_data[2]), .n_single_par(n_single_par[2]), .n_overall(n_overall[2]),
    .n_double(n_double[2]), .n_illegal(n_illegal[2]), .n_detect(n_detect[2]), .n_reset(n_reset[2]),
    .done(done[2]));

  initial begin
    #1_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2], failures[0] + failures[1] + failures[2] + 1);
    $finish;
  end

  initial begin
    int c = 0, f = 0;
    wait (done[0] && done[1] && done[2]);
    for (int j = 0; j < 3; j++) begin
      $display("%s: state-bit corrections %0d, parity-bit errors %0d, overall-bit errors %0d, double errors %0d (illegal states %0d), detections %0d, resets %0d",
               j == 0 ? "binary" : j == 1 ? "one-hot" : "Gray, no double-error detection", n_single_data[j], n_single_par[j], n_overall[j],
               n_double[j], n_illegal[j], n_detect[j], n_reset[j]);
      c += checks[j] + 7;
      f += failures[j];
      if (n_single_data[j] == 0) f++;
      if (n_single_par[j] == 0) f++;
      if (n_overall[j] == 0) f++;
      if (j < 2 && n_double[j] == 0) f++;
      if (j < 2 && n_illegal[j] == 0) f++;
      if (n_detect[j] == 0) f++;
      if (n_reset[j] == 0) f++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end
endmodule
