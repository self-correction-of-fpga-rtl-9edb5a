// tb_error_inserter: self-checking test of the fault-injection stage.
// Random words and masks are applied with inject low (word must pass
// unchanged) and high (exactly the mask's bits must be inverted). Width 7 is
// the stored word of the Gray-encoded detector.
module tb_error_inserter;
  logic [6:0] cin, msk, cout;
  logic       inj;
  int checks = 0, failures = 0;

  error_inserter u_dut (.code_in(cin), .inject(inj), .err_mask(msk), .code_out(cout));

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s cin=%b msk=%b inj=%b cout=%b", what, cin, msk, inj, cout);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      cin = 7'($urandom); msk = 7'($urandom); inj = 1'b0; #1;
      check("pass-through", cout == cin);
      inj = 1'b1; #1;
      for (int b = 0; b < 7; b++)
        check($sformatf("bit %0d", b), cout[b] == (msk[b] ? !cin[b] : cin[b]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
