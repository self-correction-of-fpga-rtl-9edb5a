// tb_fsm_register: self-checking test of the state register.
// Checks the asynchronous active-low reset (taking effect without a clock
// edge and loading the reset value), and that random data is loaded on each
// rising edge and held in between.
module tb_fsm_register;
  localparam logic [6:0] RV = 7'b1011001;
  logic clk = 1'b0, rst_n;
  logic [6:0] d, q;
  int checks = 0, failures = 0;

  fsm_register #(.W(7), .RESET_VALUE(RV)) u_dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s d=%b q=%b", what, d, q);
    end
  endtask

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] prev;
    rst_n = 1'b1; d = '0;
    #2 rst_n = 1'b0; #1;
    check("async reset value", q == RV);
    @(posedge clk); #1;
    check("held in reset", q == RV);
    rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk); d = 7'($urandom); prev = q;
      #2; check("holds between edges", q == prev);
      @(posedge clk); #1;
      check("loads on edge", q == d);
      if (t % 97 == 50) begin
        #1 rst_n = 1'b0; #1;
        check("async reset mid-cycle", q == RV);
        #1 rst_n = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
