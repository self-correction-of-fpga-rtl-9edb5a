// fsm_register: the FSM state register, holding the state code together with
// its parity bits.
//
// W flip-flops loaded with d on every rising clock edge. An active-low
// asynchronous reset loads RESET_VALUE, which should be the code word (state
// plus matching parity) of the initial state so that a freshly reset machine
// shows no error.
//
// Interface: clk, rst_n, d[W-1:0] in; q[W-1:0] out. Timing: one cycle.
module fsm_register #(
  parameter int unsigned    W           = 7,
  parameter logic [W-1:0]   RESET_VALUE = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= RESET_VALUE;
    else        q <= d;
  end
endmodule
