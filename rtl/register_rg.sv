// register_rg -- state register RG of a Mealy FSM.
//
// R D-type flip-flops that hold the code K(a_m) of the current state. On each
// rising clock edge they load the excitation functions D (for D flip-flops
// the next-state code). An asynchronous, active-high reset forces the code of
// the initial state a1.
//
// Interface: clk, res (asynchronous, active high), d[R-1:0] in, q[R-1:0] out;
// bit R-1 is Q1. The D flip-flop register with asynchronous reset follows the
// published method; the reset polarity is a choice of this design.
module register_rg #(
  parameter int unsigned R = 3,
  parameter logic [R-1:0] RESET_CODE = '0  // K(a1)
) (
  input  logic         clk,
  input  logic         res,
  input  logic [R-1:0] d,
  output logic [R-1:0] q
);

  always_ff @(posedge clk or posedge res) begin
    if (res) q <= RESET_CODE;
    else     q <= d;
  end

endmodule
