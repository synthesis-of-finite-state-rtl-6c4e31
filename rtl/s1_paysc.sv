// s1_paysc -- FSM S1 in the PAY_SC structure (shared multiple encoding with a
// common decoder).
//
// Circuit P is the one of PAY_S: it produces the R3 = 2 bit identifier code
// psi of the transition within the current state. A single memory block YCC,
// addressed by {Q, psi}, holds for every transition both the microoperations
// y1..y5 and the excitation functions D1..D3, so no special encoding of the
// identifiers is needed. Register RG loads D.
//
// Interface: clk, res (asynchronous, active high, to a1), x[2:0] = x1 x2 x3,
// y[4:0] = y1..y5, q[2:0] = Q1 Q2 Q3.
// Timing: YCC is read on the falling edge; RG loads D on the next rising
// edge; y is held from that falling edge for one cycle.
// Identifier codes as in s1_pays (this design's choice).
module s1_paysc
  import s1_pkg::*;
(
  input  logic         clk,
  input  logic         res,
  input  logic [L-1:0] x,
  output logic [N-1:0] y,
  output logic [R-1:0] q
);

  logic [R3-1:0] psi;
  logic [R-1:0]  d;

  circuit_p #(.L(L), .R(R), .W(R3), .H(H),
              .ROW_Q(S1_Q), .ROW_MASK(S1_MASK), .ROW_VAL(S1_VAL), .ROW_OUT(S1_ID))
    u_p (.x(x), .q(q), .f(psi));

  memory_decoder #(.AW(R+R3), .DW(N+R), .CONTENT(PAYSC_YCC_ROM))
    u_ycc (.clk(clk), .addr({q, psi}), .data({y, d}));

  register_rg #(.R(R), .RESET_CODE(A1)) u_rg (.clk(clk), .res(res), .d(d), .q(q));

endmodule
