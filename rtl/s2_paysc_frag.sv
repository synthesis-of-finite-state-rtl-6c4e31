// s2_paysc_frag -- first and second level of the PAY_SC structure for the
// transitions of FSM S2 that leave states a5, a6 and a7.
//
// Circuit P (the same as for PAY_S) gives the 3-bit identifier code psi of
// the transition; one common memory block YCC, addressed by {q, psi}, holds
// both the microoperations y1..y5 and the excitation functions D1..D4 of
// every transition.
//
// Only this part of S2 is defined, so the block has no state register: q is
// an input, to be driven by a register RG that loads d on the rising edge in
// a complete machine.
//
// Interface: clk, x[7:0] = x1..x8, q[3:0] = Q1..Q4, y[4:0] = y1..y5,
// d[3:0] = D1..D4.
// Timing: YCC is read on the falling edge of clk; y and d are valid from
// that edge to the next falling edge. The table follows the published method.
module s2_paysc_frag
  import s2_pkg::*;
(
  input  logic         clk,
  input  logic [L-1:0] x,
  input  logic [R-1:0] q,
  output logic [N-1:0] y,
  output logic [R-1:0] d
);

  logic [R3-1:0] psi;

  circuit_p #(.L(L), .R(R), .W(R3), .H(H),
              .ROW_Q(S2_Q), .ROW_MASK(S2_MASK), .ROW_VAL(S2_VAL), .ROW_OUT(S2_ID))
    u_p (.x(x), .q(q), .f(psi));

  memory_decoder #(.AW(R+R3), .DW(N+R), .CONTENT(PAYSC_YCC_ROM))
    u_ycc (.clk(clk), .addr({q, psi}), .data({y, d}));

endmodule
