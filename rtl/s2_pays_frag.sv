// s2_pays_frag -- first and second level of the PAY_S structure for the
// transitions of FSM S2 that leave states a5, a6 and a7.
//
// Circuit P turns the current state code q and the inputs x into the 3-bit
// identifier code psi of the transition taken. Because the identifiers were
// coded so that subsets of psi suffice, decoder Y reads only {q, psi1 psi2}
// and the code converter CC reads only {q, psi2 psi3}: each memory block is
// half the size it would be with the whole code. Y gives y1..y5 and CC the
// excitation functions D1..D4 (the next-state code).
//
// Only this part of S2 is defined, so the block has no state register: q is
// an input, to be driven by a register RG that loads d on the rising edge in
// a complete machine. For current states other than a5..a7 psi is 000 and
// the words read are those the tables hold for that address (zero).
//
// Interface: clk, x[7:0] = x1..x8, q[3:0] = Q1..Q4, y[4:0] = y1..y5,
// d[3:0] = D1..D4.
// Timing: both memory blocks are read on the falling edge of clk; y and d
// are valid from that edge to the next falling edge. Tables follow the published method.
module s2_pays_frag
  import s2_pkg::*;
(
  input  logic         clk,
  input  logic [L-1:0] x,
  input  logic [R-1:0] q,
  output logic [N-1:0] y,
  output logic [R-1:0] d
);

  logic [R3-1:0] psi;  // psi[2] = psi1

  circuit_p #(.L(L), .R(R), .W(R3), .H(H),
              .ROW_Q(S2_Q), .ROW_MASK(S2_MASK), .ROW_VAL(S2_VAL), .ROW_OUT(S2_ID))
    u_p (.x(x), .q(q), .f(psi));

  memory_decoder #(.AW(R+2), .DW(N), .CONTENT(PAYS_Y_ROM))
    u_y (.clk(clk), .addr({q, psi[2:1]}), .data(y));

  memory_decoder #(.AW(R+2), .DW(R), .CONTENT(PAYS_CC_ROM))
    u_cc (.clk(clk), .addr({q, psi[1:0]}), .data(d));

endmodule
