// s1_pays -- FSM S1 in the PAY_S structure (shared multiple encoding of
// microinstructions and internal states).
//
// Each transition is named by an identifier I = <next state, microinstruction>.
// Identifiers leaving one current state are numbered separately, so one code
// psi of R3 = ceil(log2 U0) = 2 bits names both the microinstruction and the
// next state once the current state is known. Circuit P therefore produces
// only R3 = 2 functions. Decoder Y (address {Q, psi}) gives y1..y5 and the
// code converter CC (address {Q, psi}) gives D for register RG. For S1 all
// identifiers leaving a state differ, so both decoders use the whole of psi.
//
// Interface: clk, res (asynchronous, active high, to a1), x[2:0] = x1 x2 x3,
// y[4:0] = y1..y5, q[2:0] = Q1 Q2 Q3.
// Timing: both memory blocks are read on the falling edge; RG loads D on the
// rising edge; y is held from that falling edge for one cycle.
// The identifier codes (numbered in table order within each state) are this
// design's choice; the published method does not list them for S1.
module s1_pays
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

  memory_decoder #(.AW(R+R3), .DW(N), .CONTENT(PAYS_Y_ROM))
    u_y (.clk(clk), .addr({q, psi}), .data(y));

  memory_decoder #(.AW(R+R3), .DW(R), .CONTENT(PAYS_CC_ROM))
    u_cc (.clk(clk), .addr({q, psi}), .data(d));

  register_rg #(.R(R), .RESET_CODE(A1)) u_rg (.clk(clk), .res(res), .d(d), .q(q));

endmodule
