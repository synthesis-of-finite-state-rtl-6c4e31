// s1_pay0 -- FSM S1 in the PAY0 structure (multiple encoding of both
// microinstructions and internal states, current states as the partitioning
// set).
//
// Circuit P produces only the per-state microinstruction code psi (N2 = 2
// bits) and the per-state next-state code tau (R1 = 2 bits): R1 + N2 = 4
// functions, half of a single-level machine. Decoder Y (address {Q, psi})
// gives y1..y5; the code converter CC (address {Q, tau}) gives D for
// register RG. Both second-level tables are the ones of the PY0 and PA
// structures.
//
// Interface: clk, res (asynchronous, active high, to a1), x[2:0] = x1 x2 x3,
// y[4:0] = y1..y5, q[2:0] = Q1 Q2 Q3.
// Timing: both memory blocks are read on the falling edge; RG loads D on the
// rising edge; y is held from that falling edge for one cycle. The
// four-block organisation (P, RG, Y, CC) follows the published method.
module s1_pay0
  import s1_pkg::*;
(
  input  logic         clk,
  input  logic         res,
  input  logic [L-1:0] x,
  output logic [N-1:0] y,
  output logic [R-1:0] q
);

  logic [N2-1:0] psi;
  logic [R1-1:0] tau;
  logic [R-1:0]  d;

  circuit_p #(.L(L), .R(R), .W(N2+R1), .H(H),
              .ROW_Q(S1_Q), .ROW_MASK(S1_MASK), .ROW_VAL(S1_VAL), .ROW_OUT(PAY0_P))
    u_p (.x(x), .q(q), .f({psi, tau}));

  register_rg #(.R(R), .RESET_CODE(A1)) u_rg (.clk(clk), .res(res), .d(d), .q(q));

  memory_decoder #(.AW(R+N2), .DW(N), .CONTENT(PY0_Y_ROM))
    u_y (.clk(clk), .addr({q, psi}), .data(y));

  memory_decoder #(.AW(R+R1), .DW(R), .CONTENT(PA_CC_ROM))
    u_cc (.clk(clk), .addr({q, tau}), .data(d));

endmodule
