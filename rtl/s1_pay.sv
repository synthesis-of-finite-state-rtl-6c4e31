// s1_pay -- FSM S1 in the PAY structure (multiple encoding of internal states
// by current state, plus maximal encoding of microinstructions).
//
// Circuit P produces the microinstruction code z (N1 = ceil(log2 T) = 3 bits,
// one code per distinct microinstruction of the whole machine) and the
// per-state next-state code tau (R1 = 2 bits): N1 + R1 = 5 functions.
// Decoder Y (memory block, address z) gives y1..y5; the code converter CC
// (memory block, address {Q, tau}) gives the excitation functions D for
// register RG.
//
// Interface: clk, res (asynchronous, active high, to a1), x[2:0] = x1 x2 x3,
// y[4:0] = y1..y5, q[2:0] = Q1 Q2 Q3.
// Timing: both memory blocks are read on the falling edge; RG loads D on the
// rising edge; y is registered by decoder Y and held for one cycle from the
// falling edge. The codes follow the published method (see s1_pa for the a4 codes).
module s1_pay
  import s1_pkg::*;
(
  input  logic         clk,
  input  logic         res,
  input  logic [L-1:0] x,
  output logic [N-1:0] y,
  output logic [R-1:0] q
);

  logic [N1-1:0] z;
  logic [R1-1:0] tau;
  logic [R-1:0]  d;

  circuit_p #(.L(L), .R(R), .W(N1+R1), .H(H),
              .ROW_Q(S1_Q), .ROW_MASK(S1_MASK), .ROW_VAL(S1_VAL), .ROW_OUT(PAY_P))
    u_p (.x(x), .q(q), .f({z, tau}));

  memory_decoder #(.AW(N1), .DW(N), .CONTENT(PY_Y_ROM))
    u_y (.clk(clk), .addr(z), .data(y));

  memory_decoder #(.AW(R+R1), .DW(R), .CONTENT(PA_CC_ROM))
    u_cc (.clk(clk), .addr({q, tau}), .data(d));

  register_rg #(.R(R), .RESET_CODE(A1)) u_rg (.clk(clk), .res(res), .d(d), .q(q));

endmodule
