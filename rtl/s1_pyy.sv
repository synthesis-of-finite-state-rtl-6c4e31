// s1_pyy -- FSM S1 in the PYY structure (multiple encoding of internal states,
// the executed microinstruction as the partitioning set).
//
// The next states reached while a given microinstruction Y_t is executed are
// numbered separately, so tau needs only R2 = ceil(log2 M0Y) = 1 bit;
// K(a_s) = K_t(a_s) * K(Y_t). Circuit P produces the microinstruction code z
// (N1 = 3 bits) and tau: N1 + R2 = 4 functions. Decoder Y (address z) gives
// y1..y5; the code converter CC (address {z, tau}) gives D for register RG.
// The converter needs no state code at all.
//
// Interface: clk, res (asynchronous, active high, to a1), x[2:0] = x1 x2 x3,
// y[4:0] = y1..y5, q[2:0] = Q1 Q2 Q3.
// Timing: both memory blocks are read on the falling edge; RG loads D on the
// rising edge; y is held from that falling edge for one cycle.
// Codes under Y3 = {y2}: a3 = 0, a4 = 1, as in the converter table of the
// published method (its structural table omits tau on two of those lines).
module s1_pyy
  import s1_pkg::*;
(
  input  logic         clk,
  input  logic         res,
  input  logic [L-1:0] x,
  output logic [N-1:0] y,
  output logic [R-1:0] q
);

  logic [N1-1:0] z;
  logic [R2-1:0] tau;
  logic [R-1:0]  d;

  circuit_p #(.L(L), .R(R), .W(N1+R2), .H(H),
              .ROW_Q(S1_Q), .ROW_MASK(S1_MASK), .ROW_VAL(S1_VAL), .ROW_OUT(PYY_P))
    u_p (.x(x), .q(q), .f({z, tau}));

  memory_decoder #(.AW(N1), .DW(N), .CONTENT(PY_Y_ROM))
    u_y (.clk(clk), .addr(z), .data(y));

  memory_decoder #(.AW(N1+R2), .DW(R), .CONTENT(PYY_CC_ROM))
    u_cc (.clk(clk), .addr({z, tau}), .data(d));

  register_rg #(.R(R), .RESET_CODE(A1)) u_rg (.clk(clk), .res(res), .d(d), .q(q));

endmodule
