// s1_py0 -- FSM S1 in the PY0 structure (multiple encoding of microinstructions).
//
// The microinstructions of each current state a_m are numbered separately, so
// one code psi of only N2 = ceil(log2 T0) = 2 bits names a microinstruction
// once the current state is known; K(Y_t) = K_m(Y_t) * K(a_m). Circuit P (LUTs)
// produces psi and the excitation functions D, register RG holds the state,
// and decoder Y (a memory block) turns the address {Q, psi} into y1..y5.
// P implements R + N2 = 5 functions instead of R + N = 8 for a single-level
// machine.
//
// Interface: clk, res (asynchronous, active high, to a1), x[2:0] = x1 x2 x3,
// y[4:0] = y1..y5, q[2:0] = Q1 Q2 Q3.
// Timing: the state changes on the rising edge. Decoder Y is read on the
// falling edge, so y is the Mealy output of the transition taken at the next
// rising edge, held from that falling edge to the following one (the memory
// block is the output register). Inputs must be stable at the falling edge.
// Structure and tables follow the published method; edge polarity of reset is this
// design's choice.
module s1_py0
  import s1_pkg::*;
(
  input  logic         clk,
  input  logic         res,
  input  logic [L-1:0] x,
  output logic [N-1:0] y,
  output logic [R-1:0] q
);

  logic [N2-1:0] psi;
  logic [R-1:0]  d;

  circuit_p #(.L(L), .R(R), .W(N2+R), .H(H),
              .ROW_Q(S1_Q), .ROW_MASK(S1_MASK), .ROW_VAL(S1_VAL), .ROW_OUT(PY0_P))
    u_p (.x(x), .q(q), .f({psi, d}));

  register_rg #(.R(R), .RESET_CODE(A1)) u_rg (.clk(clk), .res(res), .d(d), .q(q));

  memory_decoder #(.AW(R+N2), .DW(N), .CONTENT(PY0_Y_ROM))
    u_y (.clk(clk), .addr({q, psi}), .data(y));

endmodule
