// s1_pa -- FSM S1 in the PA structure (multiple encoding of internal states,
// current states as the partitioning set).
//
// The next states reachable from each current state a_m are numbered
// separately, so a code tau of only R1 = ceil(log2 M0) = 2 bits names the
// next state once the current state is known; K(a_s) = K_m(a_s) * K(a_m).
// Circuit P produces the microoperations y1..y5 directly and tau; the internal
// state code converter CC (a memory block) turns {Q, tau} into the
// excitation functions D, which register RG loads. P implements N + R1 = 7
// functions instead of 8.
//
// Interface: clk, res (asynchronous, active high, to a1), x[2:0] = x1 x2 x3,
// y[4:0] = y1..y5, q[2:0] = Q1 Q2 Q3.
// Timing: CC is read on the falling edge and RG loads its word on the next
// rising edge. y comes straight from circuit P and is combinational (it may
// glitch while x or Q change; this structure has no output register).
// CC table: the current state a4 uses tau = 00 for a5 and 01 for a3, the codes
// the structural table of this structure gives (one published converter table
// lists them the other way round). The published method notes that the synchronous CC
// could replace RG; RG is kept here so that all structures share one timing.
module s1_pa
  import s1_pkg::*;
(
  input  logic         clk,
  input  logic         res,
  input  logic [L-1:0] x,
  output logic [N-1:0] y,
  output logic [R-1:0] q
);

  logic [R1-1:0] tau;
  logic [R-1:0]  d;

  circuit_p #(.L(L), .R(R), .W(N+R1), .H(H),
              .ROW_Q(S1_Q), .ROW_MASK(S1_MASK), .ROW_VAL(S1_VAL), .ROW_OUT(PA_P))
    u_p (.x(x), .q(q), .f({y, tau}));

  memory_decoder #(.AW(R+R1), .DW(R), .CONTENT(PA_CC_ROM))
    u_cc (.clk(clk), .addr({q, tau}), .data(d));

  register_rg #(.R(R), .RESET_CODE(A1)) u_rg (.clk(clk), .res(res), .d(d), .q(q));

endmodule
