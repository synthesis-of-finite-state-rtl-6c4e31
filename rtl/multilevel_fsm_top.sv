// multilevel_fsm_top -- the seven multi-level structures of the example Mealy
// FSM S1 side by side, and the PAY_S / PAY_SC fragments of FSM S2.
//
// All seven S1 machines (PY0, PA, PAY, PYY, PAY0, PAY_S, PAY_SC) implement the
// same state transition and output table and share clock, reset and inputs,
// so in a correct design their states always agree and their microoperations
// agree (PA's are combinational, the others registered by a memory block on
// the falling edge). Each machine's outputs are brought out separately so
// that they can be compared, which is how the structures are verified
// against a behavioural model of the machine.
//
// The S2 fragments cover only the transitions leaving a5, a6 and a7 of S2;
// they have their own inputs s2_x and current-state code s2_q and give y and
// the next-state code d.
//
// Timing: registers change on the rising edge of clk, memory blocks on the
// falling edge; res is asynchronous and active high.
module multilevel_fsm_top
  import s1_pkg::N, s1_pkg::R, s1_pkg::L;
(
  input  logic         clk,
  input  logic         res,
  input  logic [L-1:0] x,
  output logic [N-1:0] y_py0,  y_pa,  y_pay,  y_pyy,  y_pay0,  y_pays,  y_paysc,
  output logic [R-1:0] q_py0,  q_pa,  q_pay,  q_pyy,  q_pay0,  q_pays,  q_paysc,
  input  logic [7:0]   s2_x,
  input  logic [3:0]   s2_q,
  output logic [4:0]   s2s_y,  s2sc_y,
  output logic [3:0]   s2s_d,  s2sc_d
);

  s1_py0   u_py0   (.clk, .res, .x, .y(y_py0),   .q(q_py0));
  s1_pa    u_pa    (.clk, .res, .x, .y(y_pa),    .q(q_pa));
  s1_pay   u_pay   (.clk, .res, .x, .y(y_pay),   .q(q_pay));
  s1_pyy   u_pyy   (.clk, .res, .x, .y(y_pyy),   .q(q_pyy));
  s1_pay0  u_pay0  (.clk, .res, .x, .y(y_pay0),  .q(q_pay0));
  s1_pays  u_pays  (.clk, .res, .x, .y(y_pays),  .q(q_pays));
  s1_paysc u_paysc (.clk, .res, .x, .y(y_paysc), .q(q_paysc));

  s2_pays_frag  u_s2s  (.clk, .x(s2_x), .q(s2_q), .y(s2s_y),  .d(s2s_d));
  s2_paysc_frag u_s2sc (.clk, .x(s2_x), .q(s2_q), .y(s2sc_y), .d(s2sc_d));

endmodule
