// circuit_p -- first-level combinational circuit P of a multi-level Mealy FSM.
//
// Every line h of a (transformed) direct structural table is given as a
// current-state code, an input cube (care mask + value) and the set of
// p-functions that line switches on. The circuit forms the term
//   F_h = A_m(q) & X_h(x)
// for every line and ORs, for each output bit, the terms whose line carries
// that bit (the sum-of-products form of the structural-table equations). The
// same circuit therefore serves every structure: the output vector holds
// microoperations y, microinstruction codes z, multiple codes psi, internal
// state codes tau or excitation functions D, depending on the table passed in.
//
// The table is a set of parameter arrays; the FSM-specific tables live in the
// packages s1_pkg and s2_pkg. Bit W-1 of every vector is the variable with
// index 1 in the usual notation (x1, Q1, y1, ...), so a KISS2 cube such as
// "01-" reads left to right as x1 x2 x3.
//
// The defaults are the single-level circuit of the example machine S1 (all
// R + N = 8 functions y1..y5, D1..D3 from its 13-line table).
//
// Purely combinational, no clock. Evaluating the table line by line instead
// of hand-minimised equations is a choice of this design; logic synthesis
// minimises the sum of products anyway.
module circuit_p #(
  parameter int unsigned L = s1_pkg::L,         // number of inputs x
  parameter int unsigned R = s1_pkg::R,         // number of state variables Q
  parameter int unsigned W = s1_pkg::N + s1_pkg::R, // number of p-functions
  parameter int unsigned H = s1_pkg::H,         // number of table lines
  parameter logic [R-1:0] ROW_Q    [H] = s1_pkg::S1_Q,
  parameter logic [L-1:0] ROW_MASK [H] = s1_pkg::S1_MASK,
  parameter logic [L-1:0] ROW_VAL  [H] = s1_pkg::S1_VAL,
  parameter logic [W-1:0] ROW_OUT  [H] = s1_pkg::P_P
) (
  input  logic [L-1:0] x,
  input  logic [R-1:0] q,
  output logic [W-1:0] f
);

  logic [H-1:0] term;  // F_h for every line

  always_comb begin
    for (int unsigned h = 0; h < H; h++)
      term[h] = (q == ROW_Q[h]) && ((x & ROW_MASK[h]) == (ROW_VAL[h] & ROW_MASK[h]));
  end

  always_comb begin
    f = '0;
    for (int unsigned h = 0; h < H; h++)
      if (term[h]) f = f | ROW_OUT[h];
  end

endmodule
