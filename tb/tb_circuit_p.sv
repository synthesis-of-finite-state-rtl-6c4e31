// tb_circuit_p -- self-checking testbench of the generic first-level circuit P.
//
// Gives the circuit a small four-line table over L=4 inputs and R=2 state
// bits (two lines share a state, one line has no input condition, lines of
// different states set overlapping output bits) and checks all 64
// combinations of state and inputs against sum-of-products equations
// written out by hand for that table. The circuit is combinational, so the
// outputs are checked 1 ns after each change.
`timescale 1ns/1ps
module tb_circuit_p;

  localparam int unsigned L = 4, R = 2, W = 3, H = 4;
  // line 1: Q=00, x = 1-0-  -> f = 100
  // line 2: Q=00, x = 0---  -> f = 011
  // line 3: Q=01, x = --11  -> f = 110
  // line 4: Q=10, (always)  -> f = 001
  localparam logic [R-1:0] TQ [H] = '{2'b00, 2'b00, 2'b01, 2'b10};
  localparam logic [L-1:0] TM [H] = '{4'b1010, 4'b1000, 4'b0011, 4'b0000};
  localparam logic [L-1:0] TV [H] = '{4'b1000, 4'b0000, 4'b0011, 4'b0000};
  localparam logic [W-1:0] TO [H] = '{3'b100, 3'b011, 3'b110, 3'b001};

  logic [L-1:0] x;
  logic [R-1:0] q;
  logic [W-1:0] f;
  int checks = 0, failures = 0;

  circuit_p #(.L(L), .R(R), .W(W), .H(H), .ROW_Q(TQ), .ROW_MASK(TM), .ROW_VAL(TV), .ROW_OUT(TO))
    dut (.x(x), .q(q), .f(f));

  function automatic logic [W-1:0] expected(logic [R-1:0] qq, logic [L-1:0] xx);
    logic q1, q2, x1, x2, x3, x4, f1, f2, f3;
    {q1, q2} = qq;
    {x1, x2, x3, x4} = xx;
    f1 = (!q1 && !q2 && x1 && !x3) || (!q1 && q2 && x3 && x4);
    f2 = (!q1 && !q2 && !x1)       || (!q1 && q2 && x3 && x4);
    f3 = (!q1 && !q2 && !x1)       || (q1 && !q2);
    return {f1, f2, f3};
  endfunction

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      {q, x} = 6'(i);
      #1;
      checks++;
      if (f !== expected(q, x)) begin
        failures++;
        $display("FAIL q=%b x=%b f=%b want %b", q, x, f, expected(q, x));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
