// tb_s1_pays -- self-checking testbench of FSM S1 in the PAY_S structure.
//
// Drives random inputs for NCYC cycles and compares, cycle by cycle, the
// state code and the microoperations of the structure with the behavioural
// reference s1_ref_pkg::s1_step. Inputs change 1 ns after the rising edge.
// The state is checked after each rising edge; y is checked just after the
// falling edge, where the memory block registers it (or, for a structure
// whose y is combinational, where it must already be settled). For
// registered outputs the latency is checked too: just before the falling
// edge y must still show the previous transition. An asynchronous reset is
// applied in the middle of a cycle several times. Every one of the 13
// transitions of S1 must be taken at least once.
`timescale 1ns/1ps
module tb_s1_pays;
  import s1_ref_pkg::*;

  localparam int NCYC = 2000;
  localparam bit REGISTERED_Y = 1;

  logic       clk = 1'b0;
  logic       res = 1'b1;
  logic [2:0] x   = '0;
  logic [4:0] y;
  logic [2:0] q;

  int checks = 0, failures = 0;
  int line_hits [1:13];
  int resets = 0;

  s1_state_e ref_s = S_A1;
  s1_step_t  st;
  logic [4:0] prev_y = '0;
  bit prev_valid = 1'b0;

  s1_pays dut (.clk(clk), .res(res), .x(x), .y(y), .q(q));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  initial begin : watchdog
    #(10 * (NCYC + 100));
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (line_hits[i]) line_hits[i] = 0;
    // reset across two falling edges so every memory block is read once
    repeat (2) @(posedge clk);
    #1 res = 1'b0;
    check(q == 3'b000, "state after reset is a1");
    for (int c = 0; c < NCYC; c++) begin
      // one asynchronous reset in the middle of a cycle every 300 cycles
      if (c % 300 == 150) begin
        #2 res = 1'b1;
        #1 check(q == 3'b000, "asynchronous reset forces a1");
        ref_s = S_A1; resets++;
        @(posedge clk); @(posedge clk); #1 res = 1'b0;
        prev_valid = 1'b0;
      end
      // x is already applied (1 ns after the rising edge)
      x = 3'($urandom);
      st = s1_step(ref_s, x);
      #3;  // 1 ns before the falling edge
      if (REGISTERED_Y && prev_valid) check(y == prev_y, "y held until the falling edge");
      @(negedge clk);
      #1;
      check(y == st.y, $sformatf("y in state %s x=%b: got %b want %b", ref_s.name(), x, y, st.y));
      line_hits[st.line]++;
      prev_y = st.y; prev_valid = 1'b1;
      @(posedge clk);
      ref_s = st.next;
      #1;
      check(q == ref_s, $sformatf("state: got %b want %b", q, ref_s));
    end
    foreach (line_hits[i]) check(line_hits[i] > 0, $sformatf("transition %0d taken", i));
    check(resets > 0, "asynchronous reset exercised");
    $display("transitions taken per line:");
    foreach (line_hits[i]) $display("  line %0d: %0d", i, line_hits[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
