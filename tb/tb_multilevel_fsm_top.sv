// tb_multilevel_fsm_top -- end-to-end testbench of the whole design at its
// default (and only) size.
//
// Runs the seven S1 structures on one random input sequence and checks every
// cycle that each one's state code and microoperations equal the behavioural
// reference of S1 (s1_ref_pkg), so the structures also agree with each
// other. At the same time the two S2 fragments are driven with random
// inputs in states a5..a7 and checked against s2_ref_pkg.
//
// Mechanisms counted (each must occur at least once): every one of the 13
// transitions of S1; every one of the 14 transitions of the S2 fragment;
// an asynchronous reset in the middle of a run; a cycle in which the
// registered outputs of the memory-block structures held the previous
// microinstruction up to the falling edge while the combinational output of
// the PA structure already showed the new one (the output register effect).
`timescale 1ns/1ps
module tb_multilevel_fsm_top;
  import s1_ref_pkg::*;
  import s2_ref_pkg::*;

  localparam int NCYC = 3000;
  localparam int NS = 7;

  logic clk = 1'b0, res = 1'b1;
  logic [2:0] x = '0;
  logic [4:0] y [NS];
  logic [2:0] q [NS];
  logic [7:0] s2_x = '0;
  logic [3:0] s2_q = 4'b0101;
  logic [4:0] s2s_y, s2sc_y;
  logic [3:0] s2s_d, s2sc_d;

  int checks = 0, failures = 0;
  int s1_hits [1:13];
  int s2_hits [1:14];
  int resets = 0, held = 0;
  s1_state_e ref_s = S_A1;
  s1_step_t st;
  s2_step_t st2;
  logic [4:0] prev_y = '0;
  bit prev_valid = 1'b0;
  localparam string NAMES [NS] = '{"PY0", "PA", "PAY", "PYY", "PAY0", "PAY_S", "PAY_SC"};

  multilevel_fsm_top dut (
    .clk, .res, .x,
    .y_py0(y[0]), .y_pa(y[1]), .y_pay(y[2]), .y_pyy(y[3]), .y_pay0(y[4]), .y_pays(y[5]), .y_paysc(y[6]),
    .q_py0(q[0]), .q_pa(q[1]), .q_pay(q[2]), .q_pyy(q[3]), .q_pay0(q[4]), .q_pays(q[5]), .q_paysc(q[6]),
    .s2_x, .s2_q, .s2s_y, .s2sc_y, .s2s_d, .s2sc_d);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  initial begin : watchdog
    #(10 * (NCYC + 200));
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (s1_hits[i]) s1_hits[i] = 0;
    foreach (s2_hits[i]) s2_hits[i] = 0;
    repeat (2) @(posedge clk);
    #1 res = 1'b0;
    for (int s = 0; s < NS; s++) check(q[s] == 3'b000, $sformatf("%s starts in a1", NAMES[s]));
    for (int c = 0; c < NCYC; c++) begin
      if (c == NCYC / 2) begin
        #2 res = 1'b1;
        #1 for (int s = 0; s < NS; s++) check(q[s] == 3'b000, $sformatf("%s reset", NAMES[s]));
        ref_s = S_A1; resets++;
        @(posedge clk); @(posedge clk); #1 res = 1'b0;
        prev_valid = 1'b0;
      end
      x = 3'($urandom);
      st = s1_step(ref_s, x);
      s2_q = 4'(5 + ($urandom % 3));
      s2_x = 8'($urandom);
      st2 = s2_step(s2_q, s2_x);
      #3;  // just before the falling edge
      if (prev_valid) begin
        for (int s = 0; s < NS; s++)
          if (s != 1) check(y[s] == prev_y, $sformatf("%s holds y until the falling edge", NAMES[s]));
        check(y[1] == st.y, "PA output is combinational");
        if (prev_y != st.y) held++;
      end
      @(negedge clk); #1;
      for (int s = 0; s < NS; s++)
        check(y[s] == st.y, $sformatf("%s y in %s x=%b: got %b want %b", NAMES[s], ref_s.name(), x, y[s], st.y));
      check({s2s_y, s2s_d} == {st2.y, st2.d}, $sformatf("S2 PAY_S q=%b x=%b", s2_q, s2_x));
      check({s2sc_y, s2sc_d} == {st2.y, st2.d}, $sformatf("S2 PAY_SC q=%b x=%b", s2_q, s2_x));
      s1_hits[st.line]++;
      s2_hits[st2.line]++;
      prev_y = st.y; prev_valid = 1'b1;
      @(posedge clk);
      ref_s = st.next;
      #1;
      for (int s = 0; s < NS; s++)
        check(q[s] == ref_s, $sformatf("%s state: got %b want %b", NAMES[s], q[s], ref_s));
    end
    foreach (s1_hits[i]) check(s1_hits[i] > 0, $sformatf("S1 transition %0d taken", i));
    foreach (s2_hits[i]) check(s2_hits[i] > 0, $sformatf("S2 transition %0d exercised", i));
    check(resets > 0, "asynchronous reset exercised");
    check(held > 0, "registered outputs held while the combinational one changed");
    $display("S1 transitions:");
    foreach (s1_hits[i]) $display("  line %0d: %0d", i, s1_hits[i]);
    $display("S2 fragment transitions:");
    foreach (s2_hits[i]) $display("  line %0d: %0d", i, s2_hits[i]);
    $display("asynchronous resets: %0d, cycles with held registered output: %0d", resets, held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
