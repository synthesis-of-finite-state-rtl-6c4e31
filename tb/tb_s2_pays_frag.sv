// tb_s2_pays_frag -- self-checking testbench of the S2 fragment in the
// PAY_S structure (separate decoders Y and CC).
//
// Applies random inputs with the current state set to a5, a6 or a7 and
// compares y and the next-state code d, read just after the falling edge,
// with the behavioural reference s2_ref_pkg::s2_step. Every one of the 14
// transitions must be exercised. Just before the falling edge the outputs
// must still show the previous read (memory-block latency).
`timescale 1ns/1ps
module tb_s2_pays_frag;
  import s2_ref_pkg::*;

  logic clk = 1'b0;
  logic [7:0] x = '0;
  logic [3:0] q = 4'b0101;
  logic [4:0] y;
  logic [3:0] d;
  logic [8:0] prev = '0;
  bit prev_valid = 1'b0;
  s2_step_t st;
  int checks = 0, failures = 0;
  int line_hits [1:14];

  s2_pays_frag dut (.clk(clk), .x(x), .q(q), .y(y), .d(d));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (line_hits[i]) line_hits[i] = 0;
    @(posedge clk); #1;
    for (int c = 0; c < 1500; c++) begin
      q = 4'(5 + ($urandom % 3));
      x = 8'($urandom);
      st = s2_step(q, x);
      #3;
      if (prev_valid) check({y, d} == prev, "outputs held until the falling edge");
      @(negedge clk); #1;
      check(y == st.y, $sformatf("y q=%b x=%b got %b want %b", q, x, y, st.y));
      check(d == st.d, $sformatf("d q=%b x=%b got %b want %b", q, x, d, st.d));
      line_hits[st.line]++;
      prev = {st.y, st.d}; prev_valid = 1'b1;
      @(posedge clk); #1;
    end
    foreach (line_hits[i]) check(line_hits[i] > 0, $sformatf("transition %0d exercised", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
