// tb_register_rg -- self-checking testbench of the state register RG.
//
// Loads random words on rising edges and checks that q follows d only at the
// rising edge (not at the falling edge), and that the asynchronous reset
// forces the reset code immediately, in the middle of a cycle, and holds it
// while asserted.
`timescale 1ns/1ps
module tb_register_rg;

  localparam int unsigned R = 4;
  localparam logic [R-1:0] RC = 4'b0101;

  logic clk = 1'b0, res = 1'b1;
  logic [R-1:0] d = '0, q, exp_q;
  int checks = 0, failures = 0;

  register_rg #(.R(R), .RESET_CODE(RC)) dut (.clk(clk), .res(res), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  initial begin : watchdog
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // res is high from time zero, so the register takes the reset code at
    // the first clock edge at the latest
    @(posedge clk); #1 check(q == RC, "reset value");
    res = 1'b0;
    exp_q = RC;
    for (int c = 0; c < 500; c++) begin
      d = R'($urandom);
      @(negedge clk); #1 check(q == exp_q, "no change on the falling edge");
      @(posedge clk); #1 check(q == d, "load on the rising edge");
      exp_q = d;
      if (c % 100 == 50) begin
        #2 res = 1'b1;
        #1 check(q == RC, "asynchronous reset");
        @(posedge clk); #1 check(q == RC, "reset holds over a clock edge");
        res = 1'b0; exp_q = RC;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
