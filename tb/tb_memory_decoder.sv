// tb_memory_decoder -- self-checking testbench of the read-only memory block.
//
// Fills a 16-word table with (5*a+3) mod 64 and reads random addresses. The
// word must appear just after the falling edge (one read per falling edge,
// the memory's one-half-cycle latency) and must not change at the rising
// edge, even if the address changes then.
`timescale 1ns/1ps
module tb_memory_decoder;

  localparam int unsigned AW = 4, DW = 6;

  typedef logic [DW-1:0] table_t [2**AW];
  function automatic table_t fill();
    for (int a = 0; a < 2**AW; a++) fill[a] = DW'(5 * a + 3);
  endfunction
  localparam table_t CONTENT = fill();

  logic clk = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [DW-1:0] data, last;
  int checks = 0, failures = 0;

  memory_decoder #(.AW(AW), .DW(DW), .CONTENT(CONTENT)) dut (.clk(clk), .addr(addr), .data(data));

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
    @(posedge clk); #1;
    for (int c = 0; c < 500; c++) begin
      addr = AW'($urandom);
      @(negedge clk); #1;
      check(data == DW'((5 * addr + 3) % 64), $sformatf("read addr %0d got %0d", addr, data));
      last = data;
      #3 addr = AW'($urandom);          // address changes before the rising edge
      @(posedge clk); #1;
      check(data == last, "word held over the rising edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
