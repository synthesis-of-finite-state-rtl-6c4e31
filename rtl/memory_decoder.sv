// memory_decoder -- second-level decoder (Y, CC or YCC) as an FPGA memory
// block in read-only mode.
//
// The decoder tables of the multi-level structures are regular and are
// implemented as embedded memory blocks instead of logic. The address is the
// concatenation of two codes (for example the current-state code Q and the
// multiple code psi of a microinstruction) and the word is the decoded vector
// (microoperations y and/or excitation functions D).
//
// Timing: the memory is synchronous and is clocked on the falling edge of the
// same clock that drives the state register on the rising edge. The word read
// at the falling edge in the middle of a cycle is therefore ready for the
// register at the next rising edge, and the memory doubles as the output
// register of the Mealy outputs, removing their glitches.
//
// Interface: clk, addr[AW-1:0] in, data[DW-1:0] out. CONTENT holds the 2**AW
// words; addresses that a decoder table does not list are don't-care and read
// as zero. Falling-edge clocking follows the published method; the zero fill is a
// choice of this design. The defaults are decoder Y of the PY0 structure of
// the example machine S1 (2^(R+N2) = 32 words of N = 5 bits).
module memory_decoder #(
  parameter int unsigned AW = s1_pkg::R + s1_pkg::N2,
  parameter int unsigned DW = s1_pkg::N,
  parameter logic [DW-1:0] CONTENT [2**AW] = s1_pkg::PY0_Y_ROM
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] data
);

  always_ff @(negedge clk) data <= CONTENT[addr];

endmodule
