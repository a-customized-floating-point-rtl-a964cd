// instr_mem: single-port instruction memory.
//
// Holds the program, written word by word by the SPI flash reading module
// during configuration and read at the program counter's address while the
// program runs. Single-port organisation follows the document; the depth
// (2**AW = 32 instructions) and width (the 20-bit instruction word) are
// this design's choices.
//
// Timing: synchronous read, dout shows the word at addr one cycle later.
module instr_mem #(
  parameter int unsigned AW = 5,
  parameter int unsigned DW = 20
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] dout
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= din;
    dout <= mem[addr];
  end
endmodule
