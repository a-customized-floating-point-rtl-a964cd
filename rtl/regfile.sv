// regfile: the processor's register file, a 64-bit true dual-port RAM.
//
// The upper half of the address space holds the polynomial coefficients,
// loaded from the SPI flash through port B; the lower half holds the
// results of instructions, written through port A, for use by later
// instructions. The dual-port organisation and the split into coefficient
// and result halves follow the document; the depth (2**AW = 32 words) and
// the read-before-write timing are this design's choices.
//
// Timing: both ports read synchronously; dout_x shows the word at addr_x
// one cycle after the address is applied (the old word when the same cycle
// writes it). When both ports write the same address, port A wins.
module regfile #(
  parameter int unsigned AW = 5,
  parameter int unsigned DW = 64
) (
  input  logic          clk,
  input  logic [AW-1:0] addr_a,
  input  logic          wea,
  input  logic [DW-1:0] din_a,
  output logic [DW-1:0] dout_a,
  input  logic [AW-1:0] addr_b,
  input  logic          web,
  input  logic [DW-1:0] din_b,
  output logic [DW-1:0] dout_b
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    dout_a <= mem[addr_a];
    dout_b <= mem[addr_b];
    if (web) mem[addr_b] <= din_b;
    if (wea) mem[addr_a] <= din_a;
  end
endmodule
