// program_counter: W-bit program counter on the instruction memory address.
//
// The control unit raises pc_en for one cycle when an instruction has been
// executed, moving to the next instruction, and pc_rst when the program's
// end pattern has been reached, returning to instruction 0. Both follow the
// document. pc_rst winning over pc_en, and the asynchronous system reset,
// are this design's choices.
module program_counter #(
  parameter int unsigned W = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         pc_en,
  input  logic         pc_rst,
  output logic [W-1:0] pc
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      pc <= '0;
    else if (pc_rst) pc <= '0;
    else if (pc_en)  pc <= pc + 1'b1;
  end
endmodule
