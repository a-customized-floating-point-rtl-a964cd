// instr_reg: instruction register.
//
// On INSTR_EXEC_EN (load) it captures the fetched instruction word and
// splits it into the fields the datapath is driven by: MUX_SEL, FPU
// opcode, SRC-ADDR-1, SRC-ADDR-2 and DEST-ADDR (fpp_pkg::instr_t). It also
// flags the end-of-program pattern, an instruction whose MUX_SEL is all
// ones. The five fields follow the document; their order and widths and
// the end-pattern encoding are this design's choices.
//
// Timing: fields are valid in the cycle after load.
module instr_reg
  import fpp_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  input  logic [INSTR_W-1:0] instr,
  output instr_t             ir,
  output logic               is_end
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    ir <= '0;
    else if (load) ir <= instr_t'(instr);
  end

  assign is_end = (ir.mux_sel == SEL_END);
endmodule
