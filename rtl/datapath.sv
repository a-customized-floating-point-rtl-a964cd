// datapath: the processor's Harvard datapath.
//
// Separate memories hold data (regfile, 64-bit dual port: coefficients in
// the upper half, results in the lower half) and instructions (instr_mem,
// addressed by the program counter). The instruction register drives the
// FPU opcode and the operand multiplexer, which feeds the FPU's operand A
// from register-file bus A or a sensor; operand B is register-file bus B.
// The FPU result returns to the register file through port A, and the
// output register takes its word from bus A. During configuration
// (ctrl.cfg_mode) port B of the register file and the instruction
// memory's address are handed to the flash reading module.
// The list of units and their roles follow the document; which port writes
// back, and operand B always coming from bus B, are this design's choices.
//
// Timing: all memories read synchronously; ctrl comes from control_unit.
module datapath
  import fpp_pkg::*;
#(
  parameter int unsigned N_SENSORS = 5,
  parameter int unsigned PC_W      = 5
) (
  input  logic               clk,
  input  logic               rst_n,
  input  ctrl_t              ctrl,
  input  logic [FIX_W-1:0]   sensor_data [N_SENSORS],
  // load port from the SPI flash reading module
  input  logic               ld_rf_we,
  input  logic [RF_AW-1:0]   ld_rf_addr,
  input  logic [DW-1:0]      ld_rf_data,
  input  logic               ld_im_we,
  input  logic [PC_W-1:0]    ld_im_addr,
  input  logic [INSTR_W-1:0] ld_im_data,
  // to the control unit
  output logic [INSTR_W-1:0] instr,
  output instr_t             ir,
  output logic               fpu_ready,
  // processor output
  output logic [DW-1:0]      data_out,
  output logic               data_valid
);
  logic [PC_W-1:0]  pc, im_addr;
  logic [RF_AW-1:0] rf_addr_b;
  logic [DW-1:0]    rf_a, rf_b, opnd_a, fpu_result;
  logic             is_end;

  program_counter #(.W(PC_W)) u_pc (
    .clk, .rst_n, .pc_en(ctrl.pc_en), .pc_rst(ctrl.pc_rst), .pc);

  assign im_addr = ctrl.cfg_mode ? ld_im_addr : pc;

  instr_mem #(.AW(PC_W), .DW(INSTR_W)) u_imem (
    .clk, .addr(im_addr), .we(ctrl.cfg_mode && ld_im_we), .din(ld_im_data), .dout(instr));

  instr_reg u_ir (.clk, .rst_n, .load(ctrl.instr_exec_en), .instr, .ir, .is_end);

  assign rf_addr_b = ctrl.cfg_mode ? ld_rf_addr : ctrl.addr_b;

  regfile #(.AW(RF_AW), .DW(DW)) u_rf (
    .clk,
    .addr_a(ctrl.addr_a), .wea(ctrl.wea), .din_a(fpu_result), .dout_a(rf_a),
    .addr_b(rf_addr_b), .web(ctrl.cfg_mode && ld_rf_we), .din_b(ld_rf_data), .dout_b(rf_b));

  sensor_mux #(.N_SENSORS(N_SENSORS)) u_mux (
    .sel(ir.mux_sel), .rf_a, .sensor_data, .y(opnd_a));

  fpu u_fpu (
    .clk, .rst_n, .en(ctrl.fpu_en), .op(ir.op), .a(opnd_a), .b(rf_b),
    .result(fpu_result), .ready(fpu_ready));

  output_reg #(.DW(DW)) u_out (
    .clk, .rst_n, .en(ctrl.proc_out_en), .d(rf_a), .q(data_out), .valid(data_valid));

  // The end pattern never reaches the FPU.
  a_no_end_exec: assert property (@(posedge clk) disable iff (!rst_n) ctrl.fpu_en |-> !is_end);
endmodule
