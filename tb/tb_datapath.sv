// tb_datapath: self-checking testbench of the datapath.
// The testbench plays the control unit: it loads two coefficients into the
// register file and a three-instruction program into the instruction
// memory through the configuration port, then steps the program with the
// control signals (load IR, read operands, FPU enable, wait for ready,
// write back, advance PC) and finally loads the output register. The
// program computes c0*c1 + sensor2 and its fixed-point conversion; results
// are compared with the simulator's own double arithmetic.
module tb_datapath;
  import fpp_pkg::*;
  logic               clk = 0, rst_n = 0;
  ctrl_t              ctrl;
  logic [FIX_W-1:0]   sensor_data [5];
  logic               ld_rf_we = 0, ld_im_we = 0;
  logic [RF_AW-1:0]   ld_rf_addr = 0;
  logic [DW-1:0]      ld_rf_data = 0;
  logic [4:0]         ld_im_addr = 0;
  logic [INSTR_W-1:0] ld_im_data = 0;
  logic [INSTR_W-1:0] instr;
  instr_t             ir;
  logic               fpu_ready, data_valid;
  logic [DW-1:0]      data_out;
  int checks = 0, failures = 0;

  datapath #(.N_SENSORS(5), .PC_W(5)) dut (
    .clk, .rst_n, .ctrl, .sensor_data, .ld_rf_we, .ld_rf_addr, .ld_rf_data,
    .ld_im_we, .ld_im_addr, .ld_im_data, .instr, .ir, .fpu_ready, .data_out, .data_valid);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [INSTR_W-1:0] ins(input int sel, input fpu_op_e op, input int s1, input int s2, input int d);
    instr_t i;
    i = '{mux_sel: SEL_W'(sel), op: op, src1: RF_AW'(s1), src2: RF_AW'(s2), dest: RF_AW'(d)};
    return INSTR_W'(i);
  endfunction

  task automatic step_instr();
    // FETCH: the instruction memory reads at the PC
    @(negedge clk);
    // DECODE: load the instruction register
    ctrl.instr_exec_en = 1; @(negedge clk); ctrl.instr_exec_en = 0;
    // EXECUTE: read operands, start the FPU, wait, write back
    ctrl.addr_a = ir.src1; ctrl.addr_b = ir.src2; @(negedge clk);
    ctrl.fpu_en = 1; @(negedge clk); ctrl.fpu_en = 0;
    while (!fpu_ready) @(negedge clk);
    ctrl.addr_a = ir.dest; ctrl.wea = 1; ctrl.pc_en = 1; @(negedge clk);
    ctrl.wea = 0; ctrl.pc_en = 0;
  endtask

  task automatic output_word(input int r);
    ctrl.addr_a = RF_AW'(r); @(negedge clk);
    ctrl.proc_out_en = 1; ctrl.pc_rst = 1; @(negedge clk);
    ctrl.proc_out_en = 0; ctrl.pc_rst = 0;
  endtask

  initial begin
    real c0, c1, s, v;
    logic [INSTR_W-1:0] prog [5];
    ctrl = '0;
    foreach (sensor_data[k]) sensor_data[k] = '0;
    prog[0] = ins(0, OP_MUL, 16, 17, 3);
    prog[1] = ins(3, OP_FIX2FLT, 0, 0, 4);
    prog[2] = ins(0, OP_ADD, 3, 4, 5);
    prog[3] = ins(0, OP_FLT2FIX, 5, 0, 6);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 30; r++) begin
      c0 = real'(int'($urandom % 20001) - 10000) / 97.0;
      c1 = real'(int'($urandom % 20001) - 10000) / 1013.0;
      sensor_data[2] = $urandom >> 4;
      if ($urandom % 2) sensor_data[2] = -sensor_data[2];
      s = real'($signed(sensor_data[2])) / 65536.0;
      v = c0 * c1 + s;
      // configuration
      ctrl.cfg_mode = 1;
      ld_rf_we = 1; ld_rf_addr = 16; ld_rf_data = $realtobits(c0); @(negedge clk);
      ld_rf_addr = 17; ld_rf_data = $realtobits(c1); @(negedge clk);
      ld_rf_we = 0;
      for (int k = 0; k < 4; k++) begin
        ld_im_we = 1; ld_im_addr = 5'(k); ld_im_data = prog[k]; @(negedge clk);
      end
      ld_im_we = 0; ctrl.cfg_mode = 0;
      // run
      for (int k = 0; k < 4; k++) step_instr();
      output_word(5);
      checks += 2;
      if (data_out !== $realtobits(v)) begin failures++; $display("FAIL double result %h expected %h", data_out, $realtobits(v)); end
      if (!data_valid) begin failures++; $display("FAIL no valid"); end
      output_word(6);
      checks++;
      if (data_out !== 64'(longint'($rtoi(v * 65536.0)))) begin failures++; $display("FAIL fixed result %h", data_out); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
