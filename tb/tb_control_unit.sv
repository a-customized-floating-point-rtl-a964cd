// tb_control_unit: self-checking testbench of the control FSM.
// The testbench models the parts of the datapath the FSM talks to: a
// program counter, an instruction memory with synchronous read, the
// instruction register and an FPU whose ready signal returns a random
// number of cycles after each enable. It checks that the FSM stays in
// CONFIG_MEM until cfg_done, ignores start while configuring, and then, for
// random programs, that every instruction starts the FPU once with its two
// source addresses, writes back to its destination only after ready,
// advances the PC, and that the end pattern loads the output register from
// its SRC-ADDR-1 and resets the PC. The cycle count of a whole program
// (4 + FPU latency per instruction, 4 for the end) is checked as well.
module tb_control_unit;
  import fpp_pkg::*;
  logic               clk = 0, rst_n = 0, cfg_start = 0, cfg_done = 0, start = 0;
  logic [INSTR_W-1:0] instr;
  instr_t             ir;
  logic               fpu_ready;
  ctrl_t              ctrl;
  logic               busy;
  int checks = 0, failures = 0;

  control_unit dut (.clk, .rst_n, .cfg_start, .cfg_done, .start, .instr, .ir, .fpu_ready, .ctrl, .busy);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // datapath model
  instr_t prog [32];
  int     lat  [32];
  logic [4:0] pc;
  int     fpu_cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc <= '0; ir <= '0; instr <= '0; fpu_ready <= 1'b1; fpu_cnt <= 0;
    end else begin
      instr <= INSTR_W'(prog[pc]);
      if (ctrl.pc_rst) pc <= '0; else if (ctrl.pc_en) pc <= pc + 1'b1;
      if (ctrl.instr_exec_en) ir <= instr_t'(instr);
      if (ctrl.fpu_en) begin fpu_ready <= 1'b0; fpu_cnt <= lat[pc] - 1; end
      else if (!fpu_ready) begin
        if (fpu_cnt <= 1) fpu_ready <= 1'b1;
        fpu_cnt <= fpu_cnt - 1;
      end
    end
  end

  // monitor: per-instruction checks
  int n_en, n_we, n_out, cur;
  logic en_seen;
  always @(posedge clk) if (rst_n) begin
    if (ctrl.fpu_en) begin
      n_en++;
      checks += 2;
      if (ctrl.addr_a !== prog[pc].src1 || ctrl.addr_b !== prog[pc].src2) begin
        failures++; $display("FAIL operand addresses at pc %0d", pc);
      end
      if (en_seen) begin failures++; $display("FAIL second enable at pc %0d", pc); end
      en_seen = 1;
    end
    if (ctrl.wea) begin
      n_we++;
      checks += 3;
      if (!fpu_ready) begin failures++; $display("FAIL write before ready"); end
      if (ctrl.addr_a !== prog[pc].dest) begin failures++; $display("FAIL dest at pc %0d", pc); end
      if (!ctrl.pc_en || !en_seen) begin failures++; $display("FAIL write without pc_en or enable"); end
      en_seen = 0;
    end
    if (ctrl.proc_out_en) begin
      n_out++;
      checks += 2;
      if (ctrl.addr_a !== prog[pc].src1) begin failures++; $display("FAIL output address"); end
      if (!ctrl.pc_rst) begin failures++; $display("FAIL no pc reset at end"); end
    end
  end

  task automatic make_prog(output int n);
    n = 1 + int'($urandom % 12);
    for (int k = 0; k < 32; k++) begin
      prog[k] = instr_t'(INSTR_W'($urandom));
      if (prog[k].mux_sel == SEL_END) prog[k].mux_sel = 3'd0;
      lat[k] = 2 + int'($urandom % 70);
    end
    prog[n].mux_sel = SEL_END;
  endtask

  initial begin
    int n, cyc, exp_cyc;
    en_seen = 0; n_en = 0; n_we = 0; n_out = 0;
    foreach (prog[k]) begin prog[k] = '0; lat[k] = 3; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // configuration: start must be ignored
    cfg_start = 1; @(negedge clk); cfg_start = 0;
    start = 1; repeat (20) @(negedge clk); start = 0;
    checks += 2;
    if (n_en != 0 || !ctrl.cfg_mode) begin failures++; $display("FAIL activity during configuration"); end
    cfg_done = 1; @(negedge clk); cfg_done = 0;
    @(negedge clk);
    if (busy) begin failures++; $display("FAIL not idle after configuration"); end
    for (int r = 0; r < 40; r++) begin
      make_prog(n);
      exp_cyc = 4;
      for (int k = 0; k < n; k++) exp_cyc += 4 + lat[k];
      n_en = 0; n_we = 0; n_out = 0;
      start = 1; @(negedge clk); start = 0;
      cyc = 0;
      while (n_out == 0 && cyc < 10000) begin @(negedge clk); cyc++; end
      @(negedge clk);
      checks += 5;
      if (n_en != n) begin failures++; $display("FAIL %0d enables for %0d instructions", n_en, n); end
      if (n_we != n) begin failures++; $display("FAIL %0d writes for %0d instructions", n_we, n); end
      if (n_out != 1) begin failures++; $display("FAIL output loads %0d", n_out); end
      if (cyc != exp_cyc) begin failures++; $display("FAIL program took %0d cycles, expected %0d", cyc, exp_cyc); end
      if (busy || pc != 0) begin failures++; $display("FAIL not back in IDLE with pc 0"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
