// tb_instr_reg: self-checking testbench of the instruction register.
// Loads random instruction words, checks that each field is taken from
// its place in the word, that the register holds while load is low, and
// that only an all-ones MUX_SEL is flagged as the end pattern.
module tb_instr_reg;
  import fpp_pkg::*;
  logic               clk = 0, rst_n = 0, load = 0, is_end;
  logic [INSTR_W-1:0] instr = 0, held;
  instr_t             ir;
  int checks = 0, failures = 0;

  instr_reg dut (.clk, .rst_n, .load, .instr, .ir, .is_end);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    held = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      instr = INSTR_W'($urandom);
      load  = 1'($urandom);
      if (load) held = instr;
      @(negedge clk);
      load = 0;
      checks += 6;
      if (ir.mux_sel !== held[19:17]) begin failures++; $display("FAIL mux_sel"); end
      if (ir.op      !== held[16:15]) begin failures++; $display("FAIL op"); end
      if (ir.src1    !== held[14:10]) begin failures++; $display("FAIL src1"); end
      if (ir.src2    !== held[9:5])   begin failures++; $display("FAIL src2"); end
      if (ir.dest    !== held[4:0])   begin failures++; $display("FAIL dest"); end
      if (is_end !== (held[19:17] == 3'b111)) begin failures++; $display("FAIL is_end"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
