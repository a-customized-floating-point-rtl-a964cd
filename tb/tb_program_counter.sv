// tb_program_counter: self-checking testbench of the program counter.
// Random pc_en / pc_rst sequences are compared with a counter model,
// including wrap-around and pc_rst taking priority over pc_en.
module tb_program_counter;
  localparam int unsigned W = 5;
  logic         clk = 0, rst_n = 0, pc_en = 0, pc_rst = 0;
  logic [W-1:0] pc, model;
  int checks = 0, failures = 0;

  program_counter #(.W(W)) dut (.clk, .rst_n, .pc_en, .pc_rst, .pc);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (pc !== '0) begin failures++; $display("FAIL reset value"); end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      pc_en  = ($urandom % 8) != 0;
      pc_rst = ($urandom % 50) == 0;
      @(posedge clk);
      if (pc_rst) model = '0;
      else if (pc_en) model = model + 1'b1;
      @(negedge clk);
      pc_en = 0; pc_rst = 0;
      checks++;
      if (pc !== model) begin failures++; $display("FAIL pc %0d expected %0d", pc, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
