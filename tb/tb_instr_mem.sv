// tb_instr_mem: self-checking testbench of the instruction memory.
// Writes random words to every address, reads them back in random order
// and checks the one-cycle read latency.
module tb_instr_mem;
  localparam int unsigned AW = 5, DW = 20;
  logic          clk = 0, we = 0;
  logic [AW-1:0] addr = 0;
  logic [DW-1:0] din = 0, dout;
  logic [DW-1:0] model [2**AW];
  int checks = 0, failures = 0;

  instr_mem #(.AW(AW), .DW(DW)) dut (.clk, .addr, .we, .din, .dout);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k;
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk);
      model[i] = DW'($urandom);
      we = 1; addr = AW'(i); din = model[i];
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 500; i++) begin
      k = int'($urandom % (2**AW));
      addr = AW'(k);
      @(negedge clk);
      checks++;
      if (dout !== model[k]) begin failures++; $display("FAIL addr %0d = %h expected %h", k, dout, model[k]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
