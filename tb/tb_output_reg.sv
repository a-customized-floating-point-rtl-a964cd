// tb_output_reg: self-checking testbench of the output register.
// Random enables and data: q must follow d only on en and hold otherwise,
// and valid must pulse in the cycle after each load.
module tb_output_reg;
  logic        clk = 0, rst_n = 0, en = 0, valid;
  logic [63:0] d = 0, q, model;
  int checks = 0, failures = 0;

  output_reg #(.DW(64)) dut (.clk, .rst_n, .en, .d, .q, .valid);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic loaded;
    model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      d = {$urandom, $urandom};
      en = ($urandom % 3) == 0;
      loaded = en;
      if (en) model = d;
      @(negedge clk);
      en = 0;
      checks += 2;
      if (q !== model) begin failures++; $display("FAIL q %h expected %h", q, model); end
      if (valid !== loaded) begin failures++; $display("FAIL valid"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
