// tb_regfile: self-checking testbench of the dual-port register file.
// A reference array in the testbench follows random reads and writes on
// both ports; each read word (one cycle after its address) is compared
// with it, including read-before-write and the port-A-wins collision rule.
module tb_regfile;
  localparam int unsigned AW = 5;
  logic          clk = 0, wea = 0, web = 0;
  logic [AW-1:0] addr_a = 0, addr_b = 0;
  logic [63:0]   din_a = 0, din_b = 0, dout_a, dout_b;
  logic [63:0]   model [2**AW];
  int checks = 0, failures = 0;

  regfile #(.AW(AW), .DW(64)) dut (.clk, .addr_a, .wea, .din_a, .dout_a, .addr_b, .web, .din_b, .dout_b);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] exp_a, exp_b;
    // fill every word through alternating ports
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk);
      model[i] = {$urandom, $urandom};
      if (i % 2 == 0) begin wea = 1; web = 0; addr_a = AW'(i); din_a = model[i]; end
      else            begin wea = 0; web = 1; addr_b = AW'(i); din_b = model[i]; end
    end
    @(negedge clk); wea = 0; web = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      addr_a = AW'($urandom); addr_b = ($urandom % 4 == 0) ? addr_a : AW'($urandom);
      wea = 1'($urandom); web = 1'($urandom);
      din_a = {$urandom, $urandom}; din_b = {$urandom, $urandom};
      exp_a = model[addr_a]; exp_b = model[addr_b];
      if (web) model[addr_b] = din_b;
      if (wea) model[addr_a] = din_a;
      @(negedge clk);
      wea = 0; web = 0;
      checks += 2;
      if (dout_a !== exp_a) begin failures++; $display("FAIL port A %h expected %h", dout_a, exp_a); end
      if (dout_b !== exp_b) begin failures++; $display("FAIL port B %h expected %h", dout_b, exp_b); end
    end
    // read back everything
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk); addr_a = AW'(i); addr_b = AW'(2**AW - 1 - i);
      @(negedge clk);
      checks += 2;
      if (dout_a !== model[i]) begin failures++; $display("FAIL readback A %0d", i); end
      if (dout_b !== model[2**AW - 1 - i]) begin failures++; $display("FAIL readback B %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
