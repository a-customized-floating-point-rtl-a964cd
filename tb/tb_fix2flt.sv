// tb_fix2flt: self-checking testbench of the fixed-to-float converter.
// Q16.16 inputs (random, powers of two, zero, the most negative value) are
// compared with the simulator's own conversion, value / 65536.0, and the
// two-cycle latency is checked.
module tb_fix2flt;
  logic        clk = 0, rst_n = 0, start = 0, done;
  logic [31:0] fix;
  logic [63:0] result;
  int checks = 0, failures = 0;

  fix2flt #(.FIX_W(32), .FRAC(16)) dut (.clk, .rst_n, .start, .fix, .done, .result);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] x);
    int lat;
    logic [63:0] ref_r;
    ref_r = $realtobits(real'($signed(x)) / 65536.0);
    @(negedge clk);
    fix = x; start = 1;
    @(negedge clk);
    start = 0; lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    checks += 2;
    if (result !== ref_r) begin failures++; $display("FAIL %h -> %h expected %h", x, result, ref_r); end
    if (lat != 2) begin failures++; $display("FAIL latency %0d", lat); end
  endtask

  initial begin
    fix = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(32'h0);
    run(32'h0001_0000);   // 1.0
    run(32'hFFFF_0000);   // -1.0
    run(32'h8000_0000);   // most negative
    run(32'h7FFF_FFFF);
    run(32'h0000_0001);
    for (int i = 0; i < 32; i++) run(32'd1 << i);
    for (int i = 0; i < 2000; i++) run($urandom >> ($urandom % 32));
    for (int i = 0; i < 2000; i++) run(-($urandom >> ($urandom % 32)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
