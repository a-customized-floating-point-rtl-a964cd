// tb_fixed_mult: self-checking testbench of the sequential 53x53-bit
// multiplier. Random and corner operands are compared with a full-width
// product computed by the testbench; the latency (W+1 cycles from start to
// done) is checked for every product.
module tb_fixed_mult;
  localparam int unsigned W = 53;
  logic           clk = 0, rst_n = 0, start = 0, done;
  logic [W-1:0]   a, b;
  logic [2*W-1:0] p;
  int checks = 0, failures = 0;

  fixed_mult #(.W(W)) dut (.clk, .rst_n, .start, .a, .b, .done, .p);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [W-1:0] x, input logic [W-1:0] y);
    int lat;
    logic [2*W-1:0] ref_p;
    ref_p = {{W{1'b0}}, x} * {{W{1'b0}}, y};
    @(negedge clk);
    a = x; b = y; start = 1;
    @(negedge clk);
    start = 0; lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    checks += 2;
    if (p !== ref_p) begin failures++; $display("FAIL %h * %h = %h expected %h", x, y, p, ref_p); end
    if (lat != W + 1) begin failures++; $display("FAIL latency %0d", lat); end
  endtask

  initial begin
    a = 0; b = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run('0, '0);
    run('1, '1);
    run({1'b1, {(W-1){1'b0}}}, '1);
    run(53'd12345, 53'd678901);
    for (int i = 0; i < 500; i++) run(W'({$urandom, $urandom}), W'({$urandom, $urandom}));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
