// tb_fp_add: self-checking testbench of the double-precision adder.
// Random normal operands (wide and close exponents, both signs, so that
// alignment, carry, cancellation and rounding all occur) are checked
// bit-exactly against the simulator's own IEEE double addition, plus NaN,
// infinity and zero cases. The latency of a normal addition (5 cycles from
// start to done) is checked too.
module tb_fp_add;
  logic        clk = 0, rst_n = 0, start = 0, done;
  logic [63:0] a, b, result;
  int checks = 0, failures = 0;

  fp_add dut (.clk, .rst_n, .start, .a, .b, .done, .result);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] rnd_double(input int emin, input int emax);
    logic [51:0] f;
    f = {$urandom, $urandom};
    return {1'($urandom), 11'(emin + int'($urandom % (emax - emin + 1))), f};
  endfunction

  task automatic run(input logic [63:0] x, input logic [63:0] y, input logic [63:0] exp_r,
                     input int exp_lat);
    int lat;
    @(negedge clk);
    a = x; b = y; start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    checks++;
    if (result !== exp_r) begin
      failures++;
      $display("FAIL add %h + %h = %h expected %h", x, y, result, exp_r);
    end
    if (exp_lat > 0) begin
      checks++;
      if (lat != exp_lat) begin
        failures++;
        $display("FAIL latency %0d expected %0d", lat, exp_lat);
      end
    end
  endtask

  initial begin
    logic [63:0] x, y;
    a = 0; b = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // random, wide exponent range
    for (int i = 0; i < 3000; i++) begin
      x = rnd_double(900, 1150);
      y = rnd_double(900, 1150);
      run(x, y, $realtobits($bitstoreal(x) + $bitstoreal(y)), 5);
    end
    // close exponents and opposite signs: massive cancellation
    for (int i = 0; i < 3000; i++) begin
      x = rnd_double(1000, 1003);
      y = rnd_double(1000, 1003);
      y[63] = ~x[63];
      if ((i % 4) == 0) y[51:20] = x[51:20];
      run(x, y, $realtobits($bitstoreal(x) + $bitstoreal(y)), 5);
    end
    // special values
    run(64'h3FF0000000000000, 64'hBFF0000000000000, 64'h0, 0);            // 1 - 1 = +0
    run(64'h7FF0000000000000, 64'h3FF0000000000000, 64'h7FF0000000000000, 0); // inf + 1
    run(64'h7FF0000000000000, 64'hFFF0000000000000, 64'h7FF8000000000000, 0); // inf - inf
    run(64'h7FF8000000000001, 64'h3FF0000000000000, 64'h7FF8000000000000, 0); // NaN
    run(64'h0, 64'hC008000000000000, 64'hC008000000000000, 0);             // 0 + -3
    run(64'h8000000000000000, 64'h8000000000000000, 64'h8000000000000000, 0); // -0 + -0
    run(64'h7FEFFFFFFFFFFFFF, 64'h7FEFFFFFFFFFFFFF, 64'h7FF0000000000000, 0); // overflow
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
