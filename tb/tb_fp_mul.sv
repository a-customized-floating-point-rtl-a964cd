// tb_fp_mul: self-checking testbench of the double-precision multiplier.
// Random normal operands are checked bit-exactly against the simulator's
// own IEEE double multiplication (round to nearest even), plus NaN,
// infinity, zero, overflow and underflow cases. The latency of a normal
// multiplication (57 cycles from start to done) is checked too.
module tb_fp_mul;
  logic        clk = 0, rst_n = 0, start = 0, done;
  logic [63:0] a, b, result;
  int checks = 0, failures = 0;

  fp_mul dut (.clk, .rst_n, .start, .a, .b, .done, .result);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
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
      $display("FAIL mul %h * %h = %h expected %h", x, y, result, exp_r);
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
    // random operands whose product stays in the normal range
    for (int i = 0; i < 2000; i++) begin
      x = rnd_double(600, 1450);
      y = rnd_double(600, 1450);
      run(x, y, $realtobits($bitstoreal(x) * $bitstoreal(y)), 57);
    end
    // products near 1 and small integers (exact results)
    for (int i = 0; i < 500; i++) begin
      x = rnd_double(1022, 1024);
      y = $realtobits(real'(int'($urandom % 2001) - 1000));
      run(x, y, $realtobits($bitstoreal(x) * $bitstoreal(y)), 0);
    end
    run(64'h7FF0000000000000, 64'h0, 64'h7FF8000000000000, 0);             // inf * 0
    run(64'hFFF0000000000000, 64'h4000000000000000, 64'hFFF0000000000000, 0); // -inf * 2
    run(64'h0, 64'hC008000000000000, 64'h8000000000000000, 0);             // 0 * -3
    run(64'h7FF8000000000001, 64'h3FF0000000000000, 64'h7FF8000000000000, 0); // NaN
    run(64'h7FE0000000000000, 64'h4010000000000000, 64'h7FF0000000000000, 0); // overflow
    run(64'h0010000000000000, 64'h3FE0000000000000, 64'h0, 0);             // underflow to 0
    run(64'h3FF0000000000000, 64'h3FF0000000000000, 64'h3FF0000000000000, 57); // 1 * 1
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
