// tb_flt2fix: self-checking testbench of the float-to-fixed converter.
// Random doubles across the Q16.16 range and beyond it are compared with
// the simulator's own truncating conversion ($rtoi of value * 65536),
// saturated to the 32-bit range, and sign-extended to 64 bits. NaN, zero
// and tiny values give 0. The two-cycle latency is checked.
module tb_flt2fix;
  logic        clk = 0, rst_n = 0, start = 0, done;
  logic [63:0] a, result;
  int checks = 0, failures = 0;

  flt2fix #(.FIX_W(32), .FRAC(16)) dut (.clk, .rst_n, .start, .a, .done, .result);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] ref_fix(input logic [63:0] x);
    real v;
    longint q;
    if (x[62:52] == 11'h7FF && x[51:0] != 0) return 64'd0;
    v = $bitstoreal(x) * 65536.0;
    if (v >= 2147483647.0) return 64'h0000_0000_7FFF_FFFF;
    if (v <= -2147483648.0) return 64'hFFFF_FFFF_8000_0000;
    q = longint'($rtoi(v));
    return 64'(q);
  endfunction

  task automatic run(input logic [63:0] x);
    int lat;
    logic [63:0] ref_r;
    ref_r = ref_fix(x);
    @(negedge clk);
    a = x; start = 1;
    @(negedge clk);
    start = 0; lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    checks += 2;
    if (result !== ref_r) begin failures++; $display("FAIL %h -> %h expected %h", x, result, ref_r); end
    if (lat != 2) begin failures++; $display("FAIL latency %0d", lat); end
  endtask

  initial begin
    logic [63:0] x;
    a = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run($realtobits(1.0));
    run($realtobits(-1.5));
    run($realtobits(32767.99));
    run($realtobits(-32768.0));
    run($realtobits(40000.0));     // saturates
    run($realtobits(-1.0e9));      // saturates
    run($realtobits(1.0e-9));      // below one LSB
    run(64'h0);
    run(64'h7FF8000000000000);     // NaN
    for (int i = 0; i < 4000; i++) begin
      x = {1'($urandom), 11'(1023 - 20 + int'($urandom % 38)), $urandom, 20'($urandom)};
      run(x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
