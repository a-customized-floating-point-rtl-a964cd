// tb_fpu: self-checking testbench of the FPU wrapper.
// Each of the four opcodes is run on random operands and compared with the
// simulator's own IEEE double arithmetic. The ready handshake is checked:
// ready is high before en, low in the cycle after en, and high again after
// the expected latency (3, 3, 6 and 58 cycles from en).
module tb_fpu;
  import fpp_pkg::*;
  logic        clk = 0, rst_n = 0, en = 0, ready;
  fpu_op_e     op;
  logic [63:0] a, b, result;
  int checks = 0, failures = 0;

  fpu dut (.clk, .rst_n, .en, .op, .a, .b, .result, .ready);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] rnd_double(input int emin, input int emax);
    return {1'($urandom), 11'(emin + int'($urandom % (emax - emin + 1))), $urandom, 20'($urandom)};
  endfunction

  task automatic run(input fpu_op_e o, input logic [63:0] x, input logic [63:0] y,
                     input logic [63:0] exp_r, input int exp_lat);
    int lat;
    @(negedge clk);
    checks++;
    if (!ready) begin failures++; $display("FAIL not ready before en"); end
    op = o; a = x; b = y; en = 1;
    @(negedge clk);
    en = 0;
    checks++;
    if (ready) begin failures++; $display("FAIL ready did not drop"); end
    lat = 1;
    while (!ready && lat < 1000) begin @(negedge clk); lat++; end
    checks += 2;
    if (result !== exp_r) begin failures++; $display("FAIL op %s %h %h = %h expected %h", o.name(), x, y, result, exp_r); end
    if (lat != exp_lat) begin failures++; $display("FAIL op %s latency %0d expected %0d", o.name(), lat, exp_lat); end
  endtask

  initial begin
    logic [63:0] x, y;
    logic [31:0] f;
    real v;
    op = OP_ADD; a = 0; b = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      x = rnd_double(1000, 1050); y = rnd_double(1000, 1050);
      run(OP_ADD, x, y, $realtobits($bitstoreal(x) + $bitstoreal(y)), 6);
      run(OP_MUL, x, y, $realtobits($bitstoreal(x) * $bitstoreal(y)), 58);
      f = $urandom;
      run(OP_FIX2FLT, {32'hDEAD_BEEF, f}, y, $realtobits(real'($signed(f)) / 65536.0), 3);
      x = rnd_double(1010, 1030);
      v = $bitstoreal(x) * 65536.0;
      run(OP_FLT2FIX, x, y, 64'(longint'($rtoi(v))), 3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
