// tb_uart_rx: self-checking testbench of the UART receiver.
// Sends random bytes as 8N1 frames at CLKS_PER_BIT = 16 and checks each
// byte and the valid/ack handshake, a frame with a bad stop bit
// (frame_err, byte dropped) and a byte arriving while the previous one is
// still unacknowledged (overrun, byte dropped).
module tb_uart_rx;
  localparam int unsigned CPB = 16;
  logic       clk = 0, rst_n = 0, rxd = 1, ack = 0;
  logic [7:0] data;
  logic       valid, overrun, frame_err;
  int checks = 0, failures = 0, n_ferr = 0;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .rxd, .ack, .data, .valid, .overrun, .frame_err);
  always #5 clk = ~clk;
  always @(posedge clk) if (frame_err) n_ferr++;

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [7:0] b, input logic stop);
    logic [9:0] f;
    f = {stop, b, 1'b0};
    for (int k = 0; k < 10; k++) begin rxd = f[k]; repeat (CPB) @(negedge clk); end
    rxd = 1;
    repeat (2) @(negedge clk);
  endtask

  task automatic take(input logic [7:0] b);
    checks += 2;
    if (!valid) begin failures++; $display("FAIL no byte"); end
    else if (data !== b) begin failures++; $display("FAIL byte %h expected %h", data, b); end
    ack = 1; @(negedge clk); ack = 0; @(negedge clk);
    if (valid) begin failures++; $display("FAIL valid after ack"); end
  endtask

  initial begin
    logic [7:0] b;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    for (int i = 0; i < 200; i++) begin
      b = 8'($urandom);
      send(b, 1'b1);
      take(b);
    end
    // bad stop bit
    send(8'hA5, 1'b0);
    checks += 2;
    if (valid) begin failures++; $display("FAIL byte kept after frame error"); end
    if (n_ferr != 1) begin failures++; $display("FAIL frame errors %0d", n_ferr); end
    repeat (CPB) @(negedge clk);
    // overrun
    send(8'h3C, 1'b1);
    send(8'hC3, 1'b1);
    checks++;
    if (!overrun) begin failures++; $display("FAIL no overrun"); end
    take(8'h3C);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
