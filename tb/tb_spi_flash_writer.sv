// tb_spi_flash_writer: self-checking testbench of the flash writing module.
// With a flash model holding random data, en is raised: the module must
// erase the sector (one SE after WREN, then RDSR polling), then write each
// byte offered on the rx handshake with its own WREN + PAGE PROGRAM at
// addresses 0, 1, 2, ... and poll until the flash is ready. The flash
// contents, the number of commands, the handshake and the return to idle
// when en falls are checked.
module tb_spi_flash_writer;
  logic       clk = 0, rst_n = 0, en = 0, rx_valid = 0, rx_ack, busy;
  logic [7:0] rx_data = 0;
  logic       spi_sck, spi_cs_n, spi_mosi, spi_miso;
  int checks = 0, failures = 0;

  spi_flash_writer #(.CLK_DIV(2)) dut (
    .clk, .rst_n, .en, .rx_data, .rx_valid, .rx_ack, .busy, .spi_sck, .spi_cs_n, .spi_mosi, .spi_miso);
  s25fl_model #(.MEM_BYTES(1024), .BUSY_POLLS(4)) u_flash (.sck(spi_sck), .cs_n(spi_cs_n), .mosi(spi_mosi), .miso(spi_miso));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] img [100];
    int cyc;
    for (int k = 0; k < 1024; k++) u_flash.mem[k] = 8'($urandom);
    foreach (img[k]) img[k] = 8'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1;
    en = 1;
    @(negedge clk);
    while (busy) @(negedge clk);
    checks += 2;
    if (u_flash.n_se != 1) begin failures++; $display("FAIL erases %0d", u_flash.n_se); end
    if (u_flash.mem[5] !== 8'hFF) begin failures++; $display("FAIL not erased"); end
    foreach (img[k]) begin
      rx_data = img[k]; rx_valid = 1;
      cyc = 0;
      while (!rx_ack && cyc < 1000) begin @(negedge clk); cyc++; end
      rx_valid = 0;
      checks++;
      if (!rx_ack) begin failures++; $display("FAIL byte %0d never acknowledged", k); end
      @(negedge clk);
      while (busy) @(negedge clk);
      checks += 2;
      if (u_flash.mem[k] !== img[k]) begin failures++; $display("FAIL byte %0d = %h expected %h", k, u_flash.mem[k], img[k]); end
      if (u_flash.n_pp != k + 1) begin failures++; $display("FAIL %0d page programs after byte %0d", u_flash.n_pp, k); end
    end
    checks += 4;
    for (int k = 0; k < 100; k++)
      if (u_flash.mem[k] !== img[k]) begin failures++; $display("FAIL byte %0d = %h expected %h", k, u_flash.mem[k], img[k]); break; end
    if (u_flash.mem[100] !== 8'hFF) begin failures++; $display("FAIL byte past the end written"); end
    if (u_flash.n_pp != 100) begin failures++; $display("FAIL page programs %0d", u_flash.n_pp); end
    if (u_flash.n_busy_polls < 4 * 101) begin failures++; $display("FAIL busy polls %0d", u_flash.n_busy_polls); end
    en = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (dut.step != dut.W_IDLE || !spi_cs_n) begin failures++; $display("FAIL not idle after en fell"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
