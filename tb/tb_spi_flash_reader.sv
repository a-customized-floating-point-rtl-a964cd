// tb_spi_flash_reader: self-checking testbench of the flash reading module.
// A flash model is filled with random bytes; after start the module must
// issue one READ at address 0, write 16 coefficients (8 bytes each, most
// significant first) to register addresses 16..31 and 32 instructions
// (3 bytes each, low 20 bits) to instruction addresses 0..31, in that
// order, and pulse done with chip select high again. The load time
// ((4 + 128 + 96) bytes x (16*CLK_DIV + 2) cycles, plus a few) is checked.
module tb_spi_flash_reader;
  import fpp_pkg::*;
  logic               clk = 0, rst_n = 0, start = 0, busy, done;
  logic               spi_sck, spi_cs_n, spi_mosi, spi_miso;
  logic               rf_we, im_we;
  logic [RF_AW-1:0]   rf_addr;
  logic [DW-1:0]      rf_wdata;
  logic [4:0]         im_addr;
  logic [INSTR_W-1:0] im_wdata;
  int checks = 0, failures = 0;

  spi_flash_reader #(.CLK_DIV(2), .N_COEF(16), .N_INSTR(32), .COEF_BASE(16), .PC_W(5)) dut (
    .clk, .rst_n, .start, .busy, .done, .spi_sck, .spi_cs_n, .spi_mosi, .spi_miso,
    .rf_we, .rf_addr, .rf_wdata, .im_we, .im_addr, .im_wdata);
  s25fl_model #(.MEM_BYTES(1024)) u_flash (.sck(spi_sck), .cs_n(spi_cs_n), .mosi(spi_mosi), .miso(spi_miso));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_rf = 0, n_im = 0;
  always @(posedge clk) if (rst_n) begin
    if (rf_we) begin
      logic [63:0] w;
      for (int j = 0; j < 8; j++) w[63 - 8*j -: 8] = u_flash.mem[8*n_rf + j];
      checks += 3;
      if (n_im != 0) begin failures++; $display("FAIL coefficient after instructions"); end
      if (rf_addr !== RF_AW'(16 + n_rf)) begin failures++; $display("FAIL rf_addr %0d", rf_addr); end
      if (rf_wdata !== w) begin failures++; $display("FAIL coef %0d = %h expected %h", n_rf, rf_wdata, w); end
      n_rf++;
    end
    if (im_we) begin
      logic [23:0] w;
      for (int j = 0; j < 3; j++) w[23 - 8*j -: 8] = u_flash.mem[128 + 3*n_im + j];
      checks += 2;
      if (im_addr !== 5'(n_im)) begin failures++; $display("FAIL im_addr %0d", im_addr); end
      if (im_wdata !== w[19:0]) begin failures++; $display("FAIL instr %0d = %h expected %h", n_im, im_wdata, w[19:0]); end
      n_im++;
    end
  end

  initial begin
    int cyc;
    for (int k = 0; k < 1024; k++) u_flash.mem[k] = 8'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 2; r++) begin
      n_rf = 0; n_im = 0;
      for (int k = 0; k < 224; k++) u_flash.mem[k] = 8'($urandom);
      start = 1; @(negedge clk); start = 0;
      cyc = 1;
      while (!done && cyc < 50000) begin @(negedge clk); cyc++; end
      checks += 4;
      if (n_rf != 16 || n_im != 32) begin failures++; $display("FAIL wrote %0d coefficients, %0d instructions", n_rf, n_im); end
      if (cyc < 228 * 34 || cyc > 228 * 34 + 8) begin failures++; $display("FAIL load took %0d cycles", cyc); end
      @(negedge clk);
      if (!spi_cs_n || busy) begin failures++; $display("FAIL chip select or busy after done"); end
      if (u_flash.n_read != r + 1) begin failures++; $display("FAIL read commands %0d", u_flash.n_read); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
