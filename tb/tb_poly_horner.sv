// tb_poly_horner: runs temperature polynomials of the form
//   K(T) = 1 + a1*T + a2*T^2 + ... + an*T^n
// on the whole processor at its default parameters, for degrees n = 1, 2,
// 4, 8 and 15 (15 is the largest that fits: n+1 coefficients in registers
// 16..31, 2n+2 instructions). Each program is written in Horner form
// (FIX2FLT T; MUL; then n-1 times ADD, MUL; ADD a0; END) into the flash
// model, loaded by a reset, and run for random temperatures; the double
// result is compared bit-exactly with the same Horner sequence in the
// simulator's double arithmetic, and the run time with the expected
// 1 + 7 + 72n + 4 cycles (start to data_valid).
module tb_poly_horner;
  import fpp_pkg::*;

  logic             clk = 0, rst_n = 0, start = 0;
  logic [FIX_W-1:0] sensor_data [5];
  logic             spi_sck, spi_cs_n, spi_mosi, spi_miso;
  logic [DW-1:0]    data_out;
  logic             data_valid, config_done, busy, uart_overrun, uart_frame_err;
  int checks = 0, failures = 0;

  processor_main dut (
    .clk, .rst_n, .start, .sensor_data, .flash_op(1'b0), .uart_rxd(1'b1),
    .spi_sck, .spi_cs_n, .spi_mosi, .spi_miso,
    .data_out, .data_valid, .config_done, .busy, .uart_overrun, .uart_frame_err);

  s25fl_model #(.MEM_BYTES(1024)) u_flash (.sck(spi_sck), .cs_n(spi_cs_n), .mosi(spi_mosi), .miso(spi_miso));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [INSTR_W-1:0] ins(input int sel, input fpu_op_e op, input int s1, input int s2, input int d);
    instr_t i;
    i = '{mux_sel: SEL_W'(sel), op: op, src1: RF_AW'(s1), src2: RF_AW'(s2), dest: RF_AW'(d)};
    return INSTR_W'(i);
  endfunction

  task automatic load_image(input int n, input real c [16]);
    logic [INSTR_W-1:0] p [32];
    logic [63:0] w;
    int pc;
    foreach (p[k]) p[k] = ins(0, OP_ADD, 0, 0, 0);
    p[0] = ins(1, OP_FIX2FLT, 0, 0, 0);              // r0 = T
    p[1] = ins(0, OP_MUL, 16 + n, 0, 1);             // r1 = an * T
    pc = 2;
    for (int k = n - 1; k >= 1; k--) begin
      p[pc++] = ins(0, OP_ADD, 1, 16 + k, 1);        // r1 += ak
      p[pc++] = ins(0, OP_MUL, 1, 0, 1);             // r1 *= T
    end
    p[pc++] = ins(0, OP_ADD, 1, 16, 1);              // r1 += a0
    p[pc]   = ins(7, OP_ADD, 1, 0, 0);               // end, output r1
    for (int k = 0; k < 16; k++) begin
      w = $realtobits(c[k]);
      for (int j = 0; j < 8; j++) u_flash.mem[8*k + j] = w[63 - 8*j -: 8];
    end
    for (int k = 0; k < 32; k++) begin
      w = 64'(p[k]);
      for (int j = 0; j < 3; j++) u_flash.mem[128 + 3*k + j] = w[23 - 8*j -: 8];
    end
  endtask

  initial begin
    int degs [5] = '{1, 2, 4, 8, 15};
    real c [16], t, acc;
    int n, cyc;
    foreach (sensor_data[k]) sensor_data[k] = '0;
    foreach (degs[d]) begin
      n = degs[d];
      c[0] = 1.0;
      for (int k = 1; k < 16; k++) c[k] = real'(int'($urandom % 2001) - 1000) / 1.0e5;
      load_image(n, c);
      rst_n = 0;
      repeat (3) @(negedge clk);
      rst_n = 1;
      @(negedge clk);
      wait (config_done);
      @(negedge clk);
      for (int r = 0; r < 5; r++) begin
        sensor_data[0] = FIX_W'(int'($urandom % 12001) - 4000) << 10;   // -62.5 .. 125 degrees
        t = real'($signed(sensor_data[0])) / 65536.0;
        acc = c[n] * t;
        for (int k = n - 1; k >= 1; k--) acc = (acc + c[k]) * t;
        acc = acc + c[0];
        @(negedge clk); start = 1;
        @(negedge clk); start = 0;
        cyc = 1;
        while (!data_valid && cyc < 5000) begin @(negedge clk); cyc++; end
        checks += 2;
        if (data_out !== $realtobits(acc)) begin
          failures++;
          $display("FAIL degree %0d: %h expected %h", n, data_out, $realtobits(acc));
        end
        if (cyc != 1 + 7 + 72 * n + 4) begin
          failures++;
          $display("FAIL degree %0d took %0d cycles, expected %0d", n, cyc, 1 + 7 + 72 * n + 4);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
