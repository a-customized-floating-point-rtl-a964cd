// tb_processor_main: end-to-end testbench of the compensation processor at
// its default parameters.
//
// A flash model holds an image of 16 coefficients and a 16-instruction
// program computing the compensated output
//   B_cmp = Ksf*B_raw + a1*T1 + a2*T2 + a3*G1 + a4*G2
// from five Q16.16 sensor inputs (nominal coefficients Ksf = 1, a1 = 0.10,
// a2 = 2.00, a3 = 0.23, a4 = 2.40). After reset the processor loads the
// image; the testbench then starts it for random sensor values and checks
// the fixed-point result against the same sequence of IEEE double
// operations done by the simulator. Next it raises flash_op and sends a new
// image (a1 = 0.5, program ending with the double-precision sum) over the
// UART, lowers flash_op, waits for the reload and checks again, now
// bit-exactly in double precision. It counts every mechanism (flash load,
// the four FPU operations, FPU wait, end pattern, output load, UART bytes,
// sector erase, page program, busy polling, reload) and fails if one never
// happened.
module tb_processor_main;
  import fpp_pkg::*;

  localparam int unsigned NS  = 5;
  localparam int unsigned CPB = 434;   // default clocks per UART bit

  logic             clk = 0, rst_n = 0, start = 0, flash_op = 0, uart_rxd = 1;
  logic [FIX_W-1:0] sensor_data [NS];
  logic             spi_sck, spi_cs_n, spi_mosi, spi_miso;
  logic [DW-1:0]    data_out;
  logic             data_valid, config_done, busy, uart_overrun, uart_frame_err;
  int checks = 0, failures = 0;

  processor_main dut (
    .clk, .rst_n, .start, .sensor_data, .flash_op, .uart_rxd,
    .spi_sck, .spi_cs_n, .spi_mosi, .spi_miso,
    .data_out, .data_valid, .config_done, .busy, .uart_overrun, .uart_frame_err);

  s25fl_model #(.MEM_BYTES(1024), .BUSY_POLLS(3)) u_flash (
    .sck(spi_sck), .cs_n(spi_cs_n), .mosi(spi_mosi), .miso(spi_miso));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (4000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ events
  int n_load = 0, n_op[4] = '{0, 0, 0, 0}, n_fpu_wait = 0, n_end = 0, n_valid = 0, n_uart = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.rd_done) n_load++;
    if (dut.ctrl.fpu_en) n_op[int'(dut.ir.op)]++;
    if (dut.u_ctrl.state == dut.u_ctrl.EXECUTE && dut.u_ctrl.phase == dut.u_ctrl.PH_WAIT && !dut.fpu_ready)
      n_fpu_wait++;
    if (dut.ctrl.proc_out_en) n_end++;
    if (data_valid) n_valid++;
    if (dut.rx_ack) n_uart++;
  end

  // ------------------------------------------------------------ image
  function automatic logic [INSTR_W-1:0] ins(input int sel, input fpu_op_e op,
                                             input int s1, input int s2, input int d);
    instr_t i;
    i.mux_sel = SEL_W'(sel);
    i.op      = op;
    i.src1    = RF_AW'(s1);
    i.src2    = RF_AW'(s2);
    i.dest    = RF_AW'(d);
    return INSTR_W'(i);
  endfunction

  // program for B_cmp; result register 11 (fixed) or 10 (double)
  function automatic void make_prog(output logic [INSTR_W-1:0] p [32], input int out_reg);
    foreach (p[k]) p[k] = ins(0, OP_ADD, 0, 0, 0);
    for (int k = 0; k < 5; k++) p[k] = ins(k + 1, OP_FIX2FLT, 0, 0, k);       // r0..r4 = sensors
    for (int k = 0; k < 5; k++) p[5 + k] = ins(0, OP_MUL, k, 16 + k, 5 + k);  // r5..r9 = products
    p[10] = ins(0, OP_ADD, 5, 6, 10);
    p[11] = ins(0, OP_ADD, 10, 7, 10);
    p[12] = ins(0, OP_ADD, 10, 8, 10);
    p[13] = ins(0, OP_ADD, 10, 9, 10);
    p[14] = ins(0, OP_FLT2FIX, 10, 0, 11);
    p[15] = ins(7, OP_ADD, out_reg, 0, 0);                                  // end pattern
  endfunction

  function automatic void make_image(output logic [7:0] img [224], input real c [5], input int out_reg);
    logic [INSTR_W-1:0] p [32];
    logic [63:0] w;
    make_prog(p, out_reg);
    for (int k = 0; k < 16; k++) begin
      w = (k < 5) ? $realtobits(c[k]) : 64'd0;
      for (int j = 0; j < 8; j++) img[8*k + j] = w[63 - 8*j -: 8];
    end
    for (int k = 0; k < 32; k++) begin
      w = 64'(p[k]);
      for (int j = 0; j < 3; j++) img[128 + 3*k + j] = w[23 - 8*j -: 8];
    end
  endfunction

  // ------------------------------------------------------------ reference
  function automatic real ref_sum(input logic [FIX_W-1:0] s [NS], input real c [5]);
    real x [5], pr [5], acc;
    for (int k = 0; k < 5; k++) begin
      x[k]  = real'($signed(s[k])) / 65536.0;
      pr[k] = x[k] * c[k];
    end
    acc = pr[0] + pr[1];
    acc = acc + pr[2];
    acc = acc + pr[3];
    acc = acc + pr[4];
    return acc;
  endfunction

  function automatic logic [63:0] ref_fix(input real v);
    return 64'(longint'($rtoi(v * 65536.0)));
  endfunction

  // ------------------------------------------------------------ helpers
  task automatic uart_send(input logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int k = 0; k < 10; k++) begin
      uart_rxd = f[k];
      repeat (CPB) @(posedge clk);
    end
  endtask

  task automatic run_once(input real c [5], input bit fixed_out, input int cycles_exp);
    real v;
    logic [63:0] exp_v;
    int cyc;
    sensor_data[0] = FIX_W'(int'($urandom % 2000001) - 1000000) << 6;  // B_raw
    sensor_data[1] = FIX_W'(int'($urandom % 200001) - 100000) << 6;    // T1
    sensor_data[2] = FIX_W'(int'($urandom % 200001) - 100000) << 6;    // T2
    sensor_data[3] = FIX_W'(int'($urandom % 20001) - 10000) << 6;      // G1
    sensor_data[4] = FIX_W'(int'($urandom % 20001) - 10000) << 6;      // G2
    v = ref_sum(sensor_data, c);
    exp_v = fixed_out ? ref_fix(v) : $realtobits(v);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!data_valid && cyc < 100000) begin @(negedge clk); cyc++; end
    checks += 2;
    if (data_out !== exp_v) begin
      failures++;
      $display("FAIL result %h expected %h (%f)", data_out, exp_v, v);
    end
    if (cyc != cycles_exp) begin
      failures++;
      $display("FAIL run took %0d cycles, expected %0d", cyc, cycles_exp);
    end
  endtask

  // ------------------------------------------------------------ sequence
  initial begin
    real c1 [5], c2 [5];
    logic [7:0] img [224];
    c1 = '{1.0, 0.10, 2.00, 0.23, 2.40};
    c2 = '{1.0, 0.50, 2.00, 0.23, 2.40};
    foreach (sensor_data[k]) sensor_data[k] = '0;
    make_image(img, c1, 11);
    foreach (img[k]) u_flash.mem[k] = img[k];

    repeat (5) @(posedge clk);
    rst_n = 1;
    wait (config_done);
    @(negedge clk);
    checks++;
    if (dut.u_ctrl.state != dut.u_ctrl.IDLE) begin failures++; $display("FAIL not idle after load"); end

    // Start to data_valid: 1 + 5 x fixed-to-float (7) + 5 x multiply (62)
    // + 4 x add (10) + float-to-fixed (7) + end (4) = 397 cycles.
    for (int r = 0; r < 20; r++) run_once(c1, 1'b1, 397);

    // reprogram the flash over the UART
    make_image(img, c2, 10);
    flash_op = 1;
    repeat (2000) @(posedge clk);
    foreach (img[k]) uart_send(img[k]);
    repeat (2000) @(posedge clk);
    checks++;
    for (int k = 0; k < 224; k++)
      if (u_flash.mem[k] !== img[k]) begin
        failures++;
        $display("FAIL flash byte %0d = %h expected %h", k, u_flash.mem[k], img[k]);
        break;
      end
    flash_op = 0;
    repeat (5) @(posedge clk);
    wait (config_done);
    @(negedge clk);
    for (int r = 0; r < 20; r++) run_once(c2, 1'b0, 397);

    repeat (2) @(posedge clk);
    // every mechanism must have occurred
    checks += 14;
    if (n_load < 2)                 begin failures++; $display("FAIL flash loads %0d", n_load); end
    if (n_op[OP_FIX2FLT] == 0)      begin failures++; $display("FAIL no fixed-to-float"); end
    if (n_op[OP_FLT2FIX] == 0)      begin failures++; $display("FAIL no float-to-fixed"); end
    if (n_op[OP_ADD] == 0)          begin failures++; $display("FAIL no add"); end
    if (n_op[OP_MUL] == 0)          begin failures++; $display("FAIL no multiply"); end
    if (n_fpu_wait == 0)            begin failures++; $display("FAIL never waited for the FPU"); end
    if (n_end != 40)                begin failures++; $display("FAIL end patterns %0d", n_end); end
    if (n_valid != 40)              begin failures++; $display("FAIL output loads %0d", n_valid); end
    if (n_uart != 224)              begin failures++; $display("FAIL uart bytes %0d", n_uart); end
    if (u_flash.n_se != 1)          begin failures++; $display("FAIL sector erases %0d", u_flash.n_se); end
    if (u_flash.n_pp != 224)        begin failures++; $display("FAIL page programs %0d", u_flash.n_pp); end
    if (u_flash.n_busy_polls == 0)  begin failures++; $display("FAIL never polled busy"); end
    if (u_flash.n_read != 2)        begin failures++; $display("FAIL flash reads %0d", u_flash.n_read); end
    if (uart_overrun || uart_frame_err) begin failures++; $display("FAIL uart error"); end
    $display("events: loads=%0d fix2flt=%0d flt2fix=%0d add=%0d mul=%0d fpu_wait=%0d end=%0d uart=%0d se=%0d pp=%0d polls=%0d",
             n_load, n_op[0], n_op[1], n_op[2], n_op[3], n_fpu_wait, n_end, n_uart,
             u_flash.n_se, u_flash.n_pp, u_flash.n_busy_polls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
