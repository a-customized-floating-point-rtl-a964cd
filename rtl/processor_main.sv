// processor_main: programmable double-precision computational unit for the
// thermal compensation of high-precision sensors.
//
// A small Harvard processor whose only arithmetic is a double-precision
// FPU (fixed-to-float, float-to-fixed, add, multiply). Its program and
// coefficients live in an external SPI flash and are copied into the
// instruction memory and the register file after reset, so the
// compensation polynomial can be changed without changing the hardware.
// On each start pulse the control unit runs the program over the sensor
// inputs and puts the result on data_out, pulsing data_valid.
//
// flash_op selects the flash's mode: 0, normal operation (the flash is
// read into the memories after reset and whenever flash_op returns to 0);
// 1, reprogramming, where each byte received on uart_rxd is written into
// the flash at the next address, starting from 0 after a sector erase.
// The SPI pins belong to the reading module while it is loading and to the
// writing module otherwise.
//
// The partitioning (datapath, control unit, FPU, flash reading and writing
// modules, UART receiver) follows the document; sizes, encodings and the
// reload rule are this design's choices, listed in the module headers.
module processor_main
  import fpp_pkg::*;
#(
  parameter int unsigned N_SENSORS    = 5,
  parameter int unsigned CLK_DIV      = 2,
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [FIX_W-1:0] sensor_data [N_SENSORS],
  input  logic             flash_op,
  input  logic             uart_rxd,
  output logic             spi_sck,
  output logic             spi_cs_n,
  output logic             spi_mosi,
  input  logic             spi_miso,
  output logic [DW-1:0]    data_out,
  output logic             data_valid,
  output logic             config_done,
  output logic             busy,
  output logic             uart_overrun,
  output logic             uart_frame_err
);
  localparam int unsigned PC_W = 5;

  ctrl_t              ctrl;
  logic [INSTR_W-1:0] instr;
  instr_t             ir;
  logic               fpu_ready;

  logic               rd_start, rd_busy, rd_done;
  logic               ld_rf_we, ld_im_we;
  logic [RF_AW-1:0]   ld_rf_addr;
  logic [DW-1:0]      ld_rf_data;
  logic [PC_W-1:0]    ld_im_addr;
  logic [INSTR_W-1:0] ld_im_data;
  logic               rd_sck, rd_cs_n, rd_mosi;

  logic               wr_busy, wr_sck, wr_cs_n, wr_mosi;
  logic [7:0]         rx_data;
  logic               rx_valid, rx_ack;

  logic               reload_pend, flash_op_q;

  // ---------------------------------------------------------------- reload
  assign rd_start = reload_pend && !flash_op && !wr_busy && !rd_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reload_pend <= 1'b1;
      flash_op_q  <= 1'b0;
      config_done <= 1'b0;
    end else begin
      flash_op_q <= flash_op;
      if (flash_op_q && !flash_op) reload_pend <= 1'b1;
      else if (rd_start)           reload_pend <= 1'b0;
      if (rd_start)     config_done <= 1'b0;
      else if (rd_done) config_done <= 1'b1;
    end
  end

  // ---------------------------------------------------------------- core
  control_unit u_ctrl (
    .clk, .rst_n, .cfg_start(rd_start), .cfg_done(rd_done), .start,
    .instr, .ir, .fpu_ready, .ctrl, .busy);

  datapath #(.N_SENSORS(N_SENSORS), .PC_W(PC_W)) u_dp (
    .clk, .rst_n, .ctrl, .sensor_data,
    .ld_rf_we, .ld_rf_addr, .ld_rf_data, .ld_im_we, .ld_im_addr, .ld_im_data,
    .instr, .ir, .fpu_ready, .data_out, .data_valid);

  // ---------------------------------------------------------------- flash
  spi_flash_reader #(.CLK_DIV(CLK_DIV), .N_COEF(2**RF_AW / 2), .N_INSTR(2**PC_W),
                     .COEF_BASE(2**RF_AW / 2), .PC_W(PC_W)) u_rd (
    .clk, .rst_n, .start(rd_start), .busy(rd_busy), .done(rd_done),
    .spi_sck(rd_sck), .spi_cs_n(rd_cs_n), .spi_mosi(rd_mosi), .spi_miso,
    .rf_we(ld_rf_we), .rf_addr(ld_rf_addr), .rf_wdata(ld_rf_data),
    .im_we(ld_im_we), .im_addr(ld_im_addr), .im_wdata(ld_im_data));

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart (
    .clk, .rst_n, .rxd(uart_rxd), .ack(rx_ack), .data(rx_data), .valid(rx_valid),
    .overrun(uart_overrun), .frame_err(uart_frame_err));

  spi_flash_writer #(.CLK_DIV(CLK_DIV)) u_wr (
    .clk, .rst_n, .en(flash_op && !rd_busy), .rx_data, .rx_valid, .rx_ack, .busy(wr_busy),
    .spi_sck(wr_sck), .spi_cs_n(wr_cs_n), .spi_mosi(wr_mosi), .spi_miso);

  assign spi_sck  = rd_busy ? rd_sck  : wr_sck;
  assign spi_cs_n = rd_busy ? rd_cs_n : wr_cs_n;
  assign spi_mosi = rd_busy ? rd_mosi : wr_mosi;

  // The two flash modules never drive the flash at the same time.
  a_one_master: assert property (@(posedge clk) disable iff (!rst_n) !(rd_busy && wr_busy));
endmodule
