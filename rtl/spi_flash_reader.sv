// spi_flash_reader: loads the processor's memories from the SPI flash.
//
// On start it lowers chip select, sends the READ command (03h) with the
// 3-byte address 0, and then reads a continuous stream: first N_COEF
// coefficients of 8 bytes each (most significant byte first), written one
// by one into the register file through port B at addresses COEF_BASE,
// COEF_BASE+1, ...; then N_INSTR instructions of 3 bytes each, written into
// the instruction memory from address 0. It then raises chip select and
// pulses done. Coefficients first, then instructions, through bus B of the
// register file, follows the document; the flash layout, the READ command
// of the S25FL256S and the SPI clock divider are this design's choices.
//
// Timing: (4 + 8*N_COEF + 3*N_INSTR) bytes of 16*CLK_DIV + 2 cycles each,
// about 7,750 cycles with the defaults.
module spi_flash_reader
  import fpp_pkg::*;
#(
  parameter int unsigned CLK_DIV   = 2,
  parameter int unsigned N_COEF    = 16,
  parameter int unsigned N_INSTR   = 32,
  parameter int unsigned COEF_BASE = 16,
  parameter int unsigned PC_W      = 5
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  output logic               busy,
  output logic               done,
  // SPI pins
  output logic               spi_sck,
  output logic               spi_cs_n,
  output logic               spi_mosi,
  input  logic               spi_miso,
  // register file port B
  output logic               rf_we,
  output logic [RF_AW-1:0]   rf_addr,
  output logic [DW-1:0]      rf_wdata,
  // instruction memory
  output logic               im_we,
  output logic [PC_W-1:0]    im_addr,
  output logic [INSTR_W-1:0] im_wdata
);
  localparam logic [7:0] CMD_READ = 8'h03;
  localparam int unsigned IB = (INSTR_W + 7) / 8;   // bytes per instruction

  typedef enum logic [2:0] {R_IDLE, R_HEADER, R_COEF, R_INSTR, R_END} state_e;
  state_e state;

  logic       b_start, b_done, b_busy;
  logic [7:0] b_tx, b_rx;
  logic [1:0] hdr_n;        // header byte index
  logic [2:0] byte_n;       // byte index within a word
  logic [7:0] word_n;       // word index
  logic [DW-1:0] shreg;
  logic       issued;

  spi_byte_master #(.CLK_DIV(CLK_DIV)) u_spi (
    .clk, .rst_n, .start(b_start), .tx(b_tx), .rx(b_rx), .done(b_done), .busy(b_busy),
    .sck(spi_sck), .mosi(spi_mosi), .miso(spi_miso));

  assign b_tx    = (state == R_HEADER && hdr_n == 2'd0) ? CMD_READ : 8'h00;
  assign b_start = (state inside {R_HEADER, R_COEF, R_INSTR}) && !issued;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= R_IDLE;
      spi_cs_n <= 1'b1;
      done     <= 1'b0;
      issued   <= 1'b0;
      hdr_n    <= '0;
      byte_n   <= '0;
      word_n   <= '0;
      shreg    <= '0;
      rf_we    <= 1'b0;
      rf_addr  <= '0;
      rf_wdata <= '0;
      im_we    <= 1'b0;
      im_addr  <= '0;
      im_wdata <= '0;
    end else begin
      done  <= 1'b0;
      rf_we <= 1'b0;
      im_we <= 1'b0;
      if (b_start) issued <= 1'b1;
      if (b_done)  issued <= 1'b0;
      unique case (state)
        R_IDLE: if (start) begin
          spi_cs_n <= 1'b0;
          hdr_n    <= '0;
          state    <= R_HEADER;
        end
        R_HEADER: if (b_done) begin
          hdr_n <= hdr_n + 1'b1;
          if (hdr_n == 2'd3) begin
            byte_n <= '0;
            word_n <= '0;
            state  <= (N_COEF > 0) ? R_COEF : R_INSTR;
          end
        end
        R_COEF: if (b_done) begin
          shreg  <= {shreg[DW-9:0], b_rx};
          byte_n <= byte_n + 1'b1;
          if (byte_n == 3'd7) begin
            byte_n   <= '0;
            rf_we    <= 1'b1;
            rf_addr  <= RF_AW'(COEF_BASE + word_n);
            rf_wdata <= {shreg[DW-9:0], b_rx};
            word_n   <= word_n + 1'b1;
            if (word_n == 8'(N_COEF - 1)) begin
              word_n <= '0;
              state  <= R_INSTR;
            end
          end
        end
        R_INSTR: if (b_done) begin
          shreg  <= {shreg[DW-9:0], b_rx};
          byte_n <= byte_n + 1'b1;
          if (byte_n == 3'(IB - 1)) begin
            byte_n   <= '0;
            im_we    <= 1'b1;
            im_addr  <= PC_W'(word_n);
            im_wdata <= INSTR_W'({shreg[DW-9:0], b_rx});
            word_n   <= word_n + 1'b1;
            if (word_n == 8'(N_INSTR - 1)) state <= R_END;
          end
        end
        R_END: begin
          spi_cs_n <= 1'b1;
          done     <= 1'b1;
          state    <= R_IDLE;
        end
        default: state <= R_IDLE;
      endcase
    end
  end

  assign busy = (state != R_IDLE);
endmodule
