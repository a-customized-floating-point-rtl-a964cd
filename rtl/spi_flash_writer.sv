// spi_flash_writer: writes bytes received from the PC into the SPI flash.
//
// While en (flash_op) is high the module owns the flash. On entering write
// mode it enables writing (WREN, 06h), erases the 64 KB sector at address
// 0 (SE, D8h) and polls the status register (RDSR, 05h) until the
// write-in-progress bit clears. It then waits for bytes from the UART
// receiver: each byte is acknowledged, and written with WREN followed by
// PAGE PROGRAM (02h) at the next address (0, 1, 2, ...), again polling
// RDSR until the flash is ready. When en falls while waiting for a byte it
// returns to idle. Writing each received byte to the flash as it arrives,
// with a handshake to the UART receiver, follows the document; the erase,
// one byte per program command and the polling are this design's choices,
// based on the command set of the S25FL256S.
//
// Interface: rx_data/rx_valid/rx_ack is the handshake with uart_rx. busy is
// high whenever a flash transaction is pending. Between two commands chip
// select stays high for GAP clock cycles.
module spi_flash_writer #(
  parameter int unsigned CLK_DIV = 2,
  parameter int unsigned GAP     = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [7:0] rx_data,
  input  logic       rx_valid,
  output logic       rx_ack,
  output logic       busy,
  output logic       spi_sck,
  output logic       spi_cs_n,
  output logic       spi_mosi,
  input  logic       spi_miso
);
  localparam logic [7:0] CMD_WREN = 8'h06;
  localparam logic [7:0] CMD_SE   = 8'hD8;
  localparam logic [7:0] CMD_RDSR = 8'h05;
  localparam logic [7:0] CMD_PP   = 8'h02;

  typedef enum logic [2:0] {
    W_IDLE, W_ERASE_WREN, W_ERASE, W_ERASE_POLL, W_WAIT, W_PP_WREN, W_PP, W_PP_POLL
  } step_e;
  typedef enum logic [1:0] {T_IDLE, T_SEND, T_POLL, T_GAP} txn_e;

  step_e       step;
  txn_e        txn;
  logic [23:0] addr;
  logic [7:0]  data;
  logic [7:0]  buf_b [5];
  logic [2:0]  len, idx;
  logic        poll;
  logic [$clog2(GAP+1)-1:0] gap;

  logic       b_start, b_done, b_busy, issued;
  logic [7:0] b_tx, b_rx;

  spi_byte_master #(.CLK_DIV(CLK_DIV)) u_spi (
    .clk, .rst_n, .start(b_start), .tx(b_tx), .rx(b_rx), .done(b_done), .busy(b_busy),
    .sck(spi_sck), .mosi(spi_mosi), .miso(spi_miso));

  assign b_tx    = (txn == T_SEND) ? buf_b[idx] : 8'h00;
  assign b_start = (txn inside {T_SEND, T_POLL}) && !issued;

  // command bytes of the transaction for a step
  always_comb begin
    buf_b = '{default: 8'h00};
    len   = 3'd1;
    poll  = 1'b0;
    unique case (step)
      W_ERASE_WREN, W_PP_WREN: buf_b[0] = CMD_WREN;
      W_ERASE: begin
        buf_b = '{CMD_SE, addr[23:16], addr[15:8], addr[7:0], 8'h00};
        len   = 3'd4;
      end
      W_PP: begin
        buf_b = '{CMD_PP, addr[23:16], addr[15:8], addr[7:0], data};
        len   = 3'd5;
      end
      W_ERASE_POLL, W_PP_POLL: begin
        buf_b[0] = CMD_RDSR;
        poll     = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step     <= W_IDLE;
      txn      <= T_IDLE;
      addr     <= '0;
      data     <= '0;
      idx      <= '0;
      gap      <= '0;
      issued   <= 1'b0;
      spi_cs_n <= 1'b1;
      rx_ack   <= 1'b0;
    end else begin
      rx_ack <= 1'b0;
      if (b_start) issued <= 1'b1;
      if (b_done)  issued <= 1'b0;
      unique case (step)
        W_IDLE: if (en) begin
          addr <= '0;
          step <= W_ERASE_WREN;
        end
        W_WAIT: begin
          if (rx_valid && !rx_ack) begin
            data   <= rx_data;
            rx_ack <= 1'b1;
            step   <= W_PP_WREN;
          end else if (!en) begin
            step <= W_IDLE;
          end
        end
        default: unique case (txn)
          T_IDLE: begin
            spi_cs_n <= 1'b0;
            idx      <= '0;
            txn      <= T_SEND;
          end
          T_SEND: if (b_done) begin
            if (idx == len - 1'b1) txn <= poll ? T_POLL : T_GAP;
            else                   idx <= idx + 1'b1;
          end
          T_POLL: if (b_done && !b_rx[0]) txn <= T_GAP;
          T_GAP: begin
            if (spi_cs_n == 1'b0) begin
              spi_cs_n <= 1'b1;
              gap      <= '0;
            end else if (gap == ($clog2(GAP+1))'(GAP - 1)) begin
              txn <= T_IDLE;
              unique case (step)
                W_ERASE_WREN: step <= W_ERASE;
                W_ERASE:      step <= W_ERASE_POLL;
                W_PP_WREN:    step <= W_PP;
                W_PP:         step <= W_PP_POLL;
                W_PP_POLL: begin
                  addr <= addr + 1'b1;
                  step <= W_WAIT;
                end
                default:      step <= W_WAIT;
              endcase
            end else begin
              gap <= gap + 1'b1;
            end
          end
          default: txn <= T_IDLE;
        endcase
      endcase
    end
  end

  assign busy = !(step inside {W_IDLE, W_WAIT});
endmodule
