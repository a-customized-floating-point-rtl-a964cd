// uart_rx: UART receiver for the flash-programming path.
//
// Receives 8N1 frames (start bit, eight data bits LSB first, stop bit) at
// CLKS_PER_BIT clock cycles per bit. The line is synchronised through two
// flip-flops; each bit is sampled in its middle. A received byte is held in
// data with valid high until the flash writing module acknowledges it with
// ack (a one-byte valid/ack handshake). A byte that completes while the
// previous one is still held is dropped and sets overrun (sticky until
// reset); a frame whose stop bit is 0 is dropped and pulses frame_err.
// The receiver and its handshake with the writing module follow the
// document; frame format, baud rate (115200 at 50 MHz by default) and the
// overrun rule are this design's choices.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  input  logic       ack,
  output logic [7:0] data,
  output logic       valid,
  output logic       overrun,
  output logic       frame_err
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [1:0] {U_IDLE, U_START, U_DATA, U_STOP} state_e;
  state_e state;

  logic [1:0]    sync;
  logic [CW-1:0] cnt;
  logic [2:0]    bitn;
  logic [7:0]    sh;
  logic          rx_s;

  assign rx_s = sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync      <= 2'b11;
      state     <= U_IDLE;
      cnt       <= '0;
      bitn      <= '0;
      sh        <= '0;
      data      <= '0;
      valid     <= 1'b0;
      overrun   <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      sync      <= {sync[0], rxd};
      frame_err <= 1'b0;
      if (ack) valid <= 1'b0;
      unique case (state)
        U_IDLE: if (!rx_s) begin
          cnt   <= '0;
          state <= U_START;
        end
        U_START: begin
          if (cnt == CW'(CLKS_PER_BIT / 2 - 1)) begin
            cnt  <= '0;
            bitn <= '0;
            state <= rx_s ? U_IDLE : U_DATA;   // glitch: not a start bit
          end else cnt <= cnt + 1'b1;
        end
        U_DATA: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt  <= '0;
            sh   <= {rx_s, sh[7:1]};
            bitn <= bitn + 1'b1;
            if (bitn == 3'd7) state <= U_STOP;
          end else cnt <= cnt + 1'b1;
        end
        U_STOP: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            state <= U_IDLE;
            if (!rx_s) begin
              frame_err <= 1'b1;
            end else if (valid && !ack) begin
              overrun <= 1'b1;
            end else begin
              data  <= sh;
              valid <= 1'b1;
            end
          end else cnt <= cnt + 1'b1;
        end
        default: state <= U_IDLE;
      endcase
    end
  end
endmodule
