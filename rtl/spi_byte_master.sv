// spi_byte_master: shifts one byte out and one byte in over SPI, mode 0.
//
// Helper of the flash reading and writing modules, which drive chip select
// themselves. On start it puts bit 7 of tx on mosi, then makes eight SCK
// pulses: the byte from miso is sampled on each rising edge, the next bit
// of tx is put on mosi on each falling edge. Each SCK half-period lasts
// CLK_DIV clock cycles, so SCK = clk / (2*CLK_DIV). done pulses when the
// byte is complete and rx holds the received byte. This helper is this
// design's own choice of how to build the SPI interface.
module spi_byte_master #(
  parameter int unsigned CLK_DIV = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] tx,
  output logic [7:0] rx,
  output logic       done,
  output logic       busy,
  output logic       sck,
  output logic       mosi,
  input  logic       miso
);
  localparam int unsigned DIVW = (CLK_DIV > 1) ? $clog2(CLK_DIV) : 1;

  logic [7:0]      sh;
  logic [2:0]      bitn;
  logic [DIVW-1:0] div;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh   <= '0;
      rx   <= '0;
      bitn <= '0;
      div  <= '0;
      sck  <= 1'b0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          sh   <= tx;
          bitn <= '0;
          div  <= '0;
          sck  <= 1'b0;
        end
      end else if (div == DIVW'(CLK_DIV - 1)) begin
        div <= '0;
        if (!sck) begin
          sck <= 1'b1;
          rx  <= {rx[6:0], miso};
        end else begin
          sck  <= 1'b0;
          sh   <= {sh[6:0], 1'b0};
          bitn <= bitn + 1'b1;
          if (bitn == 3'd7) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end else begin
        div <= div + 1'b1;
      end
    end
  end

  assign mosi = sh[7];
endmodule
