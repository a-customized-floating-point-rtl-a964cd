// fix2flt: converts a signed fixed-point number (FIX_W bits, FRAC of them
// fraction) into an IEEE-754 double.
//
// S_IDLE takes the sign and the magnitude of the input. S_NORM counts the
// leading zeros of the magnitude, shifts the leading one into the hidden
// position and sets the exponent to 1023 + (FIX_W-1-lz) - FRAC. Because
// FIX_W is at most 53 every input is exactly representable and no rounding
// is needed. The conversion itself follows the document; the Q16.16 sensor
// format is this design's choice.
//
// Interface: pulse start with fix; done pulses two cycles later with
// result valid.
module fix2flt
#(
  parameter int unsigned FIX_W = 32,
  parameter int unsigned FRAC  = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [FIX_W-1:0] fix,
  output logic             done,
  output logic [fpp_pkg::DW-1:0]    result
);
  localparam int unsigned LZW = $clog2(FIX_W + 1);

  logic             busy, sign;
  logic [FIX_W-1:0] mag, norm;
  logic [LZW-1:0]   lz;
  logic [10:0]      exp;

  always_comb begin
    lz = LZW'(FIX_W);
    for (int i = 0; i < FIX_W; i++)
      if (mag[i]) lz = LZW'(FIX_W - 1 - i);
    norm = mag << lz;
    exp  = 11'(1023 + FIX_W - 1 - FRAC) - 11'(lz);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      sign   <= 1'b0;
      mag    <= '0;
      result <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        sign <= fix[FIX_W-1];
        mag  <= fix[FIX_W-1] ? (~fix + 1'b1) : fix;
      end else if (busy) begin
        busy <= 1'b0;
        done <= 1'b1;
        if (mag == '0) result <= '0;
        else           result <= {sign, exp, 52'(norm[FIX_W-2:0]) << (53 - FIX_W)};
      end
    end
  end
endmodule
