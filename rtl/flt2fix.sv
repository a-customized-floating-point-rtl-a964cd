// flt2fix: converts an IEEE-754 double into a signed fixed-point number
// (FIX_W bits, FRAC of them fraction), sign-extended to 64 bits.
//
// S_IDLE unpacks the operand and computes k = unbiased exponent + FRAC,
// the position of the leading one in the fixed-point result. S_CONV
// shifts the 53-bit significand right by 52-k (truncating toward zero),
// saturates when k >= FIX_W-1, gives zero when k < 0 or the input is zero
// or NaN, and applies the sign. The conversion follows the document;
// truncation, saturation and the NaN result are this design's choices.
//
// Interface: pulse start with a; done pulses two cycles later with result
// valid.
module flt2fix
#(
  parameter int unsigned FIX_W = 32,
  parameter int unsigned FRAC  = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [fpp_pkg::DW-1:0] a,
  output logic          done,
  output logic [fpp_pkg::DW-1:0] result
);
  logic               busy, sign, is_nan;
  logic signed [13:0] k;
  logic [52:0]        mant;
  logic [FIX_W-1:0]   mag, fix;

  always_comb begin
    mag = '0;
    fix = '0;
    if (is_nan || k < 0) begin
      fix = '0;
    end else if (k >= 14'(FIX_W - 1)) begin
      fix = sign ? {1'b1, {(FIX_W-1){1'b0}}} : {1'b0, {(FIX_W-1){1'b1}}};
    end else begin
      mag = FIX_W'(mant >> (14'sd52 - k));
      fix = sign ? (~mag + 1'b1) : mag;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      sign   <= 1'b0;
      is_nan <= 1'b0;
      k      <= '0;
      mant   <= '0;
      result <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy   <= 1'b1;
        sign   <= a[63];
        is_nan <= (a[62:52] == 11'h7FF) && (a[51:0] != 0);
        // zero and subnormals: force k negative so the result is 0
        k      <= (a[62:52] == 0) ? -14'sd1 : 14'(a[62:52]) - 14'sd1023 + 14'(FRAC);
        mant   <= {1'b1, a[51:0]};
      end else if (busy) begin
        busy   <= 1'b0;
        done   <= 1'b1;
        result <= {{(fpp_pkg::DW-FIX_W){fix[FIX_W-1]}}, fix};
      end
    end
  end
endmodule
