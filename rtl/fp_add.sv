// fp_add: double-precision IEEE-754 adder built as an algorithmic state
// machine.
//
// Steps, one state each: S_IDLE unpacks the operands, resolves NaN,
// infinity and zero directly, and orders the operands by magnitude;
// S_ALIGN shifts the smaller significand right by the exponent difference,
// folding the lost bits into a sticky bit; S_ADD adds or subtracts;
// S_NORM normalises (one right shift on carry, or a left shift by the
// leading-zero count); S_ROUND rounds to nearest even and packs.
// The step-by-step ASM form follows the document; the rounding mode and the
// handling of subnormals (read as zero, results flushed to zero) are this
// design's choices.
//
// Interface: pulse start with a and b; done pulses with result valid
// five cycles later (one cycle for special cases).
module fp_add
  import fpp_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [DW-1:0] a,
  input  logic [DW-1:0] b,
  output logic          done,
  output logic [DW-1:0] result
);
  typedef enum logic [2:0] {S_IDLE, S_ALIGN, S_ADD, S_NORM, S_ROUND} state_e;
  state_e state;

  logic               sign, sub;
  logic signed [13:0] exp;
  logic [10:0]        ediff;
  logic [55:0]        mbig, msmall, mnorm;
  logic [56:0]        sum;

  // unpacked operands
  logic        sa, sb, a_nan, b_nan, a_inf, b_inf, a_zero, b_zero, a_ge_b;
  logic [10:0] ea, eb;
  assign sa     = a[63];
  assign sb     = b[63];
  assign ea     = a[62:52];
  assign eb     = b[62:52];
  assign a_nan  = (ea == 11'h7FF) && (a[51:0] != 0);
  assign b_nan  = (eb == 11'h7FF) && (b[51:0] != 0);
  assign a_inf  = (ea == 11'h7FF) && (a[51:0] == 0);
  assign b_inf  = (eb == 11'h7FF) && (b[51:0] == 0);
  assign a_zero = (ea == 11'd0);
  assign b_zero = (eb == 11'd0);
  assign a_ge_b = a[62:0] >= b[62:0];

  function automatic logic [55:0] shr_sticky(input logic [55:0] v, input logic [10:0] d);
    logic [55:0] s;
    logic        st;
    if (d >= 11'd56) return {55'd0, |v};
    s  = v >> d;
    st = |(v & ~({56{1'b1}} << d));
    return {s[55:1], s[0] | st};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      done   <= 1'b0;
      result <= '0;
      sign   <= 1'b0;
      sub    <= 1'b0;
      exp    <= '0;
      ediff  <= '0;
      mbig   <= '0;
      msmall <= '0;
      mnorm  <= '0;
      sum    <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          if (a_nan || b_nan || (a_inf && b_inf && (sa != sb))) begin
            result <= QNAN;
            done   <= 1'b1;
          end else if (a_inf) begin
            result <= a;
            done   <= 1'b1;
          end else if (b_inf) begin
            result <= b;
            done   <= 1'b1;
          end else if (a_zero && b_zero) begin
            result <= {sa & sb, 63'd0};
            done   <= 1'b1;
          end else if (a_zero) begin
            result <= b;
            done   <= 1'b1;
          end else if (b_zero) begin
            result <= a;
            done   <= 1'b1;
          end else begin
            sub <= sa ^ sb;
            if (a_ge_b) begin
              sign   <= sa;
              exp    <= 14'(ea);
              ediff  <= ea - eb;
              mbig   <= {1'b1, a[51:0], 3'b000};
              msmall <= {1'b1, b[51:0], 3'b000};
            end else begin
              sign   <= sb;
              exp    <= 14'(eb);
              ediff  <= eb - ea;
              mbig   <= {1'b1, b[51:0], 3'b000};
              msmall <= {1'b1, a[51:0], 3'b000};
            end
            state <= S_ALIGN;
          end
        end
        S_ALIGN: begin
          msmall <= shr_sticky(msmall, ediff);
          state  <= S_ADD;
        end
        S_ADD: begin
          sum   <= sub ? {1'b0, mbig} - {1'b0, msmall} : {1'b0, mbig} + {1'b0, msmall};
          state <= S_NORM;
        end
        S_NORM: begin
          if (sum == '0) begin
            result <= '0;           // exact cancellation gives +0
            done   <= 1'b1;
            state  <= S_IDLE;
          end else if (sum[56]) begin
            mnorm <= {sum[56:2], sum[1] | sum[0]};
            exp   <= exp + 14'sd1;
            state <= S_ROUND;
          end else begin
            mnorm <= sum[55:0] << lzc56(sum[55:0]);
            exp   <= exp - 14'(lzc56(sum[55:0]));
            state <= S_ROUND;
          end
        end
        S_ROUND: begin
          result <= round_pack(sign, exp, mnorm);
          done   <= 1'b1;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
