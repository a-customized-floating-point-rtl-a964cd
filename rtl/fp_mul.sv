// fp_mul: double-precision IEEE-754 multiplier built as an algorithmic state
// machine around the sequential fixed-point multiplier.
//
// S_IDLE unpacks the operands, resolves NaN, infinity and zero directly,
// adds the exponents and starts fixed_mult on the two 53-bit significands
// (hidden one included). S_WAIT waits for the 106-bit product. S_NORM
// takes the product's top 55 bits plus a sticky bit, adjusting the exponent
// when the product is 2 or more. S_ROUND rounds to nearest even and packs.
// Using a fixed-point multiplier for the significands follows the
// document; rounding mode and subnormal handling (read as zero, results
// flushed to zero) are this design's choices.
//
// Interface: pulse start with a and b; done pulses with result valid 57
// cycles later (one cycle for special cases).
module fp_mul
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
  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_NORM, S_ROUND} state_e;
  state_e state;

  logic               sign;
  logic signed [13:0] exp;
  logic [55:0]        mnorm;
  logic               m_start, m_done;
  logic [52:0]        m_a, m_b;
  logic [105:0]       prod;

  logic [10:0] ea, eb;
  logic        a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;
  assign ea     = a[62:52];
  assign eb     = b[62:52];
  assign a_nan  = (ea == 11'h7FF) && (a[51:0] != 0);
  assign b_nan  = (eb == 11'h7FF) && (b[51:0] != 0);
  assign a_inf  = (ea == 11'h7FF) && (a[51:0] == 0);
  assign b_inf  = (eb == 11'h7FF) && (b[51:0] == 0);
  assign a_zero = (ea == 11'd0);
  assign b_zero = (eb == 11'd0);

  assign m_a = {1'b1, a[51:0]};
  assign m_b = {1'b1, b[51:0]};
  assign m_start = (state == S_IDLE) && start && !(a_nan || b_nan || a_inf || b_inf || a_zero || b_zero);

  fixed_mult #(.W(53)) u_mant (
    .clk, .rst_n, .start(m_start), .a(m_a), .b(m_b), .done(m_done), .p(prod)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      done   <= 1'b0;
      result <= '0;
      sign   <= 1'b0;
      exp    <= '0;
      mnorm  <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          sign <= a[63] ^ b[63];
          exp  <= 14'(ea) + 14'(eb) - 14'sd1023;
          if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero)) begin
            result <= QNAN;
            done   <= 1'b1;
          end else if (a_inf || b_inf) begin
            result <= {a[63] ^ b[63], 11'h7FF, 52'd0};
            done   <= 1'b1;
          end else if (a_zero || b_zero) begin
            result <= {a[63] ^ b[63], 63'd0};
            done   <= 1'b1;
          end else begin
            state <= S_WAIT;
          end
        end
        S_WAIT: if (m_done) state <= S_NORM;
        S_NORM: begin
          if (prod[105]) begin
            mnorm <= {prod[105:51], |prod[50:0]};
            exp   <= exp + 14'sd1;
          end else begin
            mnorm <= {prod[104:50], |prod[49:0]};
          end
          state <= S_ROUND;
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
