// fixed_mult: sequential unsigned fixed-point multiplier (shift and add).
//
// The FPU multiplies the 53-bit significands of two doubles with this unit.
// Each cycle adds the multiplicand to the upper half of the partial product
// when the current multiplier bit is one, then shifts the partial product
// right by one. The document only says that a fixed-point multiplier is
// used; the radix-2 shift-and-add structure is this design's choice, chosen
// because it needs no DSP blocks.
//
// Interface: pulse start with a and b; W+1 cycles later done pulses for one
// cycle and p holds the 2W-bit product until the next start.
module fixed_mult #(
  parameter int unsigned W = 53
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic           done,
  output logic [2*W-1:0] p
);
  logic [W-1:0]           mcand;
  logic [2*W-1:0]         acc;     // {high half, remaining multiplier bits}
  logic [$clog2(W+1)-1:0] cnt;
  logic                   busy;
  logic [W:0]             sum;

  assign sum = {1'b0, acc[2*W-1:W]} + (acc[0] ? {1'b0, mcand} : '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      cnt   <= '0;
      acc   <= '0;
      mcand <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy  <= 1'b1;
        mcand <= a;
        acc   <= {{W{1'b0}}, b};
        cnt   <= '0;
      end else if (busy) begin
        acc <= {sum, acc[W-1:1]};
        cnt <= cnt + 1'b1;
        if (cnt == ($clog2(W+1))'(W - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign p = acc;
endmodule
