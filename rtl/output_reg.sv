// output_reg: the processor's output register.
//
// When the control unit reaches the end of the program it raises
// PROC_OUT_EN (en) and the register captures the result word from
// register-file bus A; q then stays on the data-out bus for the sensing
// algorithm until the next result. valid pulses for one cycle with each
// new value. The register and its enable follow the document; the valid
// pulse is this design's addition.
module output_reg #(
  parameter int unsigned DW = 64
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [DW-1:0] d,
  output logic [DW-1:0] q,
  output logic          valid
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q     <= '0;
      valid <= 1'b0;
    end else begin
      valid <= en;
      if (en) q <= d;
    end
  end
endmodule
