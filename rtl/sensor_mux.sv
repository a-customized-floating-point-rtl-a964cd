// sensor_mux: operand multiplexer in front of the FPU.
//
// Chooses the FPU's first operand from register-file bus A (MUX_SEL = 0)
// or one of N_SENSORS fixed-point sensor inputs (MUX_SEL = k selects
// sensor k-1, sign-extended to 64 bits). Unused codes give zero. The
// multiplexer and its select lines follow the document; the code
// assignment and five sensors (the raw offset, two temperatures and two
// temperature gradients of the compensation equation) are this design's
// choices. Purely combinational.
module sensor_mux
  import fpp_pkg::*;
#(
  parameter int unsigned N_SENSORS = 5
) (
  input  logic [SEL_W-1:0] sel,
  input  logic [DW-1:0]    rf_a,
  input  logic [FIX_W-1:0] sensor_data [N_SENSORS],
  output logic [DW-1:0]    y
);
  always_comb begin
    y = '0;
    if (sel == SEL_RF) begin
      y = rf_a;
    end else begin
      for (int k = 0; k < N_SENSORS; k++)
        if (int'(sel) == k + 1)
          y = {{(DW-FIX_W){sensor_data[k][FIX_W-1]}}, sensor_data[k]};
    end
  end
endmodule
