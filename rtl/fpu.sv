// fpu: the processor's double-precision floating-point unit.
//
// Four operations, chosen by a 2-bit opcode: fixed-to-float (operand a's
// low 32 bits, Q16.16), float-to-fixed (operand a), addition and
// multiplication (a, b). Each operation is its own multi-cycle state
// machine; the FPU starts the chosen one on en and holds its result.
// ready is the handshake with the control unit: it is high when the FPU is
// idle, drops in the cycle after en is accepted and rises again in the
// cycle in which result becomes valid. The four operations, the 2-bit
// opcode, the enable and the ready signal follow the document; the opcode
// encoding (fpp_pkg::fpu_op_e) and the ready timing are this design's.
//
// Latency from en to ready: fixed-to-float 3, float-to-fixed 3, add 6,
// multiply 58 cycles (special operands of add and multiply: 2).
module fpu
  import fpp_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  fpu_op_e       op,
  input  logic [DW-1:0] a,
  input  logic [DW-1:0] b,
  output logic [DW-1:0] result,
  output logic          ready
);
  logic          st_f2d, st_d2f, st_add, st_mul;
  logic          dn_f2d, dn_d2f, dn_add, dn_mul;
  logic [DW-1:0] r_f2d, r_d2f, r_add, r_mul;
  logic          go;

  assign go     = en && ready;
  assign st_f2d = go && (op == OP_FIX2FLT);
  assign st_d2f = go && (op == OP_FLT2FIX);
  assign st_add = go && (op == OP_ADD);
  assign st_mul = go && (op == OP_MUL);

  fix2flt #(.FIX_W(FIX_W), .FRAC(FIX_FRAC)) u_fix2flt (
    .clk, .rst_n, .start(st_f2d), .fix(a[FIX_W-1:0]), .done(dn_f2d), .result(r_f2d));
  flt2fix #(.FIX_W(FIX_W), .FRAC(FIX_FRAC)) u_flt2fix (
    .clk, .rst_n, .start(st_d2f), .a(a), .done(dn_d2f), .result(r_d2f));
  fp_add u_add (.clk, .rst_n, .start(st_add), .a(a), .b(b), .done(dn_add), .result(r_add));
  fp_mul u_mul (.clk, .rst_n, .start(st_mul), .a(a), .b(b), .done(dn_mul), .result(r_mul));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ready  <= 1'b1;
      result <= '0;
    end else begin
      if (go) ready <= 1'b0;
      if (!ready && (dn_f2d || dn_d2f || dn_add || dn_mul)) begin
        ready <= 1'b1;
        unique case (1'b1)
          dn_f2d: result <= r_f2d;
          dn_d2f: result <= r_d2f;
          dn_add: result <= r_add;
          default: result <= r_mul;
        endcase
      end
    end
  end

  // An operation is only started when the FPU is ready.
  a_en_when_ready: assert property (@(posedge clk) disable iff (!rst_n) en |-> ready);
endmodule
