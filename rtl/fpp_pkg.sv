// fpp_pkg: types, field widths and shared arithmetic helpers of the
// floating-point compensation processor.
//
// The instruction word holds the five fields of the instruction set
// (multiplexer select, FPU opcode, two source addresses, destination
// address). The field names follow the instruction set; their widths and
// order, the opcode encoding and the end-of-program pattern are this
// design's own choices. round_pack() is the shared round-to-nearest-even
// step of the adder and the multiplier.
package fpp_pkg;

  localparam int unsigned DW       = 64;  // double-precision word
  localparam int unsigned FIX_W    = 32;  // sensor fixed-point width
  localparam int unsigned FIX_FRAC = 16;  // fraction bits of the sensor format
  localparam int unsigned RF_AW    = 5;   // register file address (32 words)
  localparam int unsigned SEL_W    = 3;   // MUX_SEL field width

  typedef enum logic [1:0] {
    OP_FIX2FLT = 2'b00,
    OP_FLT2FIX = 2'b01,
    OP_ADD     = 2'b10,
    OP_MUL     = 2'b11
  } fpu_op_e;

  typedef struct packed {
    logic [SEL_W-1:0] mux_sel;
    fpu_op_e          op;
    logic [RF_AW-1:0] src1;
    logic [RF_AW-1:0] src2;
    logic [RF_AW-1:0] dest;
  } instr_t;

  localparam int unsigned INSTR_W = $bits(instr_t);  // 20

  // MUX_SEL codes: 0 = register file bus A, 1..N = sensor N-1,
  // all ones = end of program.
  localparam logic [SEL_W-1:0] SEL_RF  = '0;
  localparam logic [SEL_W-1:0] SEL_END = '1;

  // Control signals from the control unit to the datapath (Table of
  // control signals: ADDR_A, ADDR_B, FPU_EN, WEA, PROC_OUT_EN, PC_EN,
  // PC_RST, INSTR_EXEC_EN). cfg_mode hands the memories' write ports to the
  // flash reading module. FPU_OP and MUX_SEL come from the instruction
  // register itself.
  typedef struct packed {
    logic [RF_AW-1:0] addr_a;
    logic [RF_AW-1:0] addr_b;
    logic             wea;
    logic             fpu_en;
    logic             proc_out_en;
    logic             pc_en;
    logic             pc_rst;
    logic             instr_exec_en;
    logic             cfg_mode;
  } ctrl_t;

  localparam logic [DW-1:0] QNAN = 64'h7FF8_0000_0000_0000;

  // Round a normalised 56-bit significand (bit 55 = hidden one, bits 2..0 =
  // guard, round, sticky) to nearest even and pack it. exp is the biased
  // exponent, signed so that underflow and overflow can be seen. Results
  // below the normal range flush to signed zero, above it go to infinity.
  function automatic logic [DW-1:0] round_pack(input logic sign,
                                               input logic signed [13:0] exp,
                                               input logic [55:0] m);
    logic [53:0] r;
    logic        up;
    logic signed [13:0] e;
    up = m[2] & (m[1] | m[0] | m[3]);
    r  = {1'b0, m[55:3]} + 54'(up);
    e  = exp;
    if (r[53]) begin
      r = r >> 1;
      e = e + 14'sd1;
    end
    if (e >= 14'sd2047)   return {sign, 11'h7FF, 52'd0};
    else if (e <= 14'sd0) return {sign, 63'd0};
    else                  return {sign, e[10:0], r[51:0]};
  endfunction

  // Number of leading zeros of a 56-bit value (56 when it is zero).
  function automatic logic [5:0] lzc56(input logic [55:0] v);
    logic [5:0] n;
    n = 6'd56;
    for (int i = 0; i < 56; i++)
      if (v[i]) n = 6'(55 - i);
    return n;
  endfunction

endpackage
