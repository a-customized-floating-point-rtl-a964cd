// control_unit: the processor's finite-state machine.
//
// Six states, as in the document:
//   CONFIG_MEM  wait while the flash reading module loads the coefficients
//               and the program (cfg_start enters it from any state,
//               cfg_done leaves it);
//   IDLE        wait for the external start trigger;
//   FETCH       read the instruction memory at the program counter;
//   DECODE      load the instruction register; an instruction whose MUX_SEL
//               is all ones is the end pattern and leads to INSTR_COMP;
//   EXECUTE     read the operands, start the FPU, wait for its ready
//               signal, write the result to DEST-ADDR through port A and
//               advance the program counter;
//   INSTR_COMP  copy the register named by SRC-ADDR-1 of the end
//               instruction into the output register, reset the PC, and
//               return to IDLE.
// Because the memories read synchronously, EXECUTE and INSTR_COMP each run
// through short internal phases (a phase register, not extra states). The
// states and the control signals follow the document; the phases, the
// end-pattern encoding and the choice of port A for write-back are this
// design's choices.
//
// Timing per instruction: FETCH 1 + DECODE 1 + EXECUTE (2 + FPU latency),
// e.g. 8 cycles for fixed-to-float and 62 for a multiplication.
module control_unit
  import fpp_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cfg_start,
  input  logic               cfg_done,
  input  logic               start,
  input  logic [INSTR_W-1:0] instr,      // instruction memory output
  input  instr_t             ir,         // instruction register
  input  logic               fpu_ready,
  output ctrl_t              ctrl,
  output logic               busy
);
  typedef enum logic [2:0] {
    CONFIG_MEM, IDLE, FETCH, DECODE, EXECUTE, INSTR_COMP
  } state_e;
  typedef enum logic [1:0] {PH_READ, PH_GO, PH_WAIT} phase_e;

  state_e state;
  phase_e phase;
  instr_t fetched;

  assign fetched = instr_t'(instr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= CONFIG_MEM;
      phase <= PH_READ;
    end else if (cfg_start) begin
      state <= CONFIG_MEM;
      phase <= PH_READ;
    end else begin
      unique case (state)
        CONFIG_MEM: if (cfg_done) state <= IDLE;
        IDLE:       if (start) state <= FETCH;
        FETCH:      state <= DECODE;
        DECODE: begin
          phase <= PH_READ;
          state <= (fetched.mux_sel == SEL_END) ? INSTR_COMP : EXECUTE;
        end
        EXECUTE: unique case (phase)
          PH_READ: phase <= PH_GO;
          PH_GO:   phase <= PH_WAIT;
          default: if (fpu_ready) state <= FETCH;
        endcase
        INSTR_COMP: begin
          if (phase == PH_READ) phase <= PH_GO;
          else                  state <= IDLE;
        end
        default: state <= CONFIG_MEM;
      endcase
    end
  end

  always_comb begin
    ctrl          = '0;
    ctrl.addr_a   = ir.src1;
    ctrl.addr_b   = ir.src2;
    ctrl.cfg_mode = (state == CONFIG_MEM);
    unique case (state)
      DECODE: ctrl.instr_exec_en = 1'b1;
      EXECUTE: begin
        if (phase == PH_GO) ctrl.fpu_en = 1'b1;
        if (phase == PH_WAIT && fpu_ready) begin
          ctrl.addr_a = ir.dest;
          ctrl.wea    = 1'b1;
          ctrl.pc_en  = 1'b1;
        end
      end
      INSTR_COMP: if (phase == PH_GO) begin
        ctrl.proc_out_en = 1'b1;
        ctrl.pc_rst      = 1'b1;
      end
      default: ;
    endcase
  end

  assign busy = (state != IDLE);
endmodule
