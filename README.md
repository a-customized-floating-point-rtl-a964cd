# Floating-point compensation processor for high-precision sensors

Many precision sensors, such as a barometric altimeter, drift with temperature. Both the
scale factor and the offset change with the temperature. The usual fix is a model fitted
offline, in practice a polynomial in temperatures and temperature gradients. For example:

    B_cmp = Ksf * B_raw + a1*T1 + a2*T2 + a3*G1 + a4*G2

The model is then evaluated in real time on the sensor's output. It needs wide dynamic range
and high precision at once, so it is computed in IEEE-754 double precision. It must also stay
re-programmable after the sensor has been built, because each unit gets its own coefficients
during calibration.

This RTL is a small, vendor-independent processor built for that job. It uses no IP cores and
no DSP blocks, so the same source targets any FPGA or an ASIC. It has four parts:

* a double-precision **FPU** with exactly four operations: fixed-to-float, float-to-fixed, add
  and multiply;
* a **Harvard datapath**: a 64-bit dual-port register file for coefficients and
  intermediate results, a separate instruction memory, a program counter, an instruction
  register, a sensor multiplexer and an output register;
* a six-state **control unit** that runs the stored program once per `start` pulse;
* a **flash subsystem**. After reset it copies the coefficients and the program from an
  external SPI NOR flash (Spansion S25FL256S command set) into the two memories. When
  `flash_op = 1` it rewrites that flash with bytes received from a PC over a UART.

A compensation run is a straight-line program. It converts the sensor readings to double,
multiplies and adds them with the coefficients, converts the result back to fixed point and
ends with an *end pattern*. The end pattern copies the result to `data_out`.

## Programming model

### Instruction word (20 bits)

| bits  | field        | meaning |
|-------|--------------|---------|
| 19:17 | `MUX_SEL`    | operand A source: 0 = register file bus A, k = 1..5 = sensor k-1, 7 = end pattern |
| 16:15 | `FPU_OPCODE` | 00 fixed-to-float, 01 float-to-fixed, 10 add, 11 multiply |
| 14:10 | `SRC-ADDR-1` | register read on bus A (used when `MUX_SEL` = 0) |
| 9:5   | `SRC-ADDR-2` | register read on bus B, always operand B |
| 4:0   | `DEST-ADDR`  | register that receives the result |

The package `fpp_pkg` defines these fields as `instr_t`, the opcodes as `fpu_op_e` and the
control bundle as `ctrl_t`. An instruction with `MUX_SEL = 7` ends the program. Its
`SRC-ADDR-1` names the register that is copied to `data_out`. The other fields are ignored.

Each operation uses its operands as follows:

* **fixed-to-float** reads the low 32 bits of operand A as Q16.16 (two's complement, 16
  fraction bits). This is the sensor format.
* **float-to-fixed** writes a Q16.16 value to the register, sign-extended to 64 bits.
* **add** and **multiply** take A and B.

The usual pattern is `MUX_SEL = k, FIX2FLT` to bring in a sensor, then `MUX_SEL = 0` for the
arithmetic.

### Register file map

32 words of 64 bits. Addresses 16..31 hold coefficients and are loaded from flash. Addresses
0..15 are working registers for results. A program may also overwrite a coefficient, but the
value is lost until the next flash load.

### Flash image

The image starts at flash address 0. All of it is read with one `READ` (03h) command.

| bytes    | content |
|----------|---------|
| 0..127   | 16 coefficients → registers 16..31, 8 bytes each, most significant byte first (IEEE double) |
| 128..223 | 32 instructions → instruction memory 0..31, 3 bytes each, most significant byte first, low 20 bits used |

### Example: the compensation equation above

With B_raw, T1, T2, G1 and G2 on sensor inputs 0..4, and Ksf, a1..a4 in registers 16..20:

    0-4   FIX2FLT  sel=k+1            -> r0..r4     sensors to double
    5-9   MUL      r(k) * r(16+k)     -> r5..r9
    10    ADD      r5 + r6            -> r10
    11-13 ADD      r10 + r7/r8/r9     -> r10
    14    FLT2FIX  r10                -> r11
    15    END      output r11

The program has 16 instructions. A run takes 397 clock cycles from the `start` pulse to
`data_valid`.

## The FPU

`fpu` starts the selected unit when `en` is high and `ready` is high. `ready` drops in the next
cycle. It rises again in the cycle in which `result` is valid. The control unit only ever
waits for `ready`, so the units can have any latency. Latency from `en` to `ready`:

| operation | cycles | unit |
|-----------|--------|------|
| fixed-to-float | 3 | `fix2flt` |
| float-to-fixed | 3 | `flt2fix` |
| add | 6 (2 for NaN/inf/zero operands) | `fp_add` |
| multiply | 58 (2 for NaN/inf/zero operands) | `fp_mul` + `fixed_mult` |

**Adder (`fp_add`).** This is a state machine with one step per state:

1. *Unpack.* Special operands are handled here. NaN gives the quiet NaN 7FF8...0. inf − inf
   gives NaN. An operand that is zero returns the other operand. The larger-magnitude operand
   is taken as the reference.
2. *Align.* The smaller significand is shifted right by the exponent difference. Three extra
   low bits carry the guard, round and sticky information, and every bit shifted out is ORed
   into the sticky bit.
3. *Add or subtract.*
4. *Normalise.* On a carry the sum is shifted right by one. Otherwise it is shifted left by its
   leading-zero count. Exact cancellation gives +0.
5. *Round and pack.* Rounding is to nearest, ties to even. The shared function
   `fpp_pkg::round_pack` does this step, also for the multiplier.

**Multiplier (`fp_mul`).** The two 53-bit significands, hidden one included, are multiplied by
`fixed_mult`. It is a radix-2 shift-and-add multiplier that takes 53 cycles and uses no
hardware multiplier. The 106-bit product is normalised to 55 bits plus sticky, and the
exponents are added. The result is rounded like the adder's.

**Conversions.** `fix2flt` normalises the magnitude with a leading-zero count. A 32-bit input
always fits in 53 bits, so the conversion is exact. `flt2fix` shifts the significand to the
Q16.16 binary point and truncates toward zero. It saturates at ±2^15 and gives 0 for NaN and
for values below 2^-16.

The bits of a result agree with IEEE-754 round-to-nearest-even for normal operands and
results. There are deliberate simplifications:

* Subnormal inputs are read as zero.
* Results below the normal range are flushed to signed zero.
* Overflow gives a signed infinity.
* No exception flags are kept.

## Control unit and timing

`control_unit` has six states: CONFIG_MEM, IDLE, FETCH, DECODE, EXECUTE and INSTR_COMP.

* **CONFIG_MEM** hands the register file's port B and the instruction memory to the flash
  reader until the load is done.
* **IDLE** waits for `start`.
* **FETCH** and **DECODE** take one cycle each. The memories read synchronously. In DECODE the
  fetched word is latched into the instruction register and checked for the end pattern.
* **EXECUTE** goes through internal phases: read the operands (1 cycle), pulse `FPU_EN`
  (1 cycle), then wait for `ready`. In the cycle where `ready` is seen it writes the result to
  `DEST-ADDR` through port A and pulses `PC_EN`.
* **INSTR_COMP** reads `SRC-ADDR-1` (1 cycle). It then pulses `PROC_OUT_EN`, which loads the
  output register, and `PC_RST`, and returns to IDLE.

One instruction therefore takes 4 + FPU latency cycles: 7 for a conversion, 10 for an add and
62 for a multiply. The end pattern takes 4 cycles. `data_valid` pulses one cycle after
`PROC_OUT_EN`.

The control signals have the names of the original design: `ADDR_A`, `ADDR_B`, `FPU_EN`,
`WEA`, `PROC_OUT_EN`, `PC_EN`, `PC_RST` and `INSTR_EXEC_EN`, all in `ctrl_t`. `FPU_OP` and
`MUX_SEL` go from the instruction register straight to the FPU and the multiplexer. Port B of
the register file is written only during configuration.

## Flash loading and re-programming

**Loading (`spi_flash_reader`).** A load runs after reset, and again each time `flash_op`
returns to 0. It starts only when the writer is idle. The reader lowers chip select, sends
03h and a 24-bit address 0, then streams 224 bytes. It writes each coefficient to port B as
its 8th byte arrives and each instruction to the instruction memory as its 3rd byte arrives.
SPI runs in mode 0 with SCK = clk/(2·`CLK_DIV`). One byte takes 16·`CLK_DIV` + 2 cycles, so a
load takes about 7,750 cycles at the default `CLK_DIV` = 2. `config_done` rises when the load
is complete. `start` is ignored until then.

**Re-programming (`uart_rx`, `spi_flash_writer`).** While `flash_op = 1` the writer owns the
flash:

1. It sends WREN (06h), then a 64 KB sector erase (D8h) at address 0. It then polls RDSR
   (05h) until the write-in-progress bit clears.
2. `uart_rx` receives 8N1 bytes at `CLKS_PER_BIT` clocks per bit (default 434, which is
   115200 baud at 50 MHz). It holds each byte with `valid` until the writer acknowledges it.
3. For each byte the writer sends WREN, then PAGE PROGRAM (02h) with the next address, then
   polls RDSR.

A byte that arrives while the previous one is still unacknowledged is dropped and sets
`uart_overrun`. A bad stop bit pulses `uart_frame_err`. The PC sends the whole 224-byte image
in order. Lowering `flash_op` then reloads the memories from the new image.

The SPI pins belong to the reader while it is loading and to the writer otherwise. An
assertion checks that the two never work at the same time.

## Interface of `processor_main`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `start` | in | 1 | run the program once |
| `sensor_data` | in | 5 × 32 | Q16.16 sensor inputs |
| `flash_op` | in | 1 | 0 = run / load from flash, 1 = write flash from UART |
| `uart_rxd` | in | 1 | UART line from the PC (after the RS-232/RS-422 transceiver) |
| `spi_sck`, `spi_cs_n`, `spi_mosi`, `spi_miso` | | 1 | SPI flash |
| `data_out` | out | 64 | output register |
| `data_valid` | out | 1 | one-cycle pulse on each new result |
| `config_done` | out | 1 | memories hold a complete image |
| `busy` | out | 1 | control unit not in IDLE |
| `uart_overrun`, `uart_frame_err` | out | 1 | UART errors |

Parameters: `N_SENSORS` (default 5), `CLK_DIV` (default 2) and `CLKS_PER_BIT` (default 434).
Widths and depths are set in `fpp_pkg`: 32 registers, 32 instructions and Q16.16 sensors.

## Choices made here

The original design fixes the block structure, the six states, the control-signal names, the
five instruction fields, the four FPU operations with a 2-bit opcode and an enable/ready
handshake, the coefficient/result split of the register file, the order of the flash load
(coefficients through port B first, then instructions) and the UART-to-flash write path. The
following are this implementation's own choices:

* the field widths and order, the opcode encoding and the end pattern (`MUX_SEL` all ones);
* the memory sizes: 32 × 64-bit registers and 32 instructions;
* the Q16.16 sensor format, with truncation and saturation on the way back to fixed point;
* round-to-nearest-even, flush-to-zero for subnormals, and no exception flags;
* write-back through port A, with operand B always from bus B;
* the flash image layout, one continuous READ, the sector erase before writing, and one PAGE
  PROGRAM per received byte;
* reloading the flash when `flash_op` falls, UART 8N1 with overrun detection, and the
  `data_valid` pulse.

Not included: the RS-232/RS-422 transceiver, the flash chip itself and the sensors. These are
external parts. `tb/s25fl_model.sv` is a behavioural model of the flash commands used here. It
models only a small part of the array and stands in for program and erase time by a number of
status polls.

## Simulating

Every testbench checks itself and prints `TB_RESULT checks=N failures=M`. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/fpp_pkg.sv tb/tb_processor_main.sv \
        --top-module tb_processor_main -Mdir obj && obj/Vtb_processor_main

* `tb/tb_processor_main.sv` runs the whole processor at its default parameters.
  1. It loads an image with the compensation program and the nominal coefficients (Ksf = 1,
     a1 = 0.10, a2 = 2.00, a3 = 0.23, a4 = 2.40).
  2. It runs 20 random sensor sets and compares the results with the simulator's own double
     arithmetic.
  3. It re-programs the flash over the UART with a1 = 0.5 and a program that outputs the
     double result, reloads, and checks 20 more runs bit-exactly.
  4. It fails if any mechanism never occurred: load, each FPU operation, FPU wait, end
     pattern, UART byte, erase, program, status polling or reload.
* `tb/tb_poly_horner.sv` evaluates temperature polynomials of growing degree, written in
  Horner form, on the whole processor.
* The other `tb/tb_<module>.sv` files test one module each. The arithmetic testbenches compare
  thousands of random operands bit-exactly against the simulator's IEEE doubles and check
  the latencies.

## Files

`rtl/`:

* `fpp_pkg.sv`: types and rounding.
* `processor_main.sv`: top level.
* `control_unit.sv`, `datapath.sv`.
* `regfile.sv`, `instr_mem.sv`, `program_counter.sv`, `instr_reg.sv`, `sensor_mux.sv`,
  `output_reg.sv`.
* `fpu.sv`, `fp_add.sv`, `fp_mul.sv`, `fixed_mult.sv`, `fix2flt.sv`, `flt2fix.sv`.
* `spi_byte_master.sv`, `spi_flash_reader.sv`, `spi_flash_writer.sv`, `uart_rx.sv`.

`tb/`: one testbench per module, plus `s25fl_model.sv`.
