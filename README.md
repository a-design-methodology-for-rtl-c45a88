# A small re-configurable MPU for motor speed control on an FPGA

This is a tiny accumulator processor meant to sit inside an FPGA next to the
application logic it drives. Processor and application logic are built in
the same style. The processor is cut into independent modules, so it can be
changed piece by piece: another ALU, a wider data bus, a smaller register
file, new commands. The MPU talks to its application logic through ordinary
registers of its register file, with no bus arbitration. The application
here is a DC-motor speed controller. A user sets the wanted speed on a
general purpose port. An off-chip A/D converter measures the actual speed
from the motor's back EMF. A program in on-chip memory turns the difference
into a PWM drive value.

The architecture follows the paper "A Design Methodology for Re-Configurable
MPU for an Embedded System and Software on an FPGA" (H. Araki, T. Kutsuwa,
K. Harashima). That paper gives:
- the block structure,
- the 16-bit command and 8-bit data widths,
- the memory sizes,
- the motor unit's three registers,
- the control algorithm.

It does not give an instruction set, timing, flags or register encodings.
Those are this implementation's own, and each RTL file says which parts are
which.

## Block structure

```
            +-----------------+     ext_pc_req/addr/ack
            | program_counter |<----------------------------- external unit
            |  + stack_unit   |<--------------------+
            +--------+--------+                     | target (literal)
                     | pc                           |
            +--------v--------+  cmd_bus   +--------+---------+
            | program_memory  +----------->| command_register |
            |   256 x 16      |            +--------+---------+
            +-----------------+                     | cmd
                                           +--------v---------+   ctrl_t
                                           | command_decoder  +--------+
                                           +------------------+        |
                                           +------------------+        |
                                           |command_controller|<-------+ flags
                                           +--+----+----+-----+
                          rf_we |  a_we/flags_we |    | pc_step, take
   gpio_in -> ext_io -> R10     v                v
   motor_in -> pwm_ctrl -> R14 +---------------+  operand  +-----+  y  +------------+
                               | register_file +-->selector+>| ALU +---->| a_register |
   R11 speed, R12 timer, <-----+ 256 x DATA_W  |   ^ literal +-----+     |  A + flags |
   R13 setup -> pwm_controller +-------^-------+                 ^       +-----+------+
   R15 -> ext_io -> gpio_out           |  wdata = A              +--- A -------+
                                       +-------------------------------------+
```

`mpu_system` is the top. It holds:
- `reset_ctrl`: asynchronous assert, release on the second clock edge;
- the `mpu` core;
- `pwm_controller`: the motor control unit;
- `ext_io`: the 8-bit general purpose port.

`mpu_pkg` holds the opcode, ALU-operation, condition and control-word types
and the register map.

## Commands and timing

Every command is 16 bits:

| bits  | 15:12  | 11:8                       | 7:0                                   |
|-------|--------|----------------------------|---------------------------------------|
| field | opcode | ALU operation or condition | literal, register number or target    |

| opcode | name | effect                                   | flags  |
|--------|------|------------------------------------------|--------|
| 0      | NOP  | -                                        | -      |
| 1      | LDI  | A = literal                              | Z N, C=0 |
| 2      | LD   | A = R[k]                                 | Z N, C=0 |
| 3      | ST   | R[k] = A                                 | -      |
| 4      | ALUR | A = A op R[k]                            | Z C N  |
| 5      | ALUI | A = A op literal                         | Z C N  |
| 6      | RET  | PC = pop                                 | -      |
| 7      | CALL | push PC+1, PC = k                        | -      |
| 8      | JMP  | if condition: PC = k                     | -      |

ALU operations, in bits 11:8:

| code | op  | result                                      |
|------|-----|---------------------------------------------|
| 0    | ADD | A + B. C is the carry out                    |
| 1    | SUB | A - B. C is the borrow (A < B unsigned)      |
| 2    | RSB | B - A. With literal 0 this negates A         |
| 3    | CMP | flags of A - B. A is unchanged               |
| 4    | AND | A & B                                        |
| 5    | OR  | A \| B                                       |
| 6    | XOR | A ^ B                                        |
| 7    | SHR | logical shift right. C is the bit shifted out |
| 8    | ASR | arithmetic shift right                       |
| 9    | SHL | shift left. C is the bit shifted out         |
| A    | PASS | B                                          |

Jump conditions, in bits 11:8:
- 0: always
- 1: Z
- 2: NZ
- 3: C
- 4: NC
- 5: N
- 6: NN

Unused opcodes execute as NOP. The map is fitted to the few example commands
published for the original design. `12AA` and `1155` load 0xAA and 0x55 into
the accumulator, so they decode as LDI. `8008` is followed by a fetch from
address 0x08, so it decodes as an unconditional jump.

Each command takes **two clock cycles**. In FETCH, the command register
loads the program memory word at the PC. Program memory reads
asynchronously. In EXECUTE, the decoded control word is applied. The
accumulator, the flags, one register-file register and the PC are all
written on the edge that closes the EXECUTE cycle. The register file has a
single port, like an FPGA memory-cell block: one address, the command's
literal, serves both read and write. It reads asynchronously, so an ALU command with a register operand completes in
that one execute cycle.

The return stack holds 4 addresses. A CALL onto a full stack or a RET from
an empty one is ignored (the PC just steps) and sets the sticky `stack_err`
output.

**External PC load.** Another unit can redirect the program. It holds
`ext_pc_req` with an address on `ext_pc_addr` until `ext_pc_ack` pulses.
The request is served at the end of the next execute cycle. It replaces
whatever that command would have done to the PC, including a call's push or
a return's pop. Its other effects (register or accumulator writes) still
happen. An assertion checks that a request is held until it is acknowledged.

## Register map and the motor control unit

| register | access | meaning |
|----------|--------|---------|
| R10 | read  | general purpose input port: wanted speed Ws (two-flop synchronised) |
| R11 | r/w   | Speed Control: PWM duty, `speed`/256 of the period |
| R12 | r/w   | Timer: PWM prescaler, one PWM step every `timer`+1 clocks |
| R13 | r/w   | Setup: bit 0 enable, bit 1 output polarity |
| R14 | read  | motor unit input port: measured speed Wd (two-flop synchronised) |
| R15 | r/w   | general purpose output port (out one clock later) |
| others | r/w | plain storage, memory cells, not reset |

The source gives R10 as the input read and R11 as the output written. It
also names Speed Control, Timer and Setup registers and an input port. The
other register numbers and the meaning of each register's bits are this
implementation's choice.

One rule of the motor unit comes from the source: a write to Speed or Setup
takes effect at once, but a Timer write does not. Here the new timer value
is adopted only at the end of the current PWM period, which `pwm_period_end`
marks. A timer change therefore never cuts a period short. The PWM period is
`2**DATA_W × (timer+1)` clocks, which is 256 clocks at reset (timer 0).
The output is active for `speed × (timer+1)` of them.

## The control program

`rtl/motor_ctrl_prog.hex` (44 commands) implements this loop:

1. initialise R0-R3, Speed = 0, Timer = 0, Setup = enable;
2. call a routine that copies Ws (R10) to R0 and Wd (R14) to R1;
3. compute Diff = Wd - Ws. It is 8 bits with a borrow, so the sign is exact
   over the full 0-255 range;
4. set the step Aw:

   | Diff | Aw |
   |------|----|
   | = 0 | 0 |
   | 0 < Diff < 8 | Diff/2 (1 if that is 0) |
   | ≥ 8 | +1 |
   | -8 < Diff < 0 | Diff/2 rounded toward zero (-1 if that is 0) |
   | ≤ -8 | -1 |

5. write Wo = Wd + Aw (mod 256) to Speed Control (R11) and to the GPIO
   output (R15), then repeat from step 2.

This is the rule as the source's flow chart states it, including its sign
convention: Diff > 0 counts as acceleration, and Wo is Wd plus the step.
Note that with this convention a motor whose speed follows Wo would move
away from Ws, not toward it. The source's plotted speed trace shows the
motor tracking Ws, which suggests the opposite sign. If you want
closed-loop tracking, swap the operands of the subtraction. The RTL does not
care which rule you use; only the program changes.

The image, as address, word and mnemonic. Register use: R0 = Ws, R1 = Wd,
R2 = Aw, R3 = Wo. `xxxR k` is ALU operation xxx with register k (opcode 4),
`xxxI k` the same with a literal (opcode 5). `JMP A` jumps always.

```
init:
  00  1000  LDI 0
  01  3000  ST 0
  02  3001  ST 1
  03  3002  ST 2
  04  3003  ST 3
  05  300b  ST 11     ; speed control = 0
  06  300c  ST 12     ; timer = 0 (PWM tick every clock)
  07  300f  ST 15
  08  1001  LDI 1
  09  300d  ST 13     ; setup: enable PWM
loop:
  0a  7027  CALL read_in
  0b  2001  LD 1
  0c  4100  SUBR 0    ; A = Wd - Ws, C = borrow (Wd < Ws)
  0d  8120  JMP Z zero
  0e  8316  JMP C neg
pos:
  0f  5308  CMPI 8
  10  8414  JMP NC aw_p1 ; diff >= 8
  11  5700  SHRI      ; diff / 2
  12  8114  JMP Z aw_p1
  13  8021  JMP A store
aw_p1:
  14  1001  LDI 1
  15  8021  JMP A store
neg:
  16  2000  LD 0
  17  4101  SUBR 1    ; A = Ws - Wd = -diff
  18  5308  CMPI 8
  19  841e  JMP NC aw_m1 ; diff <= -8
  1a  5700  SHRI
  1b  811e  JMP Z aw_m1
  1c  5200  RSBI 0    ; A = -(|diff| / 2)
  1d  8021  JMP A store
aw_m1:
  1e  10ff  LDI 0xff
  1f  8021  JMP A store
zero:
  20  1000  LDI 0
store:
  21  3002  ST 2      ; Aw
  22  4001  ADDR 1    ; Wo = Wd + Aw
  23  3003  ST 3
  24  300b  ST 11     ; to PWM speed control register
  25  300f  ST 15     ; echo on GPIO out
  26  800a  JMP A loop
read_in:
  27  200a  LD 10     ; Ws from GPIO
  28  3000  ST 0
  29  200e  LD 14     ; Wd from motor unit input port
  2a  3001  ST 1
  2b  6000  RET
```

Loop period is two clocks per command executed:

| path | commands | clocks |
|------|----------|--------|
| equal | 16 | 32 |
| Diff ≥ 8 | 20 | 40 |
| 0 < Diff < 8, Aw ≠ 0 | 21 | 42 |
| Diff = 1 | 22 | 44 |
| Diff ≤ -8 | 22 | 44 |
| -8 < Diff < 0 | 24 | 48 |

The end-to-end testbench checks these periods.

## Configurations

| parameter | default | other values | notes |
|-----------|---------|--------------|-------|
| `DATA_W` | 8 | 4, 16, 32 | data bus, accumulator, registers, motor unit |
| `NUM_REGS` | 256 | 16 | 16 is the variant whose registers fit in logic cells |
| `PROG_DEPTH` | 256 | | 16-bit words |
| `STACK_DEPTH` | 4 | | return addresses |
| `PROG_FILE` | `rtl/motor_ctrl_prog.hex` | | program image, path relative to the project root |

Memory bits are `PROG_DEPTH×16 + NUM_REGS×DATA_W`. With the defaults that is
4,096 + 2,048 = 6,144. At 4, 16 and 32 bits it is 5,120, 8,192 and 12,288.
With 16 registers in logic it is 4,096. These figures match the memory use
reported for the original ACEX1K implementation. Widening the bus costs
memory much faster than logic, because the register file grows with the
width.

The literal field stays 8 bits whatever the data width. At `DATA_W=4`, LDI
keeps only the low 4 bits. Above 8 bits the literal is zero-extended. Jump
targets are 8-bit literals, so the program space is 256 words at every
width.

The source also reports two and three copies of the MPU on a larger device.
Each copy is simply another `mpu` instance. No multi-processor top is
provided, because the source describes no connection between the copies.

## Where this departs from or goes beyond the source

- The instruction set, the encoding, the flags, the two-cycle timing, the
  stack depth and the stack error behaviour are all this design's own.
- Jump and call targets come from the command literal. The source routes a
  new PC value over the data bus, which cannot carry 8-bit addresses when
  the bus is 4 bits wide.
- The selector has two inputs: the command literal and register data. The
  paths the source draws from program memory and the bus into the selector
  reach it through the command register and the register file.
- The source calls the MPU-to-peripheral registers asynchronous,
  single-direction, FIFO-like ports. Here they are plain registers in one
  clock domain, and both input ports have two-flop synchronisers.
- The source lets the application logic optionally attach to the MPU's
  internal bus. That path, and extra parallel ALUs, are not built; the motor
  unit uses the register path.
- The A/D converter, the motor and the clock source are outside the RTL.
  The A/D output is the `motor_in` port.
- Program memory is initialised with `$readmemh`. FPGA tools turn this into
  the memory's configuration contents. Some generic synthesis front ends
  ignore it and would see an empty ROM.

## Simulating

Each block has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and stops itself after a fixed cycle
budget. Run the commands from the project root, because the hex images are
opened by paths relative to it:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    rtl/mpu_pkg.sv tb/tb_mpu_system.sv --top-module tb_mpu_system -o sim
./obj_dir/sim
```

- `tb_mpu_system`: the whole chip at default size, running the control
  program. It drives (Ws, Wd) pairs and checks three things against a
  reference of the rule: Wo on `gpio_out`, the PWM duty over a whole period,
  and the loop period. It also restarts the program through the external PC
  port, counts every branch of the rule and every call/return, and fails if
  a branch is never taken.
- `tb_mpu`: runs `tb/mpu_test_prog.hex`, which exercises every command and
  condition plus nested calls. It checks the final registers (worked out by
  hand) and that the end is reached after 43 commands, which is 86 clocks.
- `tb_mpu_widths`: runs the core at 4, 16 and 32 bits and with 16
  registers. It compares each against a command-level reference model in
  the testbench. The 16-register core also runs the motor program.
- `tb_alu`, `tb_stack_unit`, `tb_program_counter`, `tb_program_memory`
  (uses `tb/pmem_test.hex`), `tb_command_register`, `tb_command_decoder`,
  `tb_command_controller`, `tb_register_file`, `tb_selector`,
  `tb_a_register`, `tb_pwm_controller`, `tb_ext_io`, `tb_reset_ctrl`: the
  individual blocks.

To change the program, write a new hex image with one 16-bit word per line,
using the encoding above. Point `PROG_FILE` at it.
