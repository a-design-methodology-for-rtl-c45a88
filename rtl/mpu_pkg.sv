// mpu_pkg: shared types and constants of the small re-configurable MPU.
//
// Commands are 16 bits wide (fixed length), laid out as
//   [15:12] opcode   [11:8] ALU operation or branch condition   [7:0] literal / register / target.
// The 16-bit fixed command length and the 8-bit data length are the design's
// published figures; the opcode map, the field layout and the flag set are
// this implementation's own choices, fitted to the few published example
// commands: 0x12AA / 0x1155 leave 0xAA / 0x55 in the accumulator (opcode 1,
// load literal), and 0x8008 is followed by a fetch from address 0x08
// (opcode 8, jump, condition 0 = always).
// The mapped register numbers R10 (input speed) and R11 (PWM output) follow the
// control program's register use; R12..R15 are this implementation's choice.
package mpu_pkg;

  localparam int CMD_W = 16;  // fixed command length
  localparam int LIT_W = 8;   // literal / register number / target field

  typedef enum logic [3:0] {
    OP_NOP  = 4'h0,  // no operation
    OP_LDI  = 4'h1,  // A <- literal
    OP_LD   = 4'h2,  // A <- R[k]
    OP_ST   = 4'h3,  // R[k] <- A
    OP_ALUR = 4'h4,  // A <- A op R[k]
    OP_ALUI = 4'h5,  // A <- A op literal
    OP_RET  = 4'h6,  // PC <- pop
    OP_CALL = 4'h7,  // push PC+1; PC <- k
    OP_JMP  = 4'h8   // if cond: PC <- k
  } opcode_t;

  typedef enum logic [3:0] {
    ALU_ADD  = 4'h0,  // A + B, C = carry
    ALU_SUB  = 4'h1,  // A - B, C = borrow (A < B unsigned)
    ALU_RSB  = 4'h2,  // B - A, C = borrow
    ALU_CMP  = 4'h3,  // flags of A - B, result not written
    ALU_AND  = 4'h4,
    ALU_OR   = 4'h5,
    ALU_XOR  = 4'h6,
    ALU_SHR  = 4'h7,  // logical shift right by one, C = bit shifted out
    ALU_ASR  = 4'h8,  // arithmetic shift right by one
    ALU_SHL  = 4'h9,  // shift left by one, C = bit shifted out
    ALU_PASS = 4'hA   // B
  } alu_op_t;

  typedef enum logic [3:0] {
    CC_ALWAYS = 4'h0,
    CC_Z      = 4'h1,
    CC_NZ     = 4'h2,
    CC_C      = 4'h3,
    CC_NC     = 4'h4,
    CC_N      = 4'h5,
    CC_NN     = 4'h6
  } cond_t;

  // Source of the ALU's second operand (the selector).
  typedef enum logic {
    SEL_LIT = 1'b0,  // literal field of the command
    SEL_REG = 1'b1   // register file read data
  } sel_t;

  // What the program counter does at the end of an execute cycle.
  typedef enum logic [1:0] {
    PC_INC  = 2'd0,
    PC_JUMP = 2'd1,  // conditional, see cond
    PC_CALL = 2'd2,
    PC_RET  = 2'd3
  } pc_mode_t;

  typedef struct packed {
    logic  z;
    logic  c;
    logic  n;
  } flags_t;

  // Control word produced by the command decoder.
  typedef struct packed {
    sel_t     sel;       // operand source
    alu_op_t  alu_op;    // ALU operation
    logic     a_we;      // write ALU result to A
    logic     flags_we;  // write flags
    logic     rf_we;     // write A to R[k]
    pc_mode_t pc_mode;
    cond_t    cond;
  } ctrl_t;

  // Mapped registers in the register file (decimal register numbers).
  localparam logic [7:0] REG_GPIO_IN  = 8'd10;  // general purpose input (specified speed)
  localparam logic [7:0] REG_SPEED    = 8'd11;  // motor unit Speed Control register (PWM duty)
  localparam logic [7:0] REG_TIMER    = 8'd12;  // motor unit Timer register (PWM prescaler)
  localparam logic [7:0] REG_SETUP    = 8'd13;  // motor unit Setup register
  localparam logic [7:0] REG_MOTOR_IN = 8'd14;  // motor unit input port (detected speed)
  localparam logic [7:0] REG_GPIO_OUT = 8'd15;  // general purpose output

  // Setup register bits.
  localparam int SETUP_EN  = 0;  // PWM enable
  localparam int SETUP_INV = 1;  // PWM output polarity

endpackage
