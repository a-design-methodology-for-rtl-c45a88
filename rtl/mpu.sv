// mpu: the re-configurable 8-bit MPU core.
//
// An accumulator machine with 16-bit fixed-length commands and a DATA_W-bit
// data path (8 bits by default; 4, 16 and 32 are the other published widths).
// Program counter -> program memory -> command bus -> command register ->
// command decoder -> command controller form the control path. The data path
// runs from the register file and the command literal through the selector to
// the ALU, whose result loads the A register; the A register is written back
// to the register file. Everything is point-to-point multiplexed wiring; the
// "data bus" and "command bus" are the nets bus_* and cmd_bus below.
//
// Timing: each command takes two clock cycles, a fetch cycle that loads the
// command register and an execute cycle in which the accumulator, flags,
// register file and PC are written on the closing edge.
//
// External units may load the PC through ext_pc_req / ext_pc_addr; the
// request is served at the end of an execute cycle and acknowledged on
// ext_pc_ack in that cycle (see program_counter).
//
// Peripheral side: the register file exposes the motor unit's Speed Control,
// Timer and Setup registers and the GPIO output register, and reads the
// synchronised GPIO input and motor input port. See mpu_pkg for the command
// encoding. The module split (decoder, controller, register file, PC with
// stack, ALU, selector, A register) is the published design's; the instruction set
// and timing are this design's.
module mpu
  import mpu_pkg::*;
#(
  parameter int    DATA_W      = 8,
  parameter int    NUM_REGS    = 256,
  parameter int    PROG_DEPTH  = 256,
  parameter int    STACK_DEPTH = 4,
  parameter string PROG_FILE   = "rtl/motor_ctrl_prog.hex",
  localparam int   PC_W        = $clog2(PROG_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] gpio_in,
  input  logic [DATA_W-1:0] motor_in,
  output logic [DATA_W-1:0] speed_reg,
  output logic [DATA_W-1:0] timer_reg,
  output logic [DATA_W-1:0] setup_reg,
  output logic [DATA_W-1:0] gpio_out_reg,
  input  logic              ext_pc_req,   // external unit loads the PC
  input  logic [PC_W-1:0]   ext_pc_addr,
  output logic              ext_pc_ack,
  output logic [PC_W-1:0]   pc,
  output logic [DATA_W-1:0] acc,
  output logic              exec,
  output logic              stack_err
);

  // command path
  logic [CMD_W-1:0]  cmd_bus, cmd;
  logic [LIT_W-1:0]  lit;
  ctrl_t             ctrl;
  logic              cmd_load, pc_step, take, a_we, flags_we, rf_we, alu_wr;
  // data path
  logic [DATA_W-1:0] bus_rf, bus_operand, bus_alu;
  flags_t            alu_flags, flags;

  assign lit = cmd[LIT_W-1:0];

  program_counter #(.PC_W(PC_W), .STACK_DEPTH(STACK_DEPTH)) u_pc (
    .clk       (clk),
    .rst_n     (rst_n),
    .step      (pc_step),
    .mode      (ctrl.pc_mode),
    .take      (take),
    .target    (lit[PC_W-1:0]),
    .ext_req   (ext_pc_req),
    .ext_addr  (ext_pc_addr),
    .ext_ack   (ext_pc_ack),
    .pc        (pc),
    .stack_err (stack_err)
  );

  program_memory #(.DEPTH(PROG_DEPTH), .WIDTH(CMD_W), .INIT_FILE(PROG_FILE)) u_pmem (
    .addr (pc),
    .data (cmd_bus)
  );

  command_register #(.WIDTH(CMD_W)) u_cmdreg (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (cmd_load),
    .d     (cmd_bus),
    .q     (cmd)
  );

  command_decoder u_dec (
    .cmd  (cmd),
    .ctrl (ctrl)
  );

  command_controller u_ctl (
    .clk      (clk),
    .rst_n    (rst_n),
    .ctrl     (ctrl),
    .flags    (flags),
    .alu_wr   (alu_wr),
    .cmd_load (cmd_load),
    .pc_step  (pc_step),
    .take     (take),
    .a_we     (a_we),
    .flags_we (flags_we),
    .rf_we    (rf_we),
    .exec     (exec)
  );

  register_file #(.DATA_W(DATA_W), .NUM_REGS(NUM_REGS)) u_rf (
    .clk          (clk),
    .rst_n        (rst_n),
    .addr         (lit),
    .rdata        (bus_rf),
    .we           (rf_we),
    .wdata        (acc),
    .gpio_in      (gpio_in),
    .motor_in     (motor_in),
    .speed_reg    (speed_reg),
    .timer_reg    (timer_reg),
    .setup_reg    (setup_reg),
    .gpio_out_reg (gpio_out_reg)
  );

  selector #(.DATA_W(DATA_W)) u_sel (
    .sel      (ctrl.sel),
    .lit      (lit),
    .reg_data (bus_rf),
    .operand  (bus_operand)
  );

  alu #(.DATA_W(DATA_W)) u_alu (
    .op        (ctrl.alu_op),
    .a         (acc),
    .b         (bus_operand),
    .y         (bus_alu),
    .flags     (alu_flags),
    .wr_result (alu_wr)
  );

  a_register #(.DATA_W(DATA_W)) u_areg (
    .clk      (clk),
    .rst_n    (rst_n),
    .a_we     (a_we),
    .a_d      (bus_alu),
    .flags_we (flags_we),
    .flags_d  (alu_flags),
    .a_q      (acc),
    .flags_q  (flags)
  );

endmodule
