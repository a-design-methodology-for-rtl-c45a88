// mpu_system: the single-chip motor speed controller built around the MPU.
//
// One MPU, its motor control unit (PWM generator with Speed Control, Timer
// and Setup registers and an input port for the detected speed), an 8-bit
// general purpose I/O port and the reset controller. The user sets the wanted
// speed on gpio_in; the A/D converter outside the chip delivers the speed
// measured from the motor's back EMF on motor_in; the program in program
// memory (rtl/motor_ctrl_prog.hex) compares the two, works out an angular
// acceleration step and writes the new drive value to the Speed Control
// register, which sets the PWM duty of pwm_out. The same value is echoed on
// gpio_out. An external unit can redirect the program through ext_pc_req /
// ext_pc_addr (acknowledged on ext_pc_ack), e.g. to restart it at address 0.
//
// Clock and reset: one clock; rst_n_in is an asynchronous active-low request,
// released synchronously by reset_ctrl. Inputs are synchronised (two flops)
// before the MPU reads them. The system structure follows the published design; the
// chip-level port list is this design's.
module mpu_system
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
  input  logic              rst_n_in,
  input  logic [DATA_W-1:0] gpio_in,
  output logic [DATA_W-1:0] gpio_out,
  input  logic [DATA_W-1:0] motor_in,
  output logic              pwm_out,
  output logic              pwm_period_end,
  input  logic              ext_pc_req,  // external unit loads the PC
  input  logic [PC_W-1:0]   ext_pc_addr,
  output logic              ext_pc_ack,
  output logic [PC_W-1:0]   pc,         // observation: program counter
  output logic [DATA_W-1:0] acc,        // observation: accumulator
  output logic              exec,       // observation: execute phase
  output logic              stack_err   // sticky stack over/underflow
);

  logic              rst_n;
  logic [DATA_W-1:0] gpio_sync, gpio_out_reg, detected;
  logic [DATA_W-1:0] speed_reg, timer_reg, setup_reg;

  reset_ctrl u_rst (
    .clk      (clk),
    .rst_n_in (rst_n_in),
    .rst_n    (rst_n)
  );

  mpu #(
    .DATA_W      (DATA_W),
    .NUM_REGS    (NUM_REGS),
    .PROG_DEPTH  (PROG_DEPTH),
    .STACK_DEPTH (STACK_DEPTH),
    .PROG_FILE   (PROG_FILE)
  ) u_mpu (
    .clk          (clk),
    .rst_n        (rst_n),
    .gpio_in      (gpio_sync),
    .motor_in     (detected),
    .speed_reg    (speed_reg),
    .timer_reg    (timer_reg),
    .setup_reg    (setup_reg),
    .gpio_out_reg (gpio_out_reg),
    .ext_pc_req   (ext_pc_req),
    .ext_pc_addr  (ext_pc_addr),
    .ext_pc_ack   (ext_pc_ack),
    .pc           (pc),
    .acc          (acc),
    .exec         (exec),
    .stack_err    (stack_err)
  );

  pwm_controller #(.DATA_W(DATA_W)) u_pwm (
    .clk        (clk),
    .rst_n      (rst_n),
    .speed      (speed_reg),
    .timer      (timer_reg),
    .setup      (setup_reg),
    .motor_in   (motor_in),
    .detected   (detected),
    .pwm_out    (pwm_out),
    .period_end (pwm_period_end)
  );

  ext_io #(.DATA_W(DATA_W)) u_io (
    .clk      (clk),
    .rst_n    (rst_n),
    .pins_in  (gpio_in),
    .in_sync  (gpio_sync),
    .out_reg  (gpio_out_reg),
    .pins_out (gpio_out)
  );

endmodule
