// register_file: the MPU's data registers and its window on the peripherals.
//
// NUM_REGS registers of DATA_W bits (256 by default, meant for FPGA memory
// cells; 16 reproduces the variant kept in logic cells). A single port, as
// an FPGA memory-cell block offers: one address `addr` selects the register
// that is read asynchronously on `rdata` and, when `we` is high, written on
// the rising edge. Some register numbers are mapped to hardware instead of storage:
//   R10 reads the general purpose input port (live value, writes ignored),
//   R11 Speed Control, R12 Timer and R13 Setup are flip-flop registers whose
//       values drive the motor control unit continuously,
//   R14 reads the motor unit's input port (live value, writes ignored),
//   R15 drives the general purpose output port.
// The mapped registers reset to 0; the storage array is not reset, the
// program initialises what it uses. Connecting the peripherals through
// registers of the MPU follows the published design; the register numbers R12..R15
// are this design's choice.
module register_file
  import mpu_pkg::*;
#(
  parameter int DATA_W   = 8,
  parameter int NUM_REGS = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [LIT_W-1:0]  addr,
  output logic [DATA_W-1:0] rdata,
  input  logic              we,
  input  logic [DATA_W-1:0] wdata,
  // peripherals
  input  logic [DATA_W-1:0] gpio_in,
  input  logic [DATA_W-1:0] motor_in,
  output logic [DATA_W-1:0] speed_reg,
  output logic [DATA_W-1:0] timer_reg,
  output logic [DATA_W-1:0] setup_reg,
  output logic [DATA_W-1:0] gpio_out_reg
);

  localparam int IDX_W = (NUM_REGS > 1) ? $clog2(NUM_REGS) : 1;

  logic [DATA_W-1:0] mem [NUM_REGS];
  logic [IDX_W-1:0]  idx;

  assign idx = IDX_W'(addr);

  always_ff @(posedge clk) begin
    if (we) mem[idx] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      speed_reg    <= '0;
      timer_reg    <= '0;
      setup_reg    <= '0;
      gpio_out_reg <= '0;
    end else if (we) begin
      unique case (addr)
        REG_SPEED:    speed_reg    <= wdata;
        REG_TIMER:    timer_reg    <= wdata;
        REG_SETUP:    setup_reg    <= wdata;
        REG_GPIO_OUT: gpio_out_reg <= wdata;
        default: ;
      endcase
    end
  end

  always_comb begin
    unique case (addr)
      REG_GPIO_IN:  rdata = gpio_in;
      REG_SPEED:    rdata = speed_reg;
      REG_TIMER:    rdata = timer_reg;
      REG_SETUP:    rdata = setup_reg;
      REG_MOTOR_IN: rdata = motor_in;
      REG_GPIO_OUT: rdata = gpio_out_reg;
      default:      rdata = mem[idx];
    endcase
  end

endmodule
