// pwm_controller: the motor control unit.
//
// Generates the PWM drive of the motor from three registers the MPU writes:
//   speed  - duty: the output is active for `speed` of every 2**DATA_W ticks,
//   timer  - prescaler: one PWM tick every timer+1 clock cycles,
//   setup  - bit 0 enables the output, bit 1 inverts its polarity.
// Speed and setup act at once. The timer value is taken only when a PWM
// period ends (`period_end` pulses on that cycle), so a new timer value never
// cuts a period short; this is how the published rule that writes reach the
// controller in real time "except for the timer register" is realised here.
// The unit also samples its input port (the A/D converter's detected speed)
// through a two-flop synchroniser and presents it as `detected`, one value
// per clock, to the MPU's register file.
// The register set and the real-time rule follow the published design; the counter
// structure and the setup bit assignment are this design's choice.
module pwm_controller
  import mpu_pkg::*;
#(
  parameter int DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] speed,
  input  logic [DATA_W-1:0] timer,
  input  logic [DATA_W-1:0] setup,
  input  logic [DATA_W-1:0] motor_in,
  output logic [DATA_W-1:0] detected,
  output logic              pwm_out,
  output logic              period_end
);

  logic [DATA_W-1:0] presc, timer_act, cnt, sync1;
  logic              tick, raw;

  assign tick       = (presc == timer_act);
  assign period_end = tick && (cnt == '1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      presc     <= '0;
      cnt       <= '0;
      timer_act <= '0;
    end else begin
      presc <= tick ? '0 : presc + 1'b1;
      if (tick) cnt <= cnt + 1'b1;
      if (period_end) timer_act <= timer;
    end
  end

  assign raw     = (cnt < speed);
  assign pwm_out = setup[SETUP_EN] ? (raw ^ setup[SETUP_INV]) : setup[SETUP_INV];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1    <= '0;
      detected <= '0;
    end else begin
      sync1    <= motor_in;
      detected <= sync1;
    end
  end

endmodule
