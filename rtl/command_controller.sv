// command_controller: the MPU's sequencer.
//
// Runs a two-phase cycle, FETCH then EXEC, so every command takes two clock
// cycles. In FETCH it loads the command register from program memory at the
// address in the PC. In EXEC it applies the decoded control word: it raises
// the accumulator, flag and register-file write enables, steps the program
// counter and decides whether a conditional jump is taken from the flags.
// A write to the accumulator is suppressed when the ALU reports a compare.
// The published design gives the controller's role (driving the other modules as
// the decoder directs); the two-phase timing is this design's choice.
module command_controller
  import mpu_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  ctrl_t  ctrl,
  input  flags_t flags,        // current flags, for conditions
  input  logic   alu_wr,       // ALU result is to be written (not a compare)
  output logic   cmd_load,     // load command register
  output logic   pc_step,      // update PC
  output logic   take,         // jump condition holds
  output logic   a_we,
  output logic   flags_we,
  output logic   rf_we,
  output logic   exec          // EXEC phase
);

  typedef enum logic {S_FETCH = 1'b0, S_EXEC = 1'b1} state_t;
  state_t state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_FETCH;
    else        state <= (state == S_FETCH) ? S_EXEC : S_FETCH;
  end

  always_comb begin
    unique case (ctrl.cond)
      CC_ALWAYS: take = 1'b1;
      CC_Z:      take = flags.z;
      CC_NZ:     take = !flags.z;
      CC_C:      take = flags.c;
      CC_NC:     take = !flags.c;
      CC_N:      take = flags.n;
      CC_NN:     take = !flags.n;
      default:   take = 1'b0;
    endcase
  end

  assign exec     = (state == S_EXEC);
  assign cmd_load = (state == S_FETCH);
  assign pc_step  = exec;
  assign a_we     = exec && ctrl.a_we && alu_wr;
  assign flags_we = exec && ctrl.flags_we;
  assign rf_we    = exec && ctrl.rf_we;

endmodule
