// a_register: the accumulator ("A" or "W" register) and the status flags.
//
// One DATA_W-bit register loaded from the ALU result when `a_we` is high,
// and a zero / carry / negative flag register loaded when `flags_we` is high.
// Both load on the rising clock edge and clear on the active-low reset. The
// accumulator width follows the configurable data bus; the flags are this
// design's own addition, needed for conditional jumps.
module a_register
  import mpu_pkg::*;
#(
  parameter int DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              a_we,
  input  logic [DATA_W-1:0] a_d,
  input  logic              flags_we,
  input  flags_t            flags_d,
  output logic [DATA_W-1:0] a_q,
  output flags_t            flags_q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q     <= '0;
      flags_q <= '0;
    end else begin
      if (a_we)     a_q     <= a_d;
      if (flags_we) flags_q <= flags_d;
    end
  end

endmodule
