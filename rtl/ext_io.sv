// ext_io: the MPU's general purpose I/O port ("Extend I/O").
//
// The input pins pass through a two-flop synchroniser before they reach the
// register file, so the MPU sees a value that is stable for a whole clock.
// The output pins are driven from a flip-flop loaded from the register file's
// GPIO output register every cycle, so they change one clock after the MPU
// writes it. Reset clears both. An 8-bit port wired to the MPU's registers is
// the published design's; the synchroniser and output flop are this design's.
module ext_io #(
  parameter int DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] pins_in,
  output logic [DATA_W-1:0] in_sync,   // to the register file
  input  logic [DATA_W-1:0] out_reg,   // from the register file
  output logic [DATA_W-1:0] pins_out
);

  logic [DATA_W-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta     <= '0;
      in_sync  <= '0;
      pins_out <= '0;
    end else begin
      meta     <= pins_in;
      in_sync  <= meta;
      pins_out <= out_reg;
    end
  end

endmodule
