// reset_ctrl: the system's reset controller.
//
// Takes an asynchronous active-low reset request and produces the reset used
// by every block: it asserts at once, without a clock, and releases only on
// the second rising clock edge after the request goes away, so that all
// flip-flops leave reset in the same cycle. The published design names a reset
// controller that signals a reset event to the MPU; the two-flop release is
// this design's choice.
module reset_ctrl (
  input  logic clk,
  input  logic rst_n_in,
  output logic rst_n
);

  logic stage;

  always_ff @(posedge clk or negedge rst_n_in) begin
    if (!rst_n_in) begin
      stage <= 1'b0;
      rst_n <= 1'b0;
    end else begin
      stage <= 1'b1;
      rst_n <= stage;
    end
  end

endmodule
