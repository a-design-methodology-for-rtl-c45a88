// command_register: holds the command being executed.
//
// Loads the WIDTH-bit word from the command bus on the rising edge when
// `load` is high (the fetch cycle) and keeps it through the execute cycle.
// Reset clears it to 0, which decodes as a no-operation.
module command_register #(
  parameter int WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
  end

endmodule
