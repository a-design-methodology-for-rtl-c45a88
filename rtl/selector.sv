// selector: the operand multiplexer in front of the ALU.
//
// Chooses the ALU's second operand: the literal field of the command
// (zero-extended or truncated to DATA_W) or the data read from the register
// file. Combinational. The published design shows a selector fed by the command path
// and the register file; limiting it to these two sources is this design's
// choice.
module selector
  import mpu_pkg::*;
#(
  parameter int DATA_W = 8
) (
  input  sel_t              sel,
  input  logic [LIT_W-1:0]  lit,
  input  logic [DATA_W-1:0] reg_data,
  output logic [DATA_W-1:0] operand
);

  logic [DATA_W-1:0] lit_ext;

  always_comb begin
    lit_ext = '0;
    for (int i = 0; i < DATA_W && i < LIT_W; i++) lit_ext[i] = lit[i];
    operand = (sel == SEL_REG) ? reg_data : lit_ext;
  end

endmodule
