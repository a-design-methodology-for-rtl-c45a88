// alu: arithmetic logic unit of the MPU.
//
// Purely combinational. Computes y = f(a, b) for the operation `op` and the
// zero / carry / negative flags of the result. For subtraction the carry flag
// is a borrow (set when a < b unsigned), which is what the control program
// uses to tell a negative speed difference from a positive one. ALU_CMP
// produces the flags of a - b and asks, through `wr_result`, that the result
// not be written to the accumulator.
// The published design states only that the ALU puts a calculated value on the data
// bus and can be replaced or duplicated; the operation set is this design's.
module alu
  import mpu_pkg::*;
#(
  parameter int DATA_W = 8
) (
  input  alu_op_t           op,
  input  logic [DATA_W-1:0] a,          // accumulator
  input  logic [DATA_W-1:0] b,          // operand from the selector
  output logic [DATA_W-1:0] y,
  output flags_t            flags,
  output logic              wr_result   // 0 for compare
);

  logic [DATA_W:0] ext;  // result with carry / borrow bit

  always_comb begin
    ext       = '0;
    wr_result = 1'b1;
    unique case (op)
      ALU_ADD:  ext = {1'b0, a} + {1'b0, b};
      ALU_SUB:  ext = {1'b0, a} - {1'b0, b};
      ALU_RSB:  ext = {1'b0, b} - {1'b0, a};
      ALU_CMP: begin
        ext       = {1'b0, a} - {1'b0, b};
        wr_result = 1'b0;
      end
      ALU_AND:  ext = {1'b0, a & b};
      ALU_OR:   ext = {1'b0, a | b};
      ALU_XOR:  ext = {1'b0, a ^ b};
      ALU_SHR:  ext = {a[0], 1'b0, a[DATA_W-1:1]};
      ALU_ASR:  ext = {a[0], a[DATA_W-1], a[DATA_W-1:1]};
      ALU_SHL:  ext = {a, 1'b0};
      ALU_PASS: ext = {1'b0, b};
      default:  ext = {1'b0, b};
    endcase
    y       = ext[DATA_W-1:0];
    flags.z = (y == '0);
    flags.c = ext[DATA_W];
    flags.n = y[DATA_W-1];
  end

endmodule
