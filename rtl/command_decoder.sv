// command_decoder: turns a 16-bit command into the MPU's control word.
//
// Combinational. The opcode in bits 15:12 selects the operand source, whether
// the ALU result and flags are written to the accumulator, whether the
// accumulator is written to the register file and what the program counter
// does. Bits 11:8 are the ALU operation (opcodes ALUR/ALUI) or the branch
// condition (JMP). Loads (LDI, LD) pass the operand through the ALU, so they
// set the zero and negative flags too. Unknown opcodes act as NOP.
// The published design says only that the decoder analyses the program code and can
// be extended with commands for application hardware; the encoding is this
// design's own.
module command_decoder
  import mpu_pkg::*;
(
  input  logic [CMD_W-1:0] cmd,
  output ctrl_t            ctrl
);

  opcode_t op;
  assign op = opcode_t'(cmd[15:12]);

  always_comb begin
    ctrl          = '0;
    ctrl.sel      = SEL_LIT;
    ctrl.alu_op   = ALU_PASS;
    ctrl.pc_mode  = PC_INC;
    ctrl.cond     = CC_ALWAYS;
    unique case (op)
      OP_LDI: begin
        ctrl.a_we     = 1'b1;
        ctrl.flags_we = 1'b1;
      end
      OP_LD: begin
        ctrl.sel      = SEL_REG;
        ctrl.a_we     = 1'b1;
        ctrl.flags_we = 1'b1;
      end
      OP_ST:   ctrl.rf_we = 1'b1;
      OP_ALUR: begin
        ctrl.sel      = SEL_REG;
        ctrl.alu_op   = alu_op_t'(cmd[11:8]);
        ctrl.a_we     = 1'b1;
        ctrl.flags_we = 1'b1;
      end
      OP_ALUI: begin
        ctrl.alu_op   = alu_op_t'(cmd[11:8]);
        ctrl.a_we     = 1'b1;
        ctrl.flags_we = 1'b1;
      end
      OP_JMP: begin
        ctrl.pc_mode = PC_JUMP;
        ctrl.cond    = cond_t'(cmd[11:8]);
      end
      OP_CALL: ctrl.pc_mode = PC_CALL;
      OP_RET:  ctrl.pc_mode = PC_RET;
      default: ;  // NOP and unused opcodes
    endcase
  end

endmodule
