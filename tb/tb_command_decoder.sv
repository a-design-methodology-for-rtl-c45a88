// tb_command_decoder: decodes every opcode with random lower fields and
// compares the control word with a table written here.
module tb_command_decoder;
  import mpu_pkg::*;
  logic [15:0] cmd;
  ctrl_t ctrl, e;
  int checks = 0, failures = 0;

  command_decoder dut (.cmd(cmd), .ctrl(ctrl));

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      cmd = 16'($urandom);
      cmd[15:12] = 4'(i % 16);
      // expected: sel, alu_op, a_we, flags_we, rf_we, pc_mode, cond
      e = '{sel: SEL_LIT, alu_op: ALU_PASS, a_we: 0, flags_we: 0, rf_we: 0, pc_mode: PC_INC, cond: CC_ALWAYS};
      case (cmd[15:12])
        4'h1: begin e.a_we = 1; e.flags_we = 1; end
        4'h2: begin e.sel = SEL_REG; e.a_we = 1; e.flags_we = 1; end
        4'h3: e.rf_we = 1;
        4'h4: begin e.sel = SEL_REG; e.alu_op = alu_op_t'(cmd[11:8]); e.a_we = 1; e.flags_we = 1; end
        4'h5: begin e.alu_op = alu_op_t'(cmd[11:8]); e.a_we = 1; e.flags_we = 1; end
        4'h6: e.pc_mode = PC_RET;
        4'h7: e.pc_mode = PC_CALL;
        4'h8: begin e.pc_mode = PC_JUMP; e.cond = cond_t'(cmd[11:8]); end
        default: ;
      endcase
      #1;
      checks++;
      if (ctrl !== e) begin failures++; $display("FAIL cmd=%h ctrl=%h exp=%h", cmd, ctrl, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
