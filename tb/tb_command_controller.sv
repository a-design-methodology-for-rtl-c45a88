// tb_command_controller: checks the fetch/execute alternation, that write
// enables appear only in the execute phase, the compare suppression of the
// accumulator write, and every branch condition against the flags.
module tb_command_controller;
  import mpu_pkg::*;
  logic clk = 0, rst_n = 0, alu_wr = 1;
  ctrl_t ctrl = '0;
  flags_t fl = '0;
  logic cmd_load, pc_step, take, a_we, f_we, rf_we, exec;
  int checks = 0, failures = 0;

  command_controller dut (.clk(clk), .rst_n(rst_n), .ctrl(ctrl), .flags(fl), .alu_wr(alu_wr),
    .cmd_load(cmd_load), .pc_step(pc_step), .take(take), .a_we(a_we), .flags_we(f_we),
    .rf_we(rf_we), .exec(exec));

  always #5 clk = ~clk;
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic ref_take(cond_t c, flags_t f);
    case (c)
      CC_ALWAYS: return 1;
      CC_Z: return f.z;   CC_NZ: return !f.z;
      CC_C: return f.c;   CC_NC: return !f.c;
      CC_N: return f.n;   CC_NN: return !f.n;
      default: return 0;
    endcase
  endfunction

  initial begin
    bit ph;
    #12;
    checks++; if (cmd_load !== 1 || exec !== 0) failures++;  // reset: fetch
    rst_n = 1;
    ph = 1;  // 0 = fetch; the edge after reset release moves to execute
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      ctrl = ctrl_t'($urandom);
      ctrl.cond = cond_t'($urandom_range(7));
      fl = flags_t'($urandom);
      alu_wr = 1'($urandom);
      #1;
      checks++;
      if (exec !== ph || cmd_load !== !ph || pc_step !== ph ||
          a_we !== (ph && ctrl.a_we && alu_wr) || f_we !== (ph && ctrl.flags_we) ||
          rf_we !== (ph && ctrl.rf_we) || take !== ref_take(ctrl.cond, fl)) begin
        failures++;
        $display("FAIL i=%0d ph=%b exec=%b a_we=%b take=%b", i, ph, exec, a_we, take);
      end
      @(posedge clk);
      ph = !ph;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
