// tb_mpu_widths: the MPU at the other published data-bus widths (4, 16 and
// 32 bits besides 8) and with the 16-register file meant for logic cells.
//
// Each configuration runs the self-test program (tb/mpu_test_prog.hex) and,
// for the 16-register version, also the motor control program. A command-
// level reference model written here (class isa_model, parameterised by the
// data width and register count) executes the same program image; after the
// same number of commands the register file, the mapped peripheral registers,
// the accumulator and the PC of every instance must equal the model's.
module tb_mpu_widths;
  import mpu_pkg::*;

  class isa_model #(int W = 8, int NR = 256);
    logic [15:0]  prog[256];
    logic [W-1:0] mem[NR];
    bit           written[NR];
    logic [W-1:0] spd, tmr, stp, gout, acc;
    logic         z, c, n, err;
    logic [7:0]   pc;
    logic [7:0]   stack[$];

    function new(string file);
      foreach (prog[i]) prog[i] = 16'h0000;
      $readmemh(file, prog);
      foreach (written[i]) written[i] = 0;
      spd = 0; tmr = 0; stp = 0; gout = 0; acc = 0; z = 0; c = 0; n = 0; err = 0; pc = 0;
    endfunction

    function logic [W-1:0] rd(logic [7:0] r, logic [W-1:0] gin, logic [W-1:0] min);
      case (r)
        8'd10: return gin;
        8'd11: return spd;
        8'd12: return tmr;
        8'd13: return stp;
        8'd14: return min;
        8'd15: return gout;
        default: return mem[r % NR];
      endcase
    endfunction

    function void step(logic [W-1:0] gin, logic [W-1:0] min);
      logic [15:0]  cm;
      logic [3:0]   op, f;
      logic [7:0]   k;
      logic [W-1:0] b, kw;
      logic [W:0]   e;
      bit           t;
      cm = prog[pc]; op = cm[15:12]; f = cm[11:8]; k = cm[7:0];
      kw = '0;
      for (int i = 0; i < W && i < 8; i++) kw[i] = k[i];
      pc = pc + 1;
      case (op)
        4'h1, 4'h2, 4'h4, 4'h5: begin
          b = (op == 4'h1 || op == 4'h5) ? kw : rd(k, gin, min);
          if (op == 4'h1 || op == 4'h2) f = 4'hA;
          case (f)
            4'h0: e = {1'b0, acc} + {1'b0, b};
            4'h1, 4'h3: e = {1'b0, acc} - {1'b0, b};
            4'h2: e = {1'b0, b} - {1'b0, acc};
            4'h4: e = {1'b0, acc & b};
            4'h5: e = {1'b0, acc | b};
            4'h6: e = {1'b0, acc ^ b};
            4'h7: e = {acc[0], 1'b0, acc[W-1:1]};
            4'h8: e = {acc[0], acc[W-1], acc[W-1:1]};
            4'h9: e = {acc, 1'b0};
            default: e = {1'b0, b};
          endcase
          z = (e[W-1:0] == 0); c = e[W]; n = e[W-1];
          if (f != 4'h3) acc = e[W-1:0];
        end
        4'h3: begin
          case (k)
            8'd11: spd = acc;
            8'd12: tmr = acc;
            8'd13: stp = acc;
            8'd15: gout = acc;
            default: ;
          endcase
          mem[k % NR] = acc; written[k % NR] = 1;
        end
        4'h8: begin
          case (f)
            4'h0: t = 1;
            4'h1: t = z;  4'h2: t = !z;
            4'h3: t = c;  4'h4: t = !c;
            4'h5: t = n;  4'h6: t = !n;
            default: t = 0;
          endcase
          if (t) pc = k;
        end
        4'h7: if (stack.size() < 4) begin stack.push_back(pc); pc = k; end else err = 1;
        4'h6: if (stack.size() > 0) pc = stack.pop_back(); else err = 1;
        default: ;
      endcase
    endfunction
  endclass

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One MPU instance with its own inputs and observation wires.
  `define MPU_INST(NAME, W, NR, FILE) \
    logic [W-1:0] NAME``_gin, NAME``_min, NAME``_spd, NAME``_tmr, NAME``_stp, NAME``_gout, NAME``_acc; \
    logic [7:0] NAME``_pc; \
    logic NAME``_exec, NAME``_err; \
    mpu #(.DATA_W(W), .NUM_REGS(NR), .PROG_FILE(FILE)) NAME ( \
      .clk(clk), .rst_n(rst_n), .gpio_in(NAME``_gin), .motor_in(NAME``_min), \
      .speed_reg(NAME``_spd), .timer_reg(NAME``_tmr), .setup_reg(NAME``_stp), \
      .gpio_out_reg(NAME``_gout), .ext_pc_req(1'b0), .ext_pc_addr(8'h00), .ext_pc_ack(), \
      .pc(NAME``_pc), .acc(NAME``_acc), .exec(NAME``_exec), \
      .stack_err(NAME``_err));

  // Run N commands on both the instance and the model, then compare.
  `define MPU_RUN(NAME, W, NR, FILE, N, GIN, MIN) \
    begin \
      isa_model #(W, NR) m; \
      m = new(FILE); \
      NAME``_gin = W'(GIN); NAME``_min = W'(MIN); \
      for (int s = 0; s < N; s++) m.step(W'(GIN), W'(MIN)); \
      repeat (2 * N) @(posedge clk); \
      #1; \
      checks++; \
      if (NAME``_pc !== m.pc || NAME``_acc !== m.acc || NAME``_spd !== m.spd || NAME``_tmr !== m.tmr || \
          NAME``_stp !== m.stp || NAME``_gout !== m.gout || NAME``_err !== m.err) begin \
        failures++; \
        $display("FAIL %s: pc %h/%h acc %h/%h speed %h/%h", `"NAME`", NAME``_pc, m.pc, NAME``_acc, m.acc, NAME``_spd, m.spd); \
      end \
      for (int r = 0; r < NR; r++) if (m.written[r]) begin \
        checks++; \
        if (NAME.u_rf.mem[r] !== m.mem[r]) begin \
          failures++; $display("FAIL %s: R[%0d] %h expected %h", `"NAME`", r, NAME.u_rf.mem[r], m.mem[r]); \
        end \
      end \
    end

  `MPU_INST(w4,  4,  256, "tb/mpu_test_prog.hex")
  `MPU_INST(w16, 16, 256, "tb/mpu_test_prog.hex")
  `MPU_INST(w32, 32, 256, "tb/mpu_test_prog.hex")
  `MPU_INST(r16, 8,  16,  "tb/mpu_test_prog.hex")
  `MPU_INST(m16, 8,  16,  "rtl/motor_ctrl_prog.hex")

  // Each configuration is checked in its own reset run, so all start together.
  initial begin
    for (int run = 0; run < 5; run++) begin
      rst_n = 0;
      #12;
      rst_n = 1;
      case (run)
        0: `MPU_RUN(w4,  4,  256, "tb/mpu_test_prog.hex", 43, 8'h3c, 8'hc3)
        1: `MPU_RUN(w16, 16, 256, "tb/mpu_test_prog.hex", 43, 16'h3c5a, 16'hc3a5)
        2: `MPU_RUN(w32, 32, 256, "tb/mpu_test_prog.hex", 43, 32'h3c5a_1234, 32'hc3a5_8765)
        3: `MPU_RUN(r16, 8,  16,  "tb/mpu_test_prog.hex", 43, 8'h3c, 8'hc3)
        4: `MPU_RUN(m16, 8,  16,  "rtl/motor_ctrl_prog.hex", 200, 8'd90, 8'd97)
        default: ;
      endcase
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
