// tb_mpu: runs a self-test program (tb/mpu_test_prog.hex) on the MPU core.
// The program exercises every command: literal and register loads, stores,
// all ALU operations with register and literal operands, compare, taken and
// untaken conditional jumps on each flag, nested call/return and the mapped
// peripheral registers. The final register contents, worked out by hand
// from the program, are compared, and so is the cycle count: the program
// executes 43 commands before it reaches its final self-loop at address 42,
// two clock cycles each.
module tb_mpu;
  logic clk = 0, rst_n = 0;
  logic [7:0] gin = 8'h3c, min = 8'hc3;
  logic [7:0] spd, tmr, stp, gout, pc, acc;
  logic exec, serr;
  int checks = 0, failures = 0;
  int cycles = 0;

  mpu #(.PROG_FILE("tb/mpu_test_prog.hex")) dut (.clk(clk), .rst_n(rst_n), .gpio_in(gin),
    .motor_in(min), .speed_reg(spd), .timer_reg(tmr), .setup_reg(stp), .gpio_out_reg(gout),
    .ext_pc_req(1'b0), .ext_pc_addr(8'h00), .ext_pc_ack(), .pc(pc), .acc(acc), .exec(exec), .stack_err(serr));

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s = %h, expected %h", what, got, exp); end
  endtask

  initial begin
    #12 rst_n = 1;
    while (pc != 8'd42) begin
      @(posedge clk); #1;
      cycles++;
    end
    checks++;
    if (cycles != 86) begin failures++; $display("FAIL reached end after %0d cycles, expected 86", cycles); end
    repeat (10) @(posedge clk); #1;
    chk("pc stays", pc, 8'd42);
    chk("R20", dut.u_rf.mem[20], 8'h12);
    chk("R21", dut.u_rf.mem[21], 8'h46);
    chk("R22", dut.u_rf.mem[22], 8'hf6);
    chk("R23", dut.u_rf.mem[23], 8'hc9);
    chk("R24", dut.u_rf.mem[24], 8'h64);
    chk("R25", dut.u_rf.mem[25], 8'h0c);
    chk("R26", dut.u_rf.mem[26], 8'h0d);
    chk("R27", dut.u_rf.mem[27], 8'h80);
    chk("R30", dut.u_rf.mem[30], 8'ha5);
    chk("gpio out", gout, 8'h3c);
    chk("speed", spd, 8'hc3);
    chk("timer", tmr, 8'h07);
    chk("setup", stp, 8'h03);
    chk("acc", acc, 8'ha5);
    chk("stack err", {7'b0, serr}, 8'h00);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
