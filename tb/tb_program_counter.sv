// tb_program_counter: checks increment, taken and untaken jumps, call and
// return through the stack (nested), hold when not stepping, the error
// flag on a return with an empty stack, and the external load request:
// served only on a step, acknowledged then, overriding a call's push.
module tb_program_counter;
  import mpu_pkg::*;
  logic clk = 0, rst_n = 0, step = 0, take = 0;
  pc_mode_t mode = PC_INC;
  logic [7:0] target = 0, pc;
  logic serr, ereq = 0, eack;
  logic [7:0] eaddr = 0;
  int checks = 0, failures = 0;

  program_counter #(.PC_W(8), .STACK_DEPTH(4)) dut (.clk(clk), .rst_n(rst_n), .step(step),
    .mode(mode), .take(take), .target(target), .ext_req(ereq), .ext_addr(eaddr), .ext_ack(eack), .pc(pc), .stack_err(serr));

  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_step(pc_mode_t m, logic t, logic [7:0] tg, logic [7:0] exp_pc, logic s = 1);
    @(negedge clk); step = s; mode = m; take = t; target = tg;
    @(posedge clk); #1; step = 0;
    checks++;
    if (pc !== exp_pc) begin failures++; $display("FAIL mode=%s pc=%h exp=%h", m.name(), pc, exp_pc); end
  endtask

  initial begin
    #12 rst_n = 1;
    checks++; if (pc !== 0) failures++;
    do_step(PC_INC, 0, 0, 8'h01);
    do_step(PC_INC, 0, 0, 8'h02);
    do_step(PC_INC, 0, 8'h55, 8'h02, 0);     // no step: hold
    do_step(PC_JUMP, 0, 8'h40, 8'h03);       // not taken
    do_step(PC_JUMP, 1, 8'h40, 8'h40);       // taken
    do_step(PC_CALL, 0, 8'h80, 8'h80);       // push 41
    do_step(PC_INC, 0, 0, 8'h81);
    do_step(PC_CALL, 0, 8'hc0, 8'hc0);       // push 82
    do_step(PC_RET, 0, 0, 8'h82);
    do_step(PC_RET, 0, 0, 8'h41);
    checks++; if (serr !== 0) failures++;
    do_step(PC_RET, 0, 0, 8'h42);            // empty stack: continues, flags error
    checks++; if (serr !== 1) failures++;
    do_step(PC_JUMP, 1, 8'hff, 8'hff);
    do_step(PC_INC, 0, 0, 8'h00);            // wraps
    // external load: waits for a step, then overrides the command's PC action
    @(negedge clk); ereq = 1; eaddr = 8'h77;
    #1 checks++; if (eack !== 0) failures++;  // no step: not served
    @(posedge clk); #1 checks++; if (pc !== 8'h00) failures++;
    @(negedge clk); step = 1; mode = PC_CALL; target = 8'h20;
    #1 checks++; if (eack !== 1) failures++;
    @(posedge clk); #1 step = 0; ereq = 0;
    checks++; if (pc !== 8'h77) failures++;
    do_step(PC_RET, 0, 0, 8'h78);            // the overridden call pushed nothing
    checks++; if (serr !== 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
