// tb_mpu_system: end-to-end test of the motor speed controller at its
// default size (8-bit data, 256 registers, 256-word program memory), running
// the motor control program in program memory.
//
// For each pair (Ws on gpio_in, Wd on motor_in) the bench waits for the
// control loop to settle and then checks:
//   - the new drive value Wo = Wd + Aw on gpio_out, against a reference of
//     the control rule (Aw = +1 for Wd-Ws >= 8, (Wd-Ws)/2 for 0 < Wd-Ws < 8,
//     0 when equal, and the mirror image below, never 0 unless Wd = Ws),
//   - the PWM duty over one full period: Wo active clocks out of 256,
//   - the control loop period, the number of clocks between two writes of
//     the Speed Control register, against the length of the program path
//     the case takes (two clocks per command).
// Every branch of the control rule, the call/return of the input routine
// a complete PWM period and an external restart of the program through the
// PC load port are counted; one that never happens is a failure.
module tb_mpu_system;
  logic clk = 0, rst_n_in = 0;
  logic [7:0] gin = 0, gout, min = 0, pc;
  logic [7:0] acc;
  logic pwm, pend, serr, exec, ereq = 0, eack;
  logic [7:0] eaddr = 0;
  int checks = 0, failures = 0;

  mpu_system dut (.clk(clk), .rst_n_in(rst_n_in), .gpio_in(gin), .gpio_out(gout),
    .motor_in(min), .pwm_out(pwm), .pwm_period_end(pend), .ext_pc_req(ereq), .ext_pc_addr(eaddr), .ext_pc_ack(eack),
    .pc(pc), .acc(acc), .exec(exec),
    .stack_err(serr));

  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Path taken by the control rule; index into the counters below.
  typedef enum int {P_ZERO, P_POS_BIG, P_POS_HALF, P_POS_MIN, P_NEG_BIG, P_NEG_HALF, P_NEG_MIN, P_N} path_t;
  int path_cnt[P_N];
  // Commands executed per loop iteration on each path (see the program listing).
  int path_cmds[P_N] = '{16, 20, 21, 22, 22, 24, 24};

  function automatic logic [7:0] ref_wo(logic [7:0] ws, logic [7:0] wd, output path_t p);
    int diff, aw;
    diff = int'(wd) - int'(ws);
    if (diff == 0) begin aw = 0; p = P_ZERO; end
    else if (diff > 0) begin
      if (diff >= 8) begin aw = 1; p = P_POS_BIG; end
      else begin aw = diff / 2; p = P_POS_HALF; if (aw == 0) begin aw = 1; p = P_POS_MIN; end end
    end else begin
      if (diff <= -8) begin aw = -1; p = P_NEG_BIG; end
      else begin aw = diff / 2; p = P_NEG_HALF; if (aw == 0) begin aw = -1; p = P_NEG_MIN; end end
    end
    return 8'(int'(wd) + aw);
  endfunction

  // Clocks between consecutive writes of the Speed Control register.
  int last_write = -1, loop_period = 0, cyc = 0;
  int calls = 0, rets = 0, periods = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.u_mpu.rf_we && dut.u_mpu.lit == 8'd11) begin
      if (last_write >= 0) loop_period <= cyc - last_write;
      last_write <= cyc;
    end
    if (dut.u_mpu.u_pc.push) calls <= calls + 1;
    if (dut.u_mpu.u_pc.pop)  rets  <= rets + 1;
    if (pend) periods <= periods + 1;
  end

  task automatic run_case(logic [7:0] ws, logic [7:0] wd);
    path_t p;
    logic [7:0] exp;
    int high, len;
    exp = ref_wo(ws, wd, p);
    @(negedge clk); gin = ws; min = wd;
    repeat (150) @(negedge clk);
    checks++;
    if (gout !== exp) begin
      failures++; $display("FAIL Ws=%0d Wd=%0d Wo=%0d expected %0d", ws, wd, gout, exp);
    end
    checks++;
    if (loop_period != 2 * path_cmds[p]) begin
      failures++; $display("FAIL Ws=%0d Wd=%0d loop period %0d, expected %0d", ws, wd, loop_period, 2 * path_cmds[p]);
    end
    // PWM duty over one complete period (timer register 0: one tick per clock)
    do @(negedge clk); while (!pend);
    high = 0; len = 0;
    do begin
      @(negedge clk);
      len++;
      if (pwm) high++;
    end while (!pend);
    checks++;
    if (len != 256 || high != int'(exp)) begin
      failures++; $display("FAIL Ws=%0d Wd=%0d PWM %0d/%0d, expected %0d/256", ws, wd, high, len, exp);
    end
    path_cnt[p]++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n_in = 1;
    // the program clears the speed register first
    repeat (40) @(negedge clk);
    checks++;
    if (dut.speed_reg !== 8'd0 || dut.setup_reg !== 8'd1) begin failures++; $display("FAIL init"); end
    run_case(8'd100, 8'd100);  // equal
    run_case(8'd100, 8'd150);  // Wd - Ws >= 8
    run_case(8'd100, 8'd108);  // exactly 8
    run_case(8'd100, 8'd106);  // small positive: /2
    run_case(8'd100, 8'd101);  // +1: minimum step
    run_case(8'd100, 8'd0);    // large negative
    run_case(8'd100, 8'd92);   // exactly -8
    run_case(8'd100, 8'd95);   // small negative: /2
    run_case(8'd100, 8'd99);   // -1: minimum step
    run_case(8'd0, 8'd255);
    run_case(8'd255, 8'd0);
    run_case(8'd250, 8'd255);
    for (int i = 0; i < 12; i++) run_case(8'($urandom), 8'($urandom));
    for (int i = 0; i < 12; i++) begin
      logic [7:0] ws;
      ws = 8'($urandom_range(20, 235));
      run_case(ws, 8'(int'(ws) + $urandom_range(0, 18) - 9));
    end
    // External unit restarts the program at address 0: the init code clears
    // the Speed Control register, then the loop recomputes the drive value.
    begin
      int restarts = 0;
      run_case(8'd100, 8'd150);  // leaves Speed Control at 151
      @(negedge clk); ereq = 1; eaddr = 8'd0;
      do @(negedge clk); while (!eack);
      @(posedge clk); #1;
      ereq = 0; restarts++;
      checks++;
      if (pc !== 8'd0) begin failures++; $display("FAIL PC after external load: %0d", pc); end
      // six init commands, two clocks each: cleared by the 12th edge
      repeat (11) @(negedge clk);
      checks++;
      if (dut.speed_reg !== 8'd151) begin failures++; $display("FAIL speed cleared too early"); end
      @(negedge clk); @(negedge clk);
      checks++;
      if (dut.speed_reg !== 8'd0) begin failures++; $display("FAIL restart did not clear speed"); end
      $display("external restarts=%0d", restarts);
      run_case(8'd60, 8'd64);
      checks++;
      if (restarts == 0) failures++;
    end
    foreach (path_cnt[i]) begin
      checks++;
      $display("path %s taken in %0d cases", path_t'(i), path_cnt[i]);
      if (path_cnt[i] == 0) begin failures++; $display("FAIL path %0d never taken", i); end
    end
    $display("input routine calls=%0d returns=%0d, PWM periods=%0d", calls, rets, periods);
    checks++;
    if (calls == 0 || rets == 0 || calls - rets > 1 || serr) begin failures++; $display("FAIL call/return"); end
    checks++;
    if (periods == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
