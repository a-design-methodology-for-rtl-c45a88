// tb_pwm_controller: measures the PWM output over whole periods and checks
// the period length ((timer+1) * 256 clocks) and the active time
// (speed * (timer+1) clocks), that a speed write acts in the same period
// while a timer write waits for the end of the period, enable and polarity
// from the setup register, and the two-clock latency of the input port.
module tb_pwm_controller;
  logic clk = 0, rst_n = 0;
  logic [7:0] speed = 0, timer = 0, setup = 0, min = 0, det;
  logic pwm, pend;
  int checks = 0, failures = 0;

  pwm_controller #(.DATA_W(8)) dut (.clk(clk), .rst_n(rst_n), .speed(speed), .timer(timer),
    .setup(setup), .motor_in(min), .detected(det), .pwm_out(pwm), .period_end(pend));

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count clocks and active clocks from one period_end to the next, sampling
  // each cycle's state at the falling edge.
  task automatic measure(output int len, output int high);
    len = 0; high = 0;
    do begin
      @(negedge clk);
      len++;
      if (pwm) high++;
    end while (!pend);
  endtask

  task automatic expect_period(int exp_len, int exp_high, string what);
    int len, high;
    measure(len, high);
    checks++;
    if (len !== exp_len || high !== exp_high) begin
      failures++;
      $display("FAIL %s len=%0d high=%0d exp %0d/%0d", what, len, high, exp_len, exp_high);
    end
  endtask

  initial begin
    int len, high;
    #12 rst_n = 1;
    setup = 8'h01; speed = 8'd64; timer = 8'd0;
    // sync to a period boundary
    do @(negedge clk); while (!pend);
    expect_period(256, 64, "t0 s64");
    speed = 8'd200;
    expect_period(256, 200, "t0 s200");
    // timer write mid-period: this period keeps the old timer
    repeat (100) @(negedge clk);
    timer = 8'd2;
    measure(len, high);
    checks++;
    if (len !== 156) begin failures++; $display("FAIL timer applied early len=%0d", len); end
    expect_period(768, 600, "t2 s200");
    speed = 8'd10;
    expect_period(768, 30, "t2 s10");
    // inverted polarity
    setup = 8'h03;
    expect_period(768, 768 - 30, "inv");
    // disabled: output idles at the inactive level
    setup = 8'h00;
    expect_period(768, 0, "off");
    setup = 8'h02;
    expect_period(768, 768, "off inv");
    // speed 0 and full
    setup = 8'h01; speed = 8'd0;
    expect_period(768, 0, "s0");
    speed = 8'd255;
    expect_period(768, 765, "s255");
    // input port: two-clock latency
    for (int i = 0; i < 50; i++) begin
      logic [7:0] v;
      @(negedge clk); v = 8'($urandom); min = v;
      @(posedge clk); @(posedge clk); #1;
      checks++;
      if (det !== v) begin failures++; $display("FAIL det=%h exp=%h", det, v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
