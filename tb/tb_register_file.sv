// tb_register_file: writes and reads storage registers against a model
// through the single address port,
// checks that R10/R14 read the live inputs and ignore writes, that R11..R13
// and R15 drive their outputs, and reset of the mapped registers.
module tb_register_file;
  import mpu_pkg::*;
  logic clk = 0, rst_n = 0, we = 0;
  logic [7:0] addr = 0, wdata = 0, rdata;
  logic [7:0] gin = 0, min = 0, spd, tmr, stp, gout;
  logic [7:0] model[256];
  logic [255:0] valid;
  int checks = 0, failures = 0;

  register_file #(.DATA_W(8), .NUM_REGS(256)) dut (.clk(clk), .rst_n(rst_n), .addr(addr),
    .rdata(rdata), .we(we), .wdata(wdata), .gpio_in(gin), .motor_in(min),
    .speed_reg(spd), .timer_reg(tmr), .setup_reg(stp), .gpio_out_reg(gout));

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(logic [7:0] a, logic [7:0] d);
    @(negedge clk); we = 1; addr = a; wdata = d;
    @(posedge clk); #1; we = 0;
    if (a != 10 && a != 14) begin model[a] = d; valid[a] = 1; end
  endtask

  task automatic rd_check(logic [7:0] a);
    addr = a; #1;
    checks++;
    if (a == 10) begin if (rdata !== gin) failures++; end
    else if (a == 14) begin if (rdata !== min) failures++; end
    else if (valid[a] && rdata !== model[a]) begin
      failures++; $display("FAIL r%0d=%h exp=%h", a, rdata, model[a]);
    end
  endtask

  initial begin
    valid = '0;
    #12;
    checks++; if (spd !== 0 || tmr !== 0 || stp !== 0 || gout !== 0) failures++;
    rst_n = 1;
    for (int i = 0; i < 256; i++) wr(8'(i), 8'($urandom));
    for (int i = 0; i < 256; i++) rd_check(8'(i));
    for (int i = 0; i < 600; i++) begin
      gin = 8'($urandom); min = 8'($urandom);
      if ($urandom_range(1)) wr(8'($urandom_range(255)), 8'($urandom));
      if ($urandom_range(3) == 0) wr(8'($urandom_range(15, 10)), 8'($urandom));
      rd_check(8'($urandom_range(255)));
      rd_check(8'($urandom_range(15, 10)));
      checks++;
      if (spd !== model[11] || tmr !== model[12] || stp !== model[13] || gout !== model[15]) begin
        failures++; $display("FAIL mapped outputs");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
