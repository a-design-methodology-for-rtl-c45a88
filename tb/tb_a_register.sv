// tb_a_register: checks reset, independent write enables of accumulator and
// flags, and that the registers hold when not enabled.
module tb_a_register;
  import mpu_pkg::*;
  logic clk = 0, rst_n = 0, a_we = 0, f_we = 0;
  logic [7:0] d = 0, q;
  flags_t fd = '0, fq;
  int checks = 0, failures = 0;
  logic [7:0] ma; flags_t mf;

  a_register #(.DATA_W(8)) dut (.clk(clk), .rst_n(rst_n), .a_we(a_we), .a_d(d),
    .flags_we(f_we), .flags_d(fd), .a_q(q), .flags_q(fq));

  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ma = 0; mf = '0;
    #12 checks++; if (q !== 0 || fq !== 0) failures++;
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      a_we = 1'($urandom); f_we = 1'($urandom); d = 8'($urandom); fd = 3'($urandom);
      if (a_we) ma = d;
      if (f_we) mf = fd;
      @(posedge clk); #1;
      checks++;
      if (q !== ma || fq !== mf) begin failures++; $display("FAIL i=%0d q=%h exp=%h", i, q, ma); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
