// tb_command_register: checks reset to 0, load when enabled and hold otherwise.
module tb_command_register;
  logic clk = 0, rst_n = 0, load = 0;
  logic [15:0] d = 0, q, m;
  int checks = 0, failures = 0;

  command_register #(.WIDTH(16)) dut (.clk(clk), .rst_n(rst_n), .load(load), .d(d), .q(q));

  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m = 0;
    #12 checks++; if (q !== 0) failures++;
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk); load = 1'($urandom); d = 16'($urandom);
      if (load) m = d;
      @(posedge clk); #1;
      checks++; if (q !== m) begin failures++; $display("FAIL q=%h exp=%h", q, m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
