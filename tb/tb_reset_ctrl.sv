// tb_reset_ctrl: the reset must assert without a clock edge and release on
// the second rising edge after the request is withdrawn.
module tb_reset_ctrl;
  logic clk = 0, req_n = 0, rst_n;
  int checks = 0, failures = 0;

  reset_ctrl dut (.clk(clk), .rst_n_in(req_n), .rst_n(rst_n));

  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 5; k++) begin
      repeat (3) @(posedge clk);
      #1 checks++; if (rst_n !== 0) failures++;
      @(negedge clk) req_n = 1;
      @(posedge clk); #1 checks++; if (rst_n !== 0) failures++;   // first edge: still in reset
      @(posedge clk); #1 checks++; if (rst_n !== 1) failures++;   // second edge: released
      repeat (4) @(posedge clk);
      #3 req_n = 0;                                               // mid-cycle request
      #1 checks++; if (rst_n !== 0) failures++;                   // asynchronous assertion
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
