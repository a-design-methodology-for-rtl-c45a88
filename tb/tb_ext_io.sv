// tb_ext_io: checks the two-cycle input latency, the one-cycle output
// latency and reset of the GPIO port.
module tb_ext_io;
  logic clk = 0, rst_n = 0;
  logic [7:0] pin = 0, isync, oreg = 0, pout;
  logic [7:0] hin[$], hout[$];
  int checks = 0, failures = 0;

  ext_io #(.DATA_W(8)) dut (.clk(clk), .rst_n(rst_n), .pins_in(pin), .in_sync(isync),
    .out_reg(oreg), .pins_out(pout));

  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pin = 8'h5a; oreg = 8'ha5;
    #12;
    checks++; if (isync !== 0 || pout !== 0) failures++;
    @(negedge clk) rst_n = 1;
    hin = {8'h5a, 8'h5a}; hout = {8'ha5};
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      pin = 8'($urandom); oreg = 8'($urandom);
      @(posedge clk); #1;
      hin.push_back(pin); hout.push_back(oreg);
      // after this edge: in_sync = pin of two edges ago, pins_out = oreg of this edge
      checks++;
      if (isync !== hin[hin.size() - 2] || pout !== hout[hout.size() - 1]) begin
        failures++; $display("FAIL i=%0d isync=%h pout=%h", i, isync, pout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
