// tb_program_memory: loads a small image and reads every address back; the
// words past the image must read as zero (NOP).
module tb_program_memory;
  logic [7:0] addr;
  logic [15:0] data;
  int checks = 0, failures = 0;

  program_memory #(.DEPTH(256), .WIDTH(16), .INIT_FILE("tb/pmem_test.hex")) dut (.addr(addr), .data(data));

  function automatic logic [15:0] expected(int a);
    // image: word i = 16'h1000 * (i % 16) + 16'h0101 * i, for i < 16
    if (a < 16) return 16'((a % 16) * 16'h1000 + a * 16'h0101);
    return 16'h0000;
  endfunction

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++) begin
      addr = 8'(a); #1;
      checks++;
      if (data !== expected(a)) begin failures++; $display("FAIL a=%0d d=%h", a, data); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
