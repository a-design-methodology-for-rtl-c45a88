// tb_alu: self-checking test of the ALU.
// Drives every operation with random and corner operands and compares result,
// flags and the write-result strobe with a reference computed here.
module tb_alu;
  import mpu_pkg::*;
  localparam int W = 8;
  alu_op_t op;
  logic [W-1:0] a, b, y;
  flags_t fl;
  logic wr;
  int checks = 0, failures = 0;

  alu #(.DATA_W(W)) dut (.op(op), .a(a), .b(b), .y(y), .flags(fl), .wr_result(wr));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(alu_op_t o, logic [W-1:0] x, logic [W-1:0] z);
    logic [W:0] e;
    logic ew;
    op = o; a = x; b = z;
    ew = 1'b1;
    case (o)
      ALU_ADD:  e = x + z;
      ALU_SUB:  e = {1'b0, x} - {1'b0, z};
      ALU_RSB:  e = {1'b0, z} - {1'b0, x};
      ALU_CMP:  begin e = {1'b0, x} - {1'b0, z}; ew = 1'b0; end
      ALU_AND:  e = {1'b0, x & z};
      ALU_OR:   e = {1'b0, x | z};
      ALU_XOR:  e = {1'b0, x ^ z};
      ALU_SHR:  e = {x[0], x >> 1};
      ALU_ASR:  e = {x[0], x[W-1], x[W-1:1]};
      ALU_SHL:  e = {x, 1'b0};
      default:  e = {1'b0, z};
    endcase
    #1;
    checks++;
    if (y !== e[W-1:0] || fl.c !== e[W] || fl.z !== (e[W-1:0] == 0) || fl.n !== e[W-1] || wr !== ew) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h fl=%b exp=%h", o.name(), x, z, y, fl, e);
    end
  endtask

  initial begin
    alu_op_t ops[11] = '{ALU_ADD, ALU_SUB, ALU_RSB, ALU_CMP, ALU_AND, ALU_OR,
                         ALU_XOR, ALU_SHR, ALU_ASR, ALU_SHL, ALU_PASS};
    foreach (ops[i]) begin
      run(ops[i], 8'h00, 8'h00);
      run(ops[i], 8'hff, 8'h01);
      run(ops[i], 8'h80, 8'h80);
      run(ops[i], 8'h05, 8'h08);
      for (int k = 0; k < 50; k++) run(ops[i], W'($urandom), W'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
