// tb_selector: checks both operand sources, and literal extension and
// truncation at data widths 8, 4 and 16.
module tb_selector;
  import mpu_pkg::*;
  sel_t s;
  logic [7:0] lit;
  logic [7:0] r8, o8;
  logic [3:0] r4, o4;
  logic [15:0] r16, o16;
  int checks = 0, failures = 0;

  selector #(.DATA_W(8))  d8  (.sel(s), .lit(lit), .reg_data(r8),  .operand(o8));
  selector #(.DATA_W(4))  d4  (.sel(s), .lit(lit), .reg_data(r4),  .operand(o4));
  selector #(.DATA_W(16)) d16 (.sel(s), .lit(lit), .reg_data(r16), .operand(o16));

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 100; i++) begin
      s = sel_t'(i[0]); lit = 8'($urandom); r8 = 8'($urandom); r4 = 4'($urandom); r16 = 16'($urandom);
      #1;
      checks++;
      if (s == SEL_REG) begin
        if (o8 !== r8 || o4 !== r4 || o16 !== r16) failures++;
      end else begin
        if (o8 !== lit || o4 !== lit[3:0] || o16 !== {8'h00, lit}) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
