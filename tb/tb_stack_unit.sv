// tb_stack_unit: random push/pop sequence against a queue model, including
// overflow and underflow, which must be ignored and flagged.
module tb_stack_unit;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [7:0] din = 0, top;
  logic empty, full, err;
  int checks = 0, failures = 0;
  logic [7:0] model[$];
  logic merr;

  stack_unit #(.DEPTH(4), .W(8)) dut (.clk(clk), .rst_n(rst_n), .push(push), .pop(pop),
    .din(din), .top(top), .empty(empty), .full(full), .err(err));

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp();
    checks++;
    if (empty !== (model.size() == 0) || full !== (model.size() == 4) || err !== merr ||
        (model.size() > 0 && top !== model[$])) begin
      failures++;
      $display("FAIL size=%0d top=%h empty=%b full=%b err=%b", model.size(), top, empty, full, err);
    end
  endtask

  initial begin
    merr = 0;
    #12 rst_n = 1;
    cmp();
    // fill past full
    for (int i = 0; i < 5; i++) begin
      @(negedge clk); push = 1; pop = 0; din = 8'(8'h10 + i);
      if (model.size() < 4) model.push_back(din); else merr = 1;
      @(posedge clk); #1; push = 0; cmp();
    end
    // pop to empty and beyond
    for (int i = 0; i < 5; i++) begin
      @(negedge clk); pop = 1;
      if (model.size() > 0) void'(model.pop_back()); else merr = 1;
      @(posedge clk); #1; pop = 0; cmp();
    end
    rst_n = 0; merr = 0; model.delete(); #1 rst_n = 1; cmp();
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      push = 0; pop = 0;
      if ($urandom_range(1)) begin
        push = (model.size() < 4); din = 8'($urandom);
        if (push) model.push_back(din);
      end else begin
        pop = (model.size() > 0);
        if (pop) void'(model.pop_back());
      end
      @(posedge clk); #1; push = 0; pop = 0; cmp();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
