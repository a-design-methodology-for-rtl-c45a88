// stack_unit: return-address stack of the program counter.
//
// A last-in first-out store of DEPTH words of W bits. `push` stores `din` on
// top; `pop` removes the top word, which is always visible on `top`. Both act
// on the rising clock edge. A push onto a full stack or a pop from an empty
// one is ignored and sets the sticky `err` flag, cleared only by reset.
// The published design places a stack unit inside the program counter to record the
// PC; its depth and its overflow handling are this design's choice.
module stack_unit #(
  parameter int DEPTH = 4,
  parameter int W     = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic         pop,
  input  logic [W-1:0] din,
  output logic [W-1:0] top,
  output logic         empty,
  output logic         full,
  output logic         err
);

  localparam int PTR_W = $clog2(DEPTH + 1);
  localparam int IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]     mem [DEPTH];
  logic [PTR_W-1:0] cnt;  // number of stored words

  assign empty = (cnt == '0);
  assign full  = (cnt == PTR_W'(DEPTH));
  assign top   = empty ? '0 : mem[IDX_W'(cnt - 1'b1)];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      err <= 1'b0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (push && !pop) begin
      if (full) err <= 1'b1;
      else begin
        mem[IDX_W'(cnt)] <= din;
        cnt      <= cnt + 1'b1;
      end
    end else if (pop && !push) begin
      if (empty) err <= 1'b1;
      else       cnt <= cnt - 1'b1;
    end
  end

  // The controller never pushes and pops in the same cycle.
  a_push_pop_excl : assert property (@(posedge clk) disable iff (!rst_n) !(push && pop));

endmodule
