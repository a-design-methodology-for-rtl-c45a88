// program_counter: the PC register with its stack unit.
//
// On a clock edge with `step` high the PC moves according to `mode`:
// PC_INC adds one, PC_JUMP loads `target` if `take` is high (else adds one),
// PC_CALL pushes PC+1 on the stack unit and loads `target`, PC_RET loads the
// address on top of the stack and pops it. Reset clears the PC to 0.
//
// External access: another unit may load the PC directly by holding
// `ext_req` high with the address on `ext_addr`. The request is served at
// the end of the next execute cycle (`step`), where it replaces whatever the
// executing command would have done to the PC (including a call's push or a
// return's pop); `ext_ack` is high in that cycle. The requester must hold
// the request until it sees the acknowledge.
// Increment, load, the stack that records the PC and direct external access
// follow the published design; taking the target from the command literal and the
// request/acknowledge handshake are this design's choice.
module program_counter
  import mpu_pkg::*;
#(
  parameter int PC_W        = 8,
  parameter int STACK_DEPTH = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            step,      // execute cycle: update the PC
  input  pc_mode_t        mode,
  input  logic            take,      // condition of PC_JUMP holds
  input  logic [PC_W-1:0] target,
  input  logic            ext_req,   // external PC load request
  input  logic [PC_W-1:0] ext_addr,
  output logic            ext_ack,
  output logic [PC_W-1:0] pc,
  output logic            stack_err
);

  logic [PC_W-1:0] pc_inc, ret_addr;
  logic            push, pop;
  logic            st_empty, st_full;

  assign pc_inc = pc + 1'b1;
  assign ext_ack = step && ext_req;
  assign push    = step && !ext_req && (mode == PC_CALL);
  assign pop     = step && !ext_req && (mode == PC_RET);

  stack_unit #(.DEPTH(STACK_DEPTH), .W(PC_W)) u_stack (
    .clk   (clk),
    .rst_n (rst_n),
    .push  (push),
    .pop   (pop),
    .din   (pc_inc),
    .top   (ret_addr),
    .empty (st_empty),
    .full  (st_full),
    .err   (stack_err)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pc <= '0;
    else if (ext_ack) pc <= ext_addr;
    else if (step) begin
      unique case (mode)
        PC_INC:  pc <= pc_inc;
        PC_JUMP: pc <= take ? target : pc_inc;
        PC_CALL: pc <= st_full ? pc_inc : target;
        PC_RET:  pc <= st_empty ? pc_inc : ret_addr;
      endcase
    end
  end

  // An external request, once raised, stays until it is acknowledged.
  a_ext_hold : assert property (@(posedge clk) disable iff (!rst_n)
                                ext_req && !ext_ack |=> ext_req);

endmodule
