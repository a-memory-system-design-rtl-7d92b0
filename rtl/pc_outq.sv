// pc_outq: output queue at the last stage of a controller unit.
//
// Each entry is a finished request message and up to two subroutine calls
// (call0, call1) into other units; a unit may call two units concurrently.
// The head entry is sent as one message per call, call0 first; the entry is
// popped after its last call is accepted (out_ready). A call whose unit is
// U_NONE is skipped. free lets the unit's arbiter accept new requests only
// while every request in flight in the unit's pipeline can still be stored,
// so the pipeline never has to stall.
module pc_outq
  import sm_pkg::*;
#(
  parameter int DEPTH = 8
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    push,
  input  pc_msg_t push_msg,
  input  call_t   push_call0,
  input  call_t   push_call1,
  output logic [$clog2(DEPTH+1)-1:0] free,
  output logic    out_valid,
  output pc_msg_t out_msg,
  input  logic    out_ready
);
  typedef struct packed {
    pc_msg_t msg;
    call_t   c0;
    call_t   c1;
  } ent_t;

  ent_t ent_in, head;
  logic empty, full, pop, sent0;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic cur_is_c1;
  call_t cur;

  assign ent_in = '{msg: push_msg, c0: push_call0, c1: push_call1};

  pc_fifo #(.T(ent_t), .DEPTH(DEPTH)) u_q (
    .clk, .rst_n, .push, .din(ent_in), .pop, .head, .empty, .full, .count, .free
  );

  // which call of the head entry is being sent
  always_comb begin
    cur_is_c1 = sent0 || (head.c0.unit == U_NONE);
    cur       = cur_is_c1 ? head.c1 : head.c0;
    out_valid = !empty && (cur.unit != U_NONE);
    out_msg      = head.msg;
    out_msg.dst  = cur.unit;
    out_msg.typ  = cur.typ;
    // pop when the last call goes, or when the entry has nothing (left) to send
    pop = !empty && ((cur.unit == U_NONE) ||
                     (out_ready && (cur_is_c1 || head.c1.unit == U_NONE)));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sent0 <= 1'b0;
    else if (pop) sent0 <= 1'b0;
    else if (out_valid && out_ready && !cur_is_c1) sent0 <= 1'b1;
  end
endmodule
