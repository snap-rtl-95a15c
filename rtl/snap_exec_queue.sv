// snap_exec_queue: the executable queue of SNAP.
//
// A FIFO of 3-bit tokens, each naming what the processor should run next:
// tokens 0..6 name a timestamp register whose event has become executable
// (inserted by the timer coprocessor), token 7 a newly arrived message
// (inserted by the incoming-message buffer). The fetch unit removes the head
// token when it executes a DONE instruction and looks up the handler address
// for it; with the queue empty, DONE waits.
//
// Both producers may insert in the same cycle: the timer's token is placed
// ahead of the message token. If only one slot is free the timer is served
// and the message token waits (the incoming buffer holds the first word
// back). Tokens are readable the cycle after insertion. The depth is not
// given by the SNAP description; 8 is this design's choice.
module snap_exec_queue
  import snap_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic clk,
  input  logic rst_n,
  // from the timer coprocessor
  input  logic tmr_valid,
  output logic tmr_ready,
  input  tok_t tmr_tok,
  // from the incoming-message buffer (always token TOK_MSG)
  input  logic msg_valid,
  output logic msg_ready,
  // to the fetch unit
  output logic out_valid,
  input  logic out_ready,
  output tok_t out_tok
);
  localparam int unsigned AW = $clog2(DEPTH);

  tok_t          q [DEPTH];
  logic [AW-1:0] rptr, wptr;
  logic [AW:0]   count, free_slots;
  logic          do_t, do_m, do_r;

  assign free_slots = (AW+1)'(DEPTH) - count;
  assign tmr_ready  = (free_slots != '0);
  assign msg_ready  = tmr_valid ? (free_slots >= (AW+1)'(2)) : (free_slots != '0);
  assign do_t       = tmr_valid && tmr_ready;
  assign do_m       = msg_valid && msg_ready;
  assign out_valid  = (count != '0);
  assign out_tok    = q[rptr];
  assign do_r       = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rptr  <= '0;
      wptr  <= '0;
      count <= '0;
    end else begin
      wptr  <= wptr + AW'(do_t) + AW'(do_m);
      rptr  <= rptr + AW'(do_r);
      count <= count + (AW+1)'(do_t) + (AW+1)'(do_m) - (AW+1)'(do_r);
    end
  end

  always_ff @(posedge clk) begin
    if (do_t) q[wptr] <= tmr_tok;
    if (do_m) q[do_t ? wptr + 1'b1 : wptr] <= TOK_MSG;
  end

  assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH));
endmodule
