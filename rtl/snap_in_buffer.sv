// snap_in_buffer: the incoming-message buffer of SNAP.
//
// Holds words arriving from the interconnect until the processor reads them
// through register r15 (each read of r15 removes the head word; the
// processor blocks while the buffer is empty). When the first word of a new
// message is accepted, the buffer also inserts a message token (TOK_MSG)
// into the executable queue, so that a DONE instruction can dispatch to the
// message handler. Marking message starts with a `net_first` flag on the
// incoming channel is this design's choice; the depth is not given by the
// SNAP description and defaults to 16 words.
//
// Timing: a first word is accepted only in a cycle in which the token can
// be inserted too (tok_ready), so a message never loses its token. Words
// are readable the cycle after they are accepted.
module snap_in_buffer
  import snap_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  // from the interconnect
  input  logic  net_valid,
  output logic  net_ready,
  input  word_t net_data,
  input  logic  net_first,   // this word starts a message
  // to the executable queue
  output logic  tok_valid,
  input  logic  tok_ready,
  // to the execution unit (reads of r15)
  output logic  rd_valid,
  input  logic  rd_ready,
  output word_t rd_data
);
  logic fifo_in_ready;
  logic fifo_in_valid;

  // A first word needs both a slot and room in the executable queue.
  assign net_ready     = fifo_in_ready && (!net_first || tok_ready);
  assign fifo_in_valid = net_valid && net_ready;
  assign tok_valid     = net_valid && net_first && fifo_in_ready;

  snap_fifo #(.W(W), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .in_valid (fifo_in_valid), .in_ready (fifo_in_ready), .in_data (net_data),
    .out_valid(rd_valid), .out_ready(rd_ready), .out_data(rd_data),
    .count    ()
  );
endmodule
