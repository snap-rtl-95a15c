// snap_out_buffer: the outgoing-message buffer of SNAP.
//
// Holds words the processor writes to register r15 until the interconnect
// takes them. Its status register, readable by software, holds the number
// of free spaces, so a program can check there is room for a whole message
// before sending it. When the buffer is full the processor skips an
// instruction that writes r15 instead of blocking (decided in the execution
// unit from `full`), which keeps a congested network from deadlocking the
// processor. The depth is not given by the SNAP description and defaults to
// 16 words.
//
// Timing: a word written in one cycle is offered to the interconnect in the
// next; `status` counts free spaces after the writes and reads so far.
module snap_out_buffer
  import snap_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  // from the execution unit (writes of r15)
  input  logic  wr_valid,
  output logic  full,
  input  word_t wr_data,
  output word_t status,      // free spaces remaining
  // to the interconnect
  output logic  net_valid,
  input  logic  net_ready,
  output word_t net_data
);
  logic                   in_ready;
  logic [$clog2(DEPTH):0] count;

  snap_fifo #(.W(W), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .in_valid (wr_valid), .in_ready (in_ready), .in_data (wr_data),
    .out_valid(net_valid), .out_ready(net_ready), .out_data(net_data),
    .count
  );

  assign full   = !in_ready;
  assign status = W'(DEPTH) - W'(count);

  // The execution unit never writes a full buffer.
  assert property (@(posedge clk) disable iff (!rst_n) wr_valid |-> !full);
endmodule
