// snap_fifo: first-in first-out buffer with valid/ready handshakes.
//
// Helper used by the SNAP message buffers and by the pipelined I and B
// channels between the fetch and execution units, whose slack lets the two
// units run concurrently. A word is written when in_valid && in_ready and
// read when out_valid && out_ready; both may happen in the same cycle. The
// head word is presented combinationally (show-ahead), so a word written in
// one cycle can be read in the next. count is the number of words held.
// DEPTH must be a power of two. The original uses asynchronous pipelined
// channels; this clocked FIFO standing in for them is this design's choice.
module snap_fifo #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic [W-1:0]           in_data,
  output logic                   out_valid,
  input  logic                   out_ready,
  output logic [W-1:0]           out_data,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rptr, wptr;
  logic          do_wr, do_rd;

  assign in_ready  = (count != (AW+1)'(DEPTH));
  assign out_valid = (count != '0);
  assign out_data  = mem[rptr];
  assign do_wr     = in_valid && in_ready;
  assign do_rd     = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rptr  <= '0;
      wptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  always_ff @(posedge clk) if (do_wr) mem[wptr] <= in_data;

  // Never more words than slots, never a read from an empty buffer.
  assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH));
endmodule
