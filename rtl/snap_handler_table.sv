// snap_handler_table: the dispatch table of SNAP's DONE instruction.
//
// Eight rows of 16-bit code addresses, one per timestamp register (rows
// 0..6) and one for incoming messages (row 7). When the fetch unit takes a
// token from the executable queue it reads the row the token names and
// jumps there. Software changes a row with the SETH instruction. Reads are
// combinational; a write takes effect on the next rising clock edge.
//
// Reset values are this design's choice: the message row points at the boot
// code's loader (BOOT_MSG), so the startup message is loaded by the boot
// code; the other rows point at address 0, whose DONE simply waits again.
module snap_handler_table
  import snap_pkg::*;
#(
  parameter int unsigned ROWS     = 8,
  parameter word_t       BOOT_MSG = 16'd2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [$clog2(ROWS)-1:0] rd_row,
  output word_t                   rd_addr,
  input  logic                    we,
  input  logic [$clog2(ROWS)-1:0] wr_row,
  input  word_t                   wr_addr
);
  word_t tbl [ROWS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ROWS; i++) tbl[i] <= (i == ROWS-1) ? BOOT_MSG : '0;
    end else if (we) begin
      tbl[wr_row] <= wr_addr;
    end
  end

  assign rd_addr = tbl[rd_row];
endmodule
