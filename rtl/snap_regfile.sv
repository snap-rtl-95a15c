// snap_regfile: the register file of the SNAP execution unit.
//
// Sixteen 16-bit general-purpose registers. Register 0 always reads zero.
// Register 15 is not stored here: it names the message queues, and the
// execution unit routes its reads to the incoming-message buffer and its
// writes to the outgoing-message buffer, so this file reads r15 as zero and
// ignores writes to it. Three combinational read ports (one per operand
// field of an instruction) and one write port, written on the rising clock
// edge. Registers reset to zero; the reset and the third read port are this
// design's choices.
module snap_regfile
  import snap_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] ra_d,
  input  logic [3:0] ra_a,
  input  logic [3:0] ra_b,
  output word_t      rd_d,
  output word_t      rd_a,
  output word_t      rd_b,
  input  logic       we,
  input  logic [3:0] wa,
  input  word_t      wd
);
  word_t regs [1:14];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i <= 14; i++) regs[i] <= '0;
    end else if (we && wa != 4'd0 && wa != RMSG) begin
      regs[wa] <= wd;
    end
  end

  function automatic word_t rd(input logic [3:0] a);
    return (a == 4'd0 || a == RMSG) ? '0 : regs[a];
  endfunction

  always_comb begin
    rd_d = rd(ra_d);
    rd_a = rd(ra_a);
    rd_b = rd(ra_b);
  end
endmodule
