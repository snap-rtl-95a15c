// snap_mem_bank: one bank of SNAP's main memory.
//
// SNAP has no cache: its small on-chip memory (dense DRAM in the original)
// is fast enough for single-cycle reads and writes. This model is a
// 16-bit-wide array of 2**AW words with one port: a write stores wdata on
// the rising edge; a read returns the word in rdata on the next cycle. The
// bank size is not given by the SNAP description; AW = 12 (4096 words) is
// this design's choice. DRAM refresh is not modelled. The array is not
// reset; software must write a word before it reads it.
module snap_mem_bank
  import snap_pkg::*;
#(
  parameter int unsigned AW = 12
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  word_t         wdata,
  output word_t         rdata
);
  word_t mem [2**AW];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
