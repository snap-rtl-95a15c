// snap_memif: the memory-interface function block of the SNAP execution unit.
//
// Calculates the address of a load or store as base register plus 16-bit
// immediate, and splits it into a bank select and a word index. SNAP's memory
// has two banks: bank 0 holds instructions and data and is shared with the
// fetch unit through an arbiter; bank 1 is data only and private to the
// execution unit. Bank select is address bit BANK_AW, so each bank holds
// 2**BANK_AW words and higher address bits are ignored. The addressing mode
// and the address map are this design's choices. Combinational.
module snap_memif #(
  parameter int unsigned BANK_AW = 12
) (
  input  logic [15:0]        base,
  input  logic [15:0]        offset,
  output logic [15:0]        addr,
  output logic               bank,
  output logic [BANK_AW-1:0] word
);
  always_comb begin
    addr = base + offset;
    bank = addr[BANK_AW];
    word = addr[BANK_AW-1:0];
  end
endmodule
