// snap_bitfield: the bit-field function block of the SNAP execution unit.
//
// Serves the two bit-field instructions of the SNAP instruction set:
//   BFS  reg[dst][hi:lo] := reg[src1]   -> set_y  (insert the low hi-lo+1
//                                          bits of src into dst_old)
//   BFR  reg[src1] := reg[dst][hi:lo]   -> read_y (the field of dst_old,
//                                          right-aligned, zero-extended)
// BFS helps build messages and BFR helps take them apart. Combinational.
// The range comes from the instruction's 16-bit immediate; placing hi in
// imm[11:8] and lo in imm[3:0], and treating hi < lo as an empty field
// (BFS leaves dst unchanged, BFR returns zero), are this design's choices.
module snap_bitfield #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0]         dst_old,
  input  logic [W-1:0]         src,
  input  logic [$clog2(W)-1:0] hi,
  input  logic [$clog2(W)-1:0] lo,
  output logic [W-1:0]         set_y,
  output logic [W-1:0]         read_y
);
  logic [W-1:0] field_mask;   // ones in bits hi..lo of dst

  always_comb begin
    field_mask = '0;
    for (int i = 0; i < W; i++)
      if (i <= int'(hi) && i >= int'(lo)) field_mask[i] = 1'b1;
    set_y  = (dst_old & ~field_mask) | ((src << lo) & field_mask);
    read_y = (dst_old & field_mask) >> lo;
  end
endmodule
