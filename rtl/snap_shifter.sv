// snap_shifter: the shifter function block of the SNAP execution unit.
//
// Logical shift of a W-bit value left or right by 0 to W-1 places, zeros
// shifted in. Combinational. The shift kinds (SLL, SRL) and the shift count
// taken from the low bits of a register are this design's choice.
module snap_shifter #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0]         a,
  input  logic [$clog2(W)-1:0] amt,
  input  logic                 right,  // 1: logical right, 0: left
  output logic [W-1:0]         y
);
  always_comb y = right ? (a >> amt) : (a << amt);
endmodule
