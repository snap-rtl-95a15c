// snap_logic: the logic function block of the SNAP execution unit.
//
// Bitwise AND, OR or XOR of two W-bit operands, chosen by op
// (0 AND, 1 OR, 2 XOR, 3 AND-NOT). Combinational. The set of operations is
// this design's choice; the instruction set uses AND, OR and XOR, and op 3
// (a AND NOT b, a bit clear) completes the 2-bit select.
module snap_logic #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [1:0]   op,
  output logic [W-1:0] y
);
  always_comb begin
    unique case (op)
      2'd0: y = a & b;
      2'd1: y = a | b;
      2'd2: y = a ^ b;
      default: y = a & ~b;
    endcase
  end
endmodule
