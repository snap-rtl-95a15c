// snap_adder: the adder function block of the SNAP execution unit.
//
// Adds or subtracts two W-bit operands (two's complement, wrap-around, no
// flags). Used by ADD, SUB and ADDI. Purely combinational: the result is
// valid in the same cycle as the operands. The processor has no exceptions,
// so no overflow is reported; that choice is this design's.
module snap_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,   // 1: y = a - b, 0: y = a + b
  output logic [W-1:0] y
);
  always_comb y = a + (sub ? ~b : b) + W'(sub);
endmodule
