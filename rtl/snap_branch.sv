// snap_branch: the conditional-branch function block of the SNAP execution unit.
//
// Decides whether a conditional branch is taken from the tested register
// value and a condition code (see snap_pkg::bcond_e): EQZ, NEZ, LTZ, GEZ
// (sign of the 16-bit value) and ALWAYS; any other code is never taken.
// Combinational. The set of conditions is this design's choice.
module snap_branch
  import snap_pkg::*;
(
  input  word_t      v,
  input  logic [3:0] cond,
  output logic       taken
);
  always_comb begin
    unique case (cond)
      BC_EQZ: taken = (v == '0);
      BC_NEZ: taken = (v != '0);
      BC_LTZ: taken = v[W-1];
      BC_GEZ: taken = !v[W-1];
      BC_ALW: taken = 1'b1;
      default: taken = 1'b0;
    endcase
  end
endmodule
