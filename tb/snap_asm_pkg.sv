// snap_asm_pkg: instruction encoders for SNAP testbenches.
//
// Each function returns the instruction word(s) of one SNAP instruction in
// the format op[15:12] d[11:8] a[7:4] b[3:0], followed for two-word
// instructions by the 16-bit immediate. Written independently of the RTL
// decoder from the instruction list in snap_pkg, so tests assemble programs
// rather than hard-code hex.
package snap_asm_pkg;
  typedef logic [15:0] w16;
  typedef w16 prog_t [$];

  function automatic w16 f(int op, int d, int a, int b);
    return w16'((op << 12) | (d << 8) | (a << 4) | b);
  endfunction

  function automatic prog_t alu(string m, int d, int a, int b);
    int op;
    case (m)
      "ADD": op = 0; "SUB": op = 1; "AND": op = 2; "OR": op = 3;
      "XOR": op = 4; "SLL": op = 5; default: op = 6;   // SRL
    endcase
    return '{f(op, d, a, b)};
  endfunction
  function automatic prog_t addi(int d, int a, int imm); return '{f(7, d, a, 0), w16'(imm)}; endfunction
  function automatic prog_t ld(int d, int a, int imm);   return '{f(8, d, a, 0), w16'(imm)}; endfunction
  function automatic prog_t st(int d, int a, int imm);   return '{f(9, d, a, 0), w16'(imm)}; endfunction
  function automatic prog_t bfs(int dst, int src, int hi, int lo);
    return '{f(10, dst, src, 0), w16'((hi << 8) | lo)};
  endfunction
  function automatic prog_t bfr(int dst, int src, int hi, int lo);
    return '{f(11, dst, src, 0), w16'((hi << 8) | lo)};
  endfunction
  // cond: 0 EQZ 1 NEZ 2 LTZ 3 GEZ 4 ALWAYS; offset counts from the offset word
  function automatic prog_t br(int cond, int r, int off); return '{f(12, r, cond, 0), w16'(off)}; endfunction
  function automatic prog_t jump(int target);  return '{f(13, 0, 0, 0), w16'(target)}; endfunction
  function automatic prog_t jr(int r);         return '{f(13, r, 0, 1)}; endfunction
  function automatic prog_t jal(int r, int target); return '{f(13, r, 0, 2), w16'(target)}; endfunction
  function automatic prog_t done();            return '{f(14, 0, 0, 0)}; endfunction
  function automatic prog_t cancel(int r);     return '{f(14, r, 0, 1)}; endfunction
  function automatic prog_t timescale(int r);  return '{f(14, r, 0, 2)}; endfunction
  function automatic prog_t seth(int rrow, int raddr); return '{f(14, rrow, raddr, 3)}; endfunction
  function automatic prog_t status(int d);     return '{f(14, d, 0, 4)}; endfunction
  function automatic prog_t schedule(int rid, int rhi, int rlo); return '{f(15, rid, rhi, rlo)}; endfunction
endpackage
