// tb_snap_bitfield: self-checking test of the bit-field block (BFS, BFR).
// For every (hi, lo) pair and random values, the expected results are built
// bit by bit: BFS copies src[i-lo] into positions lo..hi of dst; BFR takes
// dst[lo+i] for i = 0..hi-lo into the low bits.
module tb_snap_bitfield;
  logic [15:0] dst_old, src, set_y, read_y;
  logic [3:0] hi, lo;
  int checks = 0, failures = 0;

  snap_bitfield #(.W(16)) dut (.dst_old, .src, .hi, .lo, .set_y, .read_y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int h = 0; h < 16; h++)
      for (int l = 0; l < 16; l++)
        for (int r = 0; r < 3; r++) begin
          logic [15:0] es, er;
          dst_old = 16'($urandom); src = 16'($urandom); hi = 4'(h); lo = 4'(l);
          #1;
          es = dst_old; er = '0;
          for (int i = l; i <= h; i++) begin
            es[i]   = src[i-l];
            er[i-l] = dst_old[i];
          end
          checks += 2;
          if (set_y !== es) begin
            failures++;
            $display("FAIL BFS hi=%0d lo=%0d d=%h s=%h y=%h exp=%h", h, l, dst_old, src, set_y, es);
          end
          if (read_y !== er) begin
            failures++;
            $display("FAIL BFR hi=%0d lo=%0d d=%h y=%h exp=%h", h, l, dst_old, read_y, er);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
