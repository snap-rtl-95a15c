// tb_snap_memif: self-checking test of the memory-interface block:
// address = base + offset modulo 2**16, bank = bit 12, word = bits 11..0.
module tb_snap_memif;
  logic [15:0] base, offset, addr;
  logic bank;
  logic [11:0] word;
  int checks = 0, failures = 0;

  snap_memif #(.BANK_AW(12)) dut (.base, .offset, .addr, .bank, .word);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      int unsigned s;
      base = 16'($urandom); offset = (i % 2) ? 16'($urandom) : 16'($urandom_range(0, 20));
      #1;
      s = (32'(base) + 32'(offset)) % 65536;
      checks++;
      if (addr !== 16'(s) || bank !== ((s / 4096) % 2 == 1) || word !== 12'(s % 4096)) begin
        failures++;
        $display("FAIL %h+%h -> %h %b %h", base, offset, addr, bank, word);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
