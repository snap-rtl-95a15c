// tb_snap_boot_rom: self-checking test of the boot code overlay. The
// expected words are the loader program hand-assembled into hex from the
// instruction format op[15:12] d[11:8] a[7:4] b[3:0] (LOAD_ADDR = 0x20);
// words past the loader must read 0.
module tb_snap_boot_rom;
  logic [4:0] addr;
  logic [15:0] word;
  int checks = 0, failures = 0;
  logic [15:0] exp_w [32];

  snap_boot_rom #(.AW(5), .LOAD_ADDR(16'h0020)) dut (.addr, .word);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) exp_w[i] = 16'h0000;
    exp_w[0]  = 16'hE000;  // DONE
    exp_w[2]  = 16'h01F0;  // ADD r1, r15, r0
    exp_w[3]  = 16'h7200;  // ADDI r2, r0
    exp_w[4]  = 16'h0020;  //   LOAD_ADDR
    exp_w[5]  = 16'h0320;  // ADD r3, r2, r0
    exp_w[6]  = 16'hC100;  // BR EQZ r1
    exp_w[7]  = 16'h0009;  //   +9 -> 16
    exp_w[8]  = 16'h9F30;  // ST r15, [r3]
    exp_w[10] = 16'h7330;  // ADDI r3, r3
    exp_w[11] = 16'h0001;
    exp_w[12] = 16'h7110;  // ADDI r1, r1
    exp_w[13] = 16'hFFFF;
    exp_w[14] = 16'hC110;  // BR NEZ r1
    exp_w[15] = 16'hFFF9;  //   -7 -> 8
    exp_w[16] = 16'hD201;  // JR r2
    for (int i = 0; i < 32; i++) begin
      addr = 5'(i);
      #1;
      checks++;
      if (word !== exp_w[i]) begin
        failures++;
        $display("FAIL addr %0d got %h exp %h", i, word, exp_w[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
