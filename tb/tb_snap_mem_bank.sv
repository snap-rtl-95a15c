// tb_snap_mem_bank: self-checking test of one memory bank: random writes and
// reads against a reference array; read data must appear one cycle after
// the request and hold while the bank is idle.
module tb_snap_mem_bank;
  logic clk = 0;
  logic en, we;
  logic [11:0] addr;
  logic [15:0] wdata, rdata;
  logic [15:0] model [4096];
  logic written [4096];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  snap_mem_bank #(.AW(12)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4096; i++) written[i] = 0;
    en = 0; we = 0; addr = 0; wdata = 0;
    @(negedge clk);
    for (int n = 0; n < 4000; n++) begin
      logic [11:0] a;
      a = 12'($urandom_range(0, 63)) + ((n % 3 == 0) ? 12'h0 : 12'hF80);
      if (n % 2 == 0 || !written[a]) begin
        en = 1; we = 1; addr = a; wdata = 16'($urandom);
        @(negedge clk);
        model[a] = wdata; written[a] = 1;
      end else begin
        en = 1; we = 0; addr = a;
        @(negedge clk);
        en = 0;
        checks++;
        if (rdata !== model[a]) begin
          failures++;
          $display("FAIL read %h got %h exp %h", a, rdata, model[a]);
        end
        @(negedge clk);
        checks++;
        if (rdata !== model[a]) begin
          failures++;
          $display("FAIL read data not held");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
