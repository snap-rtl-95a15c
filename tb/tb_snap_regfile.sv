// tb_snap_regfile: self-checking test of the register file. Random writes
// (including to r0 and r15, which must be ignored) and random reads on all
// three ports are compared with a reference array.
module tb_snap_regfile;
  logic clk = 0, rst_n = 0;
  logic [3:0] ra_d, ra_a, ra_b, wa;
  logic [15:0] rd_d, rd_a, rd_b, wd;
  logic we;
  logic [15:0] model [16];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  snap_regfile dut (.clk, .rst_n, .ra_d, .ra_a, .ra_b, .rd_d, .rd_a, .rd_b, .we, .wa, .wd);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [3:0] r, input logic [15:0] got);
    checks++;
    if (got !== model[r]) begin
      failures++;
      $display("FAIL r%0d got %h exp %h", r, got, model[r]);
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) model[i] = '0;
    we = 0; wa = 0; wd = 0; ra_d = 0; ra_a = 0; ra_b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      ra_d = 4'($urandom); ra_a = 4'($urandom); ra_b = 4'($urandom);
      #1;
      chk(ra_d, rd_d); chk(ra_a, rd_a); chk(ra_b, rd_b);
      we = 1'($urandom); wa = 4'($urandom); wd = 16'($urandom);
      @(posedge clk);
      if (we && wa != 0 && wa != 15) model[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
