// tb_snap_handler_table: self-checking test of the handler table: reset
// values (message row -> boot loader at 2, others 0), then random writes and
// reads against a reference array.
module tb_snap_handler_table;
  logic clk = 0, rst_n = 0;
  logic [2:0] rd_row, wr_row;
  logic [15:0] rd_addr, wr_addr;
  logic we;
  logic [15:0] model [8];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  snap_handler_table #(.ROWS(8), .BOOT_MSG(16'd2)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) model[i] = (i == 7) ? 16'd2 : 16'd0;
    we = 0; wr_row = 0; wr_addr = 0; rd_row = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      rd_row = 3'($urandom);
      #1;
      checks++;
      if (rd_addr !== model[rd_row]) begin
        failures++;
        $display("FAIL row %0d got %h exp %h", rd_row, rd_addr, model[rd_row]);
      end
      we = (n > 16) && 1'($urandom); wr_row = 3'($urandom); wr_addr = 16'($urandom);
      @(posedge clk);
      if (we) model[wr_row] = wr_addr;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
