// tb_snap_shifter: self-checking test of the shifter function block.
// Compares left and right logical shifts with a bit-by-bit reference.
module tb_snap_shifter;
  logic [15:0] a, y;
  logic [3:0] amt;
  logic right;
  int checks = 0, failures = 0;

  snap_shifter #(.W(16)) dut (.a, .amt, .right, .y);

  task automatic try(input logic [15:0] ta, input logic [3:0] tn, input logic tr);
    logic [15:0] e;
    a = ta; amt = tn; right = tr;
    #1;
    for (int i = 0; i < 16; i++) begin
      int s;
      s = tr ? i + int'(tn) : i - int'(tn);
      e[i] = (s >= 0 && s < 16) ? ta[s] : 1'b0;
    end
    checks++;
    if (y !== e) begin
      failures++;
      $display("FAIL a=%h n=%0d r=%b y=%h exp=%h", ta, tn, tr, y, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 16; n++) begin
      try(16'h8001, 4'(n), 0);
      try(16'h8001, 4'(n), 1);
    end
    for (int i = 0; i < 300; i++) try(16'($urandom), 4'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
