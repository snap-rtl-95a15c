// tb_snap_adder: self-checking test of the adder function block.
// Applies corner values and random operands for add and subtract and
// compares with a reference computed in 32-bit arithmetic, truncated.
module tb_snap_adder;
  logic [15:0] a, b, y;
  logic sub;
  int checks = 0, failures = 0;

  snap_adder #(.W(16)) dut (.a, .b, .sub, .y);

  task automatic try(input logic [15:0] ta, tb_, input logic ts);
    int unsigned ref_v;
    a = ta; b = tb_; sub = ts;
    #1;
    ref_v = ts ? (32'(ta) + 32'h10000 - 32'(tb_)) : (32'(ta) + 32'(tb_));
    checks++;
    if (y !== ref_v[15:0]) begin
      failures++;
      $display("FAIL a=%h b=%h sub=%b y=%h exp=%h", ta, tb_, ts, y, ref_v[15:0]);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try(16'h0000, 16'h0000, 0);
    try(16'hFFFF, 16'h0001, 0);
    try(16'h0000, 16'h0001, 1);
    try(16'h8000, 16'h0001, 1);
    try(16'h1234, 16'h1234, 1);
    for (int i = 0; i < 500; i++) try(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
