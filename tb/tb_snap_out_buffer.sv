// tb_snap_out_buffer: self-checking test of the outgoing-message buffer.
// Checks that the status register counts free spaces (DEPTH when empty, 0
// when full), that `full` rises exactly when DEPTH words are held, and that
// words leave in order under a random network reader.
module tb_snap_out_buffer;
  logic clk = 0, rst_n = 0;
  logic wr_valid, full, net_valid, net_ready;
  logic [15:0] wr_data, status, net_data;
  int checks = 0, failures = 0;
  logic [15:0] exp_q [$];
  int held;

  always #5 clk = ~clk;

  snap_out_buffer #(.DEPTH(16)) dut (.*);

  task automatic fail(input string s);
    failures++;
    $display("FAIL %s", s);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (net_valid && net_ready) begin
      checks++;
      if (exp_q.size() == 0 || net_data !== exp_q[0]) fail($sformatf("out %h", net_data));
      else void'(exp_q.pop_front());
    end
    if (wr_valid) exp_q.push_back(wr_data);
  end

  initial begin
    wr_valid = 0; wr_data = 0; net_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (status != 16 || full) fail($sformatf("empty status %0d", status));
    for (int i = 0; i < 16; i++) begin
      wr_valid = 1; wr_data = 16'(i * 7);
      @(negedge clk);
      checks++;
      if (status != 16'(15 - i)) fail($sformatf("status %0d after %0d writes", status, i + 1));
    end
    wr_valid = 0;
    checks++;
    if (!full) fail("not full after 16 writes");
    // random traffic
    for (int n = 0; n < 2000; n++) begin
      net_ready = 1'($urandom);
      held = exp_q.size();
      wr_valid = !full && 1'($urandom);
      wr_data = 16'($urandom);
      #1;
      checks++;
      if (status != 16'(16 - held) || full != (held == 16)) fail($sformatf("status %0d held %0d", status, held));
      @(negedge clk);
    end
    wr_valid = 0; net_ready = 1;
    repeat (20) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || status != 16) fail("not drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
