// tb_snap_exec_queue: self-checking test of the executable queue.
// Random timer and message tokens (sometimes in the same cycle) against a
// random reader; the expected order puts the timer's token ahead of a message
// token inserted in the same cycle. Also fills the queue and checks that it
// holds exactly DEPTH tokens and that a message token is refused when one slot
// is left and the timer also inserts.
module tb_snap_exec_queue;
  logic clk = 0, rst_n = 0;
  logic tmr_valid, tmr_ready, msg_valid, msg_ready, out_valid, out_ready;
  logic [2:0] tmr_tok, out_tok;
  int checks = 0, failures = 0, both = 0;
  logic [2:0] exp_q [$];

  always #5 clk = ~clk;

  snap_exec_queue #(.DEPTH(8)) dut (.*);

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
    if (out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0 || out_tok !== exp_q[0]) fail($sformatf("token %0d", out_tok));
      else void'(exp_q.pop_front());
    end
    if (tmr_valid && tmr_ready) exp_q.push_back(tmr_tok);
    if (msg_valid && msg_ready) exp_q.push_back(3'd7);
    if (tmr_valid && tmr_ready && msg_valid && msg_ready) both++;
  end

  initial begin
    tmr_valid = 0; msg_valid = 0; tmr_tok = 0; out_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fill with 7 timer tokens, then timer + message with one slot left
    @(negedge clk);
    for (int i = 0; i < 7; i++) begin
      tmr_valid = 1; tmr_tok = 3'(i);
      @(negedge clk);
    end
    tmr_tok = 3'd5; msg_valid = 1;
    #1;
    checks++;
    if (!tmr_ready || msg_ready) fail("one slot: timer must win");
    @(negedge clk);
    tmr_valid = 0;
    #1;
    checks++;
    if (tmr_ready || msg_ready) fail("full queue still ready");
    msg_valid = 0;
    out_ready = 1;
    repeat (10) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) fail("not drained");
    for (int n = 0; n < 3000; n++) begin
      tmr_valid = 1'($urandom); tmr_tok = 3'($urandom_range(0, 6));
      msg_valid = 1'($urandom); out_ready = 1'($urandom);
      @(negedge clk);
    end
    tmr_valid = 0; msg_valid = 0; out_ready = 1;
    repeat (12) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || out_valid) fail("tokens left");
    checks++;
    if (both == 0) fail("no simultaneous insertion");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
