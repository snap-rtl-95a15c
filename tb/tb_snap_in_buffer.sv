// tb_snap_in_buffer: self-checking test of the incoming-message buffer.
// Sends messages of random length with a random reader; checks that words
// come out in order, that exactly one message token is produced per message
// (on the first word only), that a first word waits while the executable
// queue cannot take its token, and that the buffer holds DEPTH words and
// then refuses more.
module tb_snap_in_buffer;
  logic clk = 0, rst_n = 0;
  logic net_valid, net_ready, net_first, tok_valid, tok_ready, rd_valid, rd_ready;
  logic [15:0] net_data, rd_data;
  int checks = 0, failures = 0;
  int sent = 0, got = 0, toks = 0, firsts = 0;
  logic [15:0] exp_q [$];

  always #5 clk = ~clk;

  snap_in_buffer #(.DEPTH(16)) dut (.*);

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

  // reader and token monitor
  always @(posedge clk) if (rst_n) begin
    if (rd_valid && rd_ready) begin
      checks++;
      if (exp_q.size() == 0 || rd_data !== exp_q[0]) fail($sformatf("read %h", rd_data));
      else void'(exp_q.pop_front());
      got++;
    end
    if (tok_valid && tok_ready) begin
      toks++;
      checks++;
      if (!(net_valid && net_ready && net_first)) fail("token without first word");
    end
    if (net_valid && net_ready) begin
      exp_q.push_back(net_data);
      if (net_first) firsts++;
    end
  end

  initial begin
    net_valid = 0; net_first = 0; net_data = 0; tok_ready = 1; rd_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Fill: 20 words offered, no reader: exactly 16 accepted.
    @(negedge clk);
    for (int i = 0; i < 20; i++) begin
      net_valid = 1; net_first = (i == 0); net_data = 16'(100 + i);
      @(negedge clk);
    end
    net_valid = 0;
    checks++;
    if (exp_q.size() != 16 || net_ready) fail($sformatf("fill: held %0d", exp_q.size()));
    // Drain.
    rd_ready = 1;
    repeat (20) @(negedge clk);
    rd_ready = 0;
    checks++;
    if (rd_valid) fail("not empty after drain");
    // A first word waits while the token cannot be taken.
    tok_ready = 0; net_valid = 1; net_first = 1; net_data = 16'hBEEF;
    repeat (3) begin
      @(negedge clk);
      checks++;
      if (net_ready) fail("first word accepted without token room");
    end
    tok_ready = 1;
    @(negedge clk);
    net_valid = 0; net_first = 0;
    // Random traffic.
    fork
      begin
        for (int m = 0; m < 40; m++) begin
          int len = $urandom_range(1, 6);
          for (int k = 0; k < len; k++) begin
            net_valid = 1; net_first = (k == 0); net_data = 16'($urandom);
            tok_ready = 1'($urandom_range(0, 3) != 0);
            @(posedge clk);
            while (!(net_valid && net_ready)) begin
              @(negedge clk);
              tok_ready = 1'($urandom_range(0, 3) != 0);
              @(posedge clk);
            end
            @(negedge clk);
            net_valid = 0;
          end
        end
      end
      begin
        repeat (2000) begin
          @(negedge clk);
          rd_ready = 1'($urandom);
        end
      end
    join
    rd_ready = 1;
    repeat (40) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) fail($sformatf("%0d words never read", exp_q.size()));
    checks++;
    if (toks != firsts) fail($sformatf("tokens %0d first words %0d", toks, firsts));
    $display("messages=%0d tokens=%0d words=%0d", firsts, toks, got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
