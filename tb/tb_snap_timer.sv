// tb_snap_timer: self-checking test of the timer coprocessor.
//  1. Schedules registers at several times with time scale 1 (lsb 0) and a
//     tick every cycle; each token must appear exactly 2 cycles after the
//     tick that makes the incrementer equal to its timestamp (pipeline
//     latency), with the register turned off.
//  2. Two registers with the same timestamp: both tokens, lowest first.
//  3. CANCEL: a cancelled register never produces a token; a register that
//     matches the sample except in its top bits never fires.
//  4. TIMESCALE 3: the sample is count[34:3]; the event fires when
//     count >> 3 first equals the timestamp.
//  5. Token back-pressure: tokens wait while the queue refuses them.
// Expected times come from a counter kept by the testbench.
module tb_snap_timer;
  import snap_pkg::*;
  logic clk = 0, rst_n = 0;
  logic tick, cmd_valid, tok_valid, tok_ready;
  tcmd_t cmd;
  tok_t tok;
  logic [39:0] count;
  logic [6:0] ts_on;
  longint unsigned mycount = 0;
  longint cyc = 0;
  longint fire_cyc [8];
  longint tick_cyc [$];
  int checks = 0, failures = 0;
  int order [$];

  always #5 clk = ~clk;

  snap_timer #(.NTS(7), .INC_W(40), .TS_W(32)) dut (.*);

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

  // tick_at[v]: cycle of the edge at which the incrementer became v
  longint tick_at [longint unsigned];
  always @(posedge clk) begin
    cyc++;
    if (rst_n && tick) begin
      mycount++;
      tick_at[mycount] = cyc;
    end
    if (rst_n && tok_valid && tok_ready) begin
      fire_cyc[tok] = cyc;
      order.push_back(int'(tok));
    end
  end

  task automatic command(input tcmd_e c, input int id, input logic [31:0] ts);
    @(negedge clk);
    cmd_valid = 1; cmd.cmd = c; cmd.id = 3'(id); cmd.ts = ts;
    @(negedge clk);
    cmd_valid = 0;
  endtask

  initial begin
    tick = 0; cmd_valid = 0; cmd = '0; tok_ready = 1;
    for (int i = 0; i < 8; i++) fire_cyc[i] = -1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 1. schedule while stopped, then run
    command(TC_SCHED, 0, 32'd10);
    command(TC_SCHED, 1, 32'd25);
    command(TC_SCHED, 2, 32'd40);
    command(TC_SCHED, 3, 32'd40);   // same time as 2
    command(TC_SCHED, 4, 32'd30);
    command(TC_CANCEL, 4, 32'd0);   // 3. cancelled
    command(TC_SCHED, 6, 32'h4000_0020);  // equal to the sample in the low 30 bits only
    checks++;
    if (ts_on !== 7'b1001111) fail($sformatf("on bits %b", ts_on));
    @(negedge clk);
    tick = 1;
    begin : run
      longint t10 = -1, t25 = -1, t40 = -1;
      repeat (60) @(negedge clk);
      tick = 0;
      t10 = tick_at[10]; t25 = tick_at[25]; t40 = tick_at[40];
      repeat (5) @(negedge clk);
      checks += 5;
      if (fire_cyc[0] != t10 + 2) fail($sformatf("reg0 fired %0d expected %0d", fire_cyc[0], t10 + 2));
      if (fire_cyc[1] != t25 + 2) fail($sformatf("reg1 fired %0d expected %0d", fire_cyc[1], t25 + 2));
      if (fire_cyc[2] != t40 + 2) fail($sformatf("reg2 fired %0d expected %0d", fire_cyc[2], t40 + 2));
      if (fire_cyc[3] != t40 + 3) fail($sformatf("reg3 fired %0d expected %0d", fire_cyc[3], t40 + 3));
      if (fire_cyc[4] != -1) fail("cancelled register fired");
      checks += 2;
      if (order.size() != 4 || order[2] != 2 || order[3] != 3) fail("token order");
      if (ts_on !== 7'b1000000) fail($sformatf("on bits after firing %b", ts_on));
      checks++;
      if (fire_cyc[6] != -1) fail("register differing in the top digit fired");
      checks++;
      if (count !== 40'(mycount)) fail("incrementer count");
    end
    // 4. time scale: lsb 3, schedule for sample = (count>>3) + 4
    begin : scaled
      longint unsigned target;
      longint texp = -1;
      command(TC_SCALE, 0, 32'd3);
      target = (mycount >> 3) + 4;
      command(TC_SCHED, 5, 32'(target));
      @(negedge clk);
      tick = 1;
      repeat (60) @(negedge clk);
      tick = 0;
      for (longint unsigned v = target << 3; v < (target << 3) + 8; v++)
        if (tick_at.exists(v) && texp < 0) texp = tick_at[v] + 2;
      repeat (4) @(negedge clk);
      checks++;
      if (fire_cyc[5] != texp) fail($sformatf("scaled fire %0d expected %0d", fire_cyc[5], texp));
    end
    // 5. back-pressure: token held until accepted
    tok_ready = 0;
    command(TC_SCALE, 0, 32'd0);
    command(TC_SCHED, 6, 32'(mycount + 3));
    @(negedge clk);
    tick = 1;
    repeat (5) @(negedge clk);
    tick = 0;
    repeat (5) @(negedge clk);
    checks += 2;
    if (!tok_valid || tok !== 3'd6) fail("held token missing");
    if (fire_cyc[6] != -1) fail("token taken while refused");
    tok_ready = 1;
    @(negedge clk);
    checks++;
    if (fire_cyc[6] == -1 || tok_valid) fail("token not delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
