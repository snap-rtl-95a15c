// tb_snap_top: end-to-end test of SNAP at its default parameters.
//
// The testbench plays the host and the network. It sends a startup message
// carrying a program; the boot code loads it at address 32 and runs it. The
// program installs handlers with SETH, sets the time scale, schedules three
// timer events and cancels one, reports ready, and executes DONE. Then:
//  A. a two-word message [a, b]: the handler replies a+b (via a bank-1
//     store/load), b (via a bank-0 store/load that competes with fetches)
//     and the last saved buffer status, then leaves by JUMP to a DONE;
//  B. a burst message while the network refuses output: the handler loops
//     writing 20 words; 16 fill the buffer, 4 are skipped; it saves the
//     status register (0) and the testbench then drains 20..5;
//  C. another [a, b] message whose second word arrives 300 cycles late, so
//     the handler's read of r15 waits; replies a+b, b and the saved status 0;
//  D. the time base starts; with time scale lsb = 2, event 0 (timestamp 30)
//     must run once the incrementer reaches 120 and event 1 (60) at 240;
//     event 0 builds 0x5AE0 with BFS and returns 5 with BFR; event 1 calls a
//     subroutine with JAL (link register r14), which replies and returns
//     with JR; event 1 then replies its return address, 152; the cancelled
//     event 2 must never reply.
// Each reply is compared with values computed here, and each mechanism
// (message and timer dispatch, DONE waiting on an empty queue, r15 blocking
// read, skipped r15 write, bank-0 access through the arbiter, bank-1 access, relative
// branch, JUMP, JAL, JR, time scale, cancel, BFS/BFR) is counted; one that never
// happened is a failure.
module tb_snap_top;
  import snap_pkg::*;
  import snap_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic tick, net_in_valid, net_in_ready, net_in_first, net_out_valid, net_out_ready;
  word_t net_in_data, net_out_data;
  int checks = 0, failures = 0;
  longint cyc = 0;
  w16 img [$];            // program image, address 32 upwards
  w16 got [$];            // words received from SNAP
  longint got_cyc [$];
  longint tick_at [longint unsigned];
  longint unsigned nticks = 0;

  // mechanism counters
  int n_msg_dispatch = 0, n_tmr_dispatch = 0, n_done_wait = 0, n_in_block = 0;
  int n_skip = 0, n_contend = 0, n_e_bank0 = 0, n_bank1 = 0, n_rel = 0, n_abs = 0, n_tgt = 0, n_link = 0;
  int n_scale = 0, n_cancel = 0, n_bfs = 0, n_bfr = 0;

  always #5 clk = ~clk;

  snap_top dut (.*);

  task automatic fail(input string s);
    failures++;
    $display("FAIL %s", s);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (tick) begin nticks++; tick_at[nticks] = cyc; end
      if (net_out_valid && net_out_ready) begin got.push_back(net_out_data); got_cyc.push_back(cyc); end
      if (dut.eq_r && dut.eq_v) begin
        if (dut.eq_tok == TOK_MSG) n_msg_dispatch++; else n_tmr_dispatch++;
      end
      if (dut.u_fetch.state == 2'd2 && dut.u_fetch.t.sel == PC_DONE && !dut.eq_v && dut.b_rv) n_done_wait++;
      if (dut.u_exec.need_pop && !dut.in_v) n_in_block++;
      if (dut.skipped) n_skip++;
      if (dut.f_req && dut.e_req) n_contend++;
      if (dut.e_gnt) n_e_bank0++;
      if (dut.m1_en) n_bank1++;
      if (dut.b_rr && dut.b_rv) begin
        if (dut.b_rd.sel == PC_REL) n_rel++;
        if (dut.b_rd.sel == PC_ABS) n_abs++;
        if (dut.b_rd.sel == PC_TGT) n_tgt++;
        if (dut.b_rd.pcout) n_link++;
      end
      if (dut.t_valid && dut.t_cmd.cmd == TC_SCALE) n_scale++;
      if (dut.t_valid && dut.t_cmd.cmd == TC_CANCEL) n_cancel++;
      if (dut.u_exec.retire && dut.u_exec.op == OP_BFS) n_bfs++;
      if (dut.u_exec.retire && dut.u_exec.op == OP_BFR) n_bfr++;
    end
  end

  // program assembly at fixed addresses
  task automatic at(int addr);
    while (32 + img.size() < addr) img.push_back(16'h0000);
    if (32 + img.size() != addr) fail($sformatf("layout overlaps at %0d", addr));
  endtask
  task automatic emit(prog_t p);
    foreach (p[i]) img.push_back(p[i]);
  endtask

  task automatic build();
    // init
    at(32);  emit(addi(2, 0, 80));  emit(addi(1, 0, 7)); emit(seth(1, 2));
    at(37);  emit(addi(2, 0, 130)); emit(seth(0, 2));
    at(40);  emit(addi(2, 0, 150)); emit(addi(1, 0, 1)); emit(seth(1, 2));
    at(45);  emit(addi(2, 0, 180)); emit(addi(1, 0, 2)); emit(seth(1, 2));
    at(50);  emit(addi(12, 0, 16'h5A));
    at(52);  emit(addi(3, 0, 2));   emit(timescale(3));
    at(55);  emit(addi(2, 0, 30));  emit(schedule(0, 0, 2));
    at(58);  emit(addi(2, 0, 60));  emit(addi(1, 0, 1)); emit(schedule(1, 0, 2));
    at(63);  emit(addi(2, 0, 45));  emit(addi(1, 0, 2)); emit(schedule(1, 0, 2));
    at(68);  emit(cancel(1));
    at(69);  emit(addi(15, 0, 16'hA0));
    at(71);  emit(done());
    // message handler
    at(80);  emit(alu("ADD", 4, 15, 0));
    at(81);  emit(br(1, 4, 100 - 82));
    at(83);  emit(addi(5, 0, 20));
    at(85);  emit(alu("ADD", 15, 5, 0));
    at(86);  emit(addi(5, 5, -1));
    at(88);  emit(br(1, 5, 85 - 89));
    at(90);  emit(status(7));
    at(91);  emit(done());
    at(100); emit(alu("ADD", 6, 15, 4));
    at(101); emit(st(6, 0, 16'h1100));
    at(103); emit(ld(15, 0, 16'h1100));
    at(105); emit(st(6, 0, 16'h0F00));
    at(107); emit(ld(8, 0, 16'h0F00));
    at(109); emit(alu("SUB", 15, 8, 4));
    at(110); emit(alu("ADD", 15, 7, 0));
    at(111); emit(jump(120));
    at(120); emit(done());
    // event 0
    at(130); emit(addi(9, 0, 16'hE0));
    at(132); emit(bfs(9, 12, 15, 8));
    at(134); emit(alu("ADD", 15, 9, 0));
    at(135); emit(bfr(9, 13, 15, 12));
    at(137); emit(alu("ADD", 15, 13, 0));
    at(138); emit(done());
    // event 1: calls a subroutine with JAL, which returns with JR
    at(150); emit(jal(14, 170));
    at(152); emit(alu("ADD", 15, 14, 0));
    at(153); emit(done());
    at(170); emit(addi(15, 0, 16'hE1));
    at(172); emit(jr(14));
    // event 2 (cancelled)
    at(180); emit(addi(15, 0, 16'hE2));
    at(182); emit(done());
  endtask

  task automatic send(w16 msg [$]);
    foreach (msg[i]) begin
      @(negedge clk);
      net_in_valid = 1; net_in_first = (i == 0); net_in_data = msg[i];
      @(posedge clk);
      while (!net_in_ready) @(posedge clk);
      @(negedge clk);
      net_in_valid = 0; net_in_first = 0;
    end
  endtask

  task automatic expect_words(w16 e [$], int max_cycles, string what);
    int k = 0;
    while (got.size() < e.size() && k < max_cycles) begin @(posedge clk); k++; end
    repeat (20) @(posedge clk);
    checks++;
    if (got.size() != e.size()) fail($sformatf("%s: got %0d words, expected %0d", what, got.size(), e.size()));
    for (int i = 0; i < e.size() && i < got.size(); i++) begin
      checks++;
      if (got[i] !== e[i]) fail($sformatf("%s: word %0d = %h, expected %h", what, i, got[i], e[i]));
    end
  endtask

  initial begin
    w16 msg [$];
    w16 e [$];
    w16 a, b;
    tick = 0; net_in_valid = 0; net_in_first = 0; net_in_data = 0; net_out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    build();
    // startup message
    msg = {16'(img.size())};
    foreach (img[i]) msg.push_back(img[i]);
    send(msg);
    expect_words('{16'hA0}, 20000, "ready");
    got.delete(); got_cyc.delete();
    // A
    a = 16'($urandom_range(1, 1000)); b = 16'($urandom);
    send('{a, b});
    expect_words('{a + b, b, 16'd0}, 5000, "message A");
    got.delete();
    // B
    net_out_ready = 0;
    send('{16'd0});
    repeat (2000) @(posedge clk);
    @(negedge clk);
    net_out_ready = 1;
    e.delete();
    for (int v = 20; v >= 5; v--) e.push_back(16'(v));
    expect_words(e, 5000, "burst");
    got.delete();
    // C
    // the second word arrives late: the handler's read of r15 must wait
    a = 16'($urandom_range(1, 1000)); b = 16'($urandom);
    send('{a});
    repeat (300) @(posedge clk);
    @(negedge clk);
    net_in_valid = 1; net_in_first = 0; net_in_data = b;
    @(posedge clk);
    while (!net_in_ready) @(posedge clk);
    @(negedge clk);
    net_in_valid = 0;
    expect_words('{a + b, b, 16'd0}, 5000, "message C");
    got.delete(); got_cyc.delete();
    // D
    @(negedge clk);
    tick = 1;
    expect_words('{16'h5AE0, 16'd5, 16'hE1, 16'd152}, 3000, "events");
    repeat (600) @(posedge clk);
    checks++;
    if (got.size() != 4) fail("extra words (cancelled event ran?)");
    if (got_cyc.size() >= 3) begin
      checks += 2;
      // the sample (count >> 2) reaches 30 at count 120, and 60 at count 240
      if (got_cyc[0] <= tick_at[120] || got_cyc[0] > tick_at[120] + 120)
        fail($sformatf("event 0 reply at %0d, time 120 reached at %0d", got_cyc[0], tick_at[120]));
      if (got_cyc[2] <= tick_at[240] || got_cyc[2] > tick_at[240] + 120)
        fail($sformatf("event 1 reply at %0d, time 240 reached at %0d", got_cyc[2], tick_at[240]));
      $display("event 0: time reached at cycle %0d, reply at %0d", tick_at[120], got_cyc[0]);
      $display("event 1: time reached at cycle %0d, reply at %0d", tick_at[240], got_cyc[2]);
    end
    $display("message dispatches=%0d timer dispatches=%0d DONE-wait cycles=%0d r15-read waits=%0d",
             n_msg_dispatch, n_tmr_dispatch, n_done_wait, n_in_block);
    $display("skipped r15 writes=%0d bank0 exec accesses=%0d (contended cycles=%0d) bank1 accesses=%0d REL=%0d ABS=%0d TGT=%0d JAL=%0d",
             n_skip, n_e_bank0, n_contend, n_bank1, n_rel, n_abs, n_tgt, n_link);
    $display("timescale=%0d cancel=%0d BFS=%0d BFR=%0d", n_scale, n_cancel, n_bfs, n_bfr);
    checks += 15;
    if (n_msg_dispatch != 4) fail($sformatf("message dispatches %0d, expected 4", n_msg_dispatch));
    if (n_tmr_dispatch != 2) fail($sformatf("timer dispatches %0d, expected 2", n_tmr_dispatch));
    if (n_done_wait == 0) fail("DONE never waited");
    if (n_in_block == 0) fail("r15 read never waited");
    if (n_skip != 4) fail($sformatf("skipped writes %0d, expected 4", n_skip));
    if (n_e_bank0 == 0) fail("execution unit never used bank 0 through the arbiter");
    if (n_bank1 == 0) fail("no bank-1 access");
    if (n_rel == 0) fail("no relative branch");
    if (n_abs == 0) fail("no JUMP");
    if (n_tgt == 0) fail("no JR");
    if (n_link == 0) fail("no JAL");
    if (n_scale == 0) fail("no TIMESCALE");
    if (n_cancel == 0) fail("no CANCEL");
    if (n_bfs == 0) fail("no BFS");
    if (n_bfr == 0) fail("no BFR");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
