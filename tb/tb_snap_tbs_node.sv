// tb_snap_tbs_node: SNAP running the inner loop of a time-based network
// simulation, at its default parameters.
//
// In such a simulation every simulated node is one SNAP. Events reach a node
// as messages that carry a timestamp. The node files each one in its
// hardware event queue and later runs a handler when simulated time reaches
// it. This testbench loads a node program through the startup message:
//   - the message handler is one SCHEDULE r15,r15,r15 (register number,
//     timestamp high, timestamp low, taken from the message in that order)
//     followed by an acknowledgement word 0xAC and DONE;
//   - timer handler i replies 0xE0 + i and executes DONE.
// The testbench then:
//  1. sends seven event messages, one per timestamp register, two of them for
//     the same time, and checks that all seven registers are on;
//  2. starts the time base (one tick per cycle, time scale 1) and checks that
//     the handlers reply in timestamp order, equal times lowest register
//     first, each within 200 cycles of its time;
//  3. presents a new event message in the very cycle the timer queues event
//     0, so the executable queue takes two tokens at once (timer first). The
//     message re-uses register 1 for time 900, and event 1 must run again.
// Counted mechanisms: timer and message dispatch, simultaneous insertion,
// and all seven timestamp registers on at once.
module tb_snap_tbs_node;
  import snap_pkg::*;
  import snap_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic tick, net_in_valid, net_in_ready, net_in_first, net_out_valid, net_out_ready;
  word_t net_in_data, net_out_data;
  int checks = 0, failures = 0;
  longint cyc = 0;
  w16 img [$];
  w16 got [$];
  longint got_cyc [$];
  longint tick_at [longint unsigned];
  longint unsigned nticks = 0;
  int n_msg_dispatch = 0, n_tmr_dispatch = 0, n_dual = 0, n_all_on = 0;

  // event i is scheduled at TS[i]; the order they run in
  localparam int TS [7] = '{400, 250, 250, 600, 320, 500, 700};
  localparam int ORDER [7] = '{1, 2, 4, 0, 5, 3, 6};

  always #5 clk = ~clk;

  snap_top dut (.*);

  task automatic fail(input string s);
    failures++;
    $display("FAIL %s", s);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
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
      if (dut.tmr_v && dut.tmr_r && dut.msg_v && dut.msg_r) n_dual++;
      if (dut.ts_on == 7'h7F) n_all_on++;
    end
  end

  task automatic at(int addr);
    while (32 + img.size() < addr) img.push_back(16'h0000);
    if (32 + img.size() != addr) fail($sformatf("layout overlaps at %0d", addr));
  endtask
  task automatic emit(prog_t p);
    foreach (p[i]) img.push_back(p[i]);
  endtask

  // handler addresses: row 7 (messages) at 80, timer row r at 100 + 4r
  task automatic build();
    at(32);
    for (int r = 0; r < 8; r++) begin
      emit(addi(2, 0, r == 7 ? 80 : 100 + 4 * r));
      emit(addi(1, 0, r));
      emit(seth(1, 2));
    end
    emit(addi(15, 0, 16'hA0));
    emit(done());
    at(80);  emit(schedule(15, 15, 15)); emit(addi(15, 0, 16'hAC)); emit(done());
    for (int r = 0; r < 7; r++) begin
      at(100 + 4 * r); emit(addi(15, 0, 16'hE0 + r)); emit(done());
    end
  endtask

  // send msg; the first word is already on the wires when first_presented
  task automatic send(w16 msg [$], bit first_presented = 0);
    foreach (msg[i]) begin
      if (!(i == 0 && first_presented)) begin
        @(negedge clk);
        net_in_valid = 1; net_in_first = (i == 0); net_in_data = msg[i];
      end
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
    tick = 0; net_in_valid = 0; net_in_first = 0; net_in_data = 0; net_out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    build();
    msg = {16'(img.size())};
    foreach (img[i]) msg.push_back(img[i]);
    send(msg);
    expect_words('{16'hA0}, 20000, "startup");
    got.delete(); got_cyc.delete();

    // 1. file seven events
    for (int i = 0; i < 7; i++) begin
      send('{16'(i), 16'(TS[i] >> 16), 16'(TS[i])});
      expect_words('{16'hAC}, 2000, $sformatf("event message %0d", i));
      got.delete(); got_cyc.delete();
    end
    checks++;
    if (dut.ts_on !== 7'h7F) fail($sformatf("timestamp registers on = %b", dut.ts_on));

    // 2. and 3. run time; the new message meets the timer's token for event 0
    @(negedge clk);
    tick = 1;
    while (!(dut.tmr_v && dut.tmr_tok == 3'd0)) @(negedge clk);
    net_in_valid = 1; net_in_first = 1; net_in_data = 16'd1;
    send('{16'd1, 16'd0, 16'd900}, 1);
    foreach (ORDER[k]) begin
      e.push_back(16'hE0 + 16'(ORDER[k]));
      if (ORDER[k] == 0) e.push_back(16'hAC);
    end
    e.push_back(16'hE1);
    expect_words(e, 3000, "events");
    tick = 0;
    // reply times against the time each event was reached
    for (int i = 0, k = 0; i < e.size() && i < got.size(); i++) begin
      int id, t;
      if (e[i] == 16'hAC) continue;
      id = int'(e[i]) - 'hE0;
      t  = (k < 7) ? TS[id] : 900;
      k++;
      checks++;
      if (got_cyc[i] <= tick_at[t] || got_cyc[i] > tick_at[t] + 200)
        fail($sformatf("event %0d replied at %0d, time %0d reached at %0d", id, got_cyc[i], t, tick_at[t]));
    end

    $display("message dispatches=%0d timer dispatches=%0d simultaneous inserts=%0d cycles with all seven on=%0d",
             n_msg_dispatch, n_tmr_dispatch, n_dual, n_all_on);
    checks += 4;
    if (n_msg_dispatch != 9) fail($sformatf("message dispatches %0d, expected 9", n_msg_dispatch));
    if (n_tmr_dispatch != 8) fail($sformatf("timer dispatches %0d, expected 8", n_tmr_dispatch));
    if (n_dual == 0) fail("timer and message tokens never entered the queue together");
    if (n_all_on == 0) fail("the seven timestamp registers were never all on");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
