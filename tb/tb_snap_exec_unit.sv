// tb_snap_exec_unit: self-checking test of the execution unit on its own.
// The testbench plays the fetch unit (it offers the words the fetch unit
// would forward on I, and absorbs B tokens and TGT values), both memory
// banks (bank 0 behind a randomly granting port), the message buffers, the
// timer and the handler table. A program exercising every instruction is
// run; the checks compare (1) every result the program writes to r15
// (routed to the outgoing buffer) with values computed here, (2) the exact
// sequence of B tokens, (3) TGT values, timer commands and table writes,
// and (4) that an r15 write with the outgoing buffer full is skipped without
// reading its operands.
module tb_snap_exec_unit;
  import snap_pkg::*;
  import snap_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic i_valid, i_ready, b_valid, b_ready, tgt_valid, tgt_ready, in_valid, in_ready;
  logic out_valid, out_full, e_req, e_we, e_gnt, e_rvalid, m1_en, m1_we, t_valid, ht_we;
  logic retire, skipped;
  word_t i_data, tgt_data, in_data, out_data, out_status, e_wdata, e_rdata, m1_wdata, m1_rdata, ht_addr;
  btok_t b_tok;
  logic [11:0] e_addr, m1_addr;
  tcmd_t t_cmd;
  tok_t ht_row;
  int checks = 0, failures = 0, nskipped = 0;
  longint cyc = 0;

  w16 iq [$];          // words offered on I
  w16 inq [$];         // incoming message words
  w16 exp_out [$];
  btok_t exp_tok [$];
  w16 exp_tgt [$];
  string exp_cmd [$];
  w16 bank0 [4096], bank1 [4096];

  always #5 clk = ~clk;

  snap_exec_unit #(.BANK_AW(12)) dut (.*);

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

  logic gnt_ok;
  assign e_gnt = e_req && gnt_ok;
  assign out_status = 16'd9;
  always @(negedge clk) begin
    cyc++;
    gnt_ok   = 1'($urandom);
    i_valid  = iq.size() != 0;
    i_data   = iq.size() != 0 ? iq[0] : '0;
    in_valid = inq.size() != 0;
    in_data  = inq.size() != 0 ? inq[0] : '0;
    b_ready  = (cyc % 3 != 0);
    tgt_ready = 1'b1;
  end

  always @(posedge clk) if (rst_n) begin
    if (i_valid && i_ready) void'(iq.pop_front());
    if (in_valid && in_ready) void'(inq.pop_front());
    if (skipped) nskipped++;
    if (out_valid) begin
      checks++;
      if (exp_out.size() == 0 || out_data !== exp_out[0]) fail($sformatf("out %h exp %h", out_data, exp_out.size() ? exp_out[0] : 16'hx));
      if (exp_out.size()) void'(exp_out.pop_front());
    end
    if (b_valid && b_ready) begin
      checks++;
      if (exp_tok.size() == 0 || b_tok !== exp_tok[0]) fail($sformatf("token %p", b_tok));
      if (exp_tok.size()) void'(exp_tok.pop_front());
    end
    if (tgt_valid && tgt_ready) begin
      checks++;
      if (exp_tgt.size() == 0 || tgt_data !== exp_tgt[0]) fail($sformatf("tgt %h", tgt_data));
      if (exp_tgt.size()) void'(exp_tgt.pop_front());
    end
    if (t_valid || ht_we) begin
      string s;
      s = ht_we ? $sformatf("SETH %0d %h", ht_row, ht_addr)
                : $sformatf("T%0d %0d %h", t_cmd.cmd, t_cmd.id, t_cmd.ts);
      checks++;
      if (exp_cmd.size() == 0 || s != exp_cmd[0]) fail($sformatf("command %s", s));
      if (exp_cmd.size()) void'(exp_cmd.pop_front());
    end
    // memories
    e_rvalid <= e_gnt && !e_we;
    if (e_gnt && e_we) bank0[e_addr] <= e_wdata;
    if (e_gnt && !e_we) e_rdata <= bank0[e_addr];
    if (m1_en && m1_we) bank1[m1_addr] <= m1_wdata;
    if (m1_en && !m1_we) m1_rdata <= bank1[m1_addr];
  end

  localparam btok_t IS = '{sel: PC_INC, send: 1'b1, pcout: 1'b0};
  localparam btok_t LINK = '{sel: PC_ABS, send: 1'b1, pcout: 1'b1};
  function automatic btok_t T(pcsel_e s); return '{sel: s, send: 1'b0, pcout: 1'b0}; endfunction

  // queue an instruction: forwarded words, expected tokens
  task automatic put(prog_t p, int nfwd, btok_t t0, btok_t t1, int ntok);
    for (int i = 0; i < nfwd; i++) iq.push_back(p[i]);
    exp_tok.push_back(t0);
    if (ntok == 2) exp_tok.push_back(t1);
  endtask
  task automatic one(prog_t p); put(p, 1, IS, IS, 1); endtask
  task automatic two(prog_t p); put(p, 2, IS, IS, 2); endtask

  initial begin
    w16 x, y;
    e_rvalid = 0; e_rdata = 0; m1_rdata = 0; out_full = 0;
    i_valid = 0; in_valid = 0; b_ready = 0; tgt_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    x = 16'($urandom); y = 16'($urandom);
    inq.push_back(x); inq.push_back(y);
    two(addi(1, 0, 5));
    two(addi(2, 0, 16'h1234));
    one(alu("ADD", 15, 1, 2)); exp_out.push_back(16'h1239);
    one(alu("SUB", 15, 2, 1)); exp_out.push_back(16'h122F);
    one(alu("AND", 15, 1, 2)); exp_out.push_back(16'h0004);
    one(alu("OR",  15, 1, 2)); exp_out.push_back(16'h1235);
    one(alu("XOR", 15, 1, 2)); exp_out.push_back(16'h1231);
    one(alu("SLL", 15, 2, 1)); exp_out.push_back(16'h4680);
    one(alu("SRL", 15, 2, 1)); exp_out.push_back(16'h0091);
    one(alu("SUB", 3, 15, 15));                 // r3 := x - y (two pops)
    one(alu("ADD", 15, 3, 0)); exp_out.push_back(x - y);
    two(st(1, 0, 16'h1005));                    // bank 1
    two(st(2, 0, 16'h0010));                    // bank 0
    two(ld(15, 0, 16'h1005)); exp_out.push_back(16'h0005);
    two(ld(15, 0, 16'h0010)); exp_out.push_back(16'h1234);
    two(bfs(2, 1, 7, 4));                       // r2[7:4] := 5
    one(alu("ADD", 15, 2, 0)); exp_out.push_back(16'h1254);
    two(bfr(2, 4, 15, 8));                      // r4 := r2[15:8]
    one(alu("ADD", 15, 4, 0)); exp_out.push_back(16'h0012);
    put(br(0, 0, 7), 1, T(PC_REL), IS, 2);      // taken
    put(br(0, 1, 7), 1, T(PC_INC), IS, 2);      // not taken
    put(br(3, 2, 7), 1, T(PC_REL), IS, 2);      // GEZ 0x1254: taken
    put(jump(16'h0100), 1, T(PC_ABS), IS, 2);
    put(jr(1), 1, T(PC_TGT), IS, 2); exp_tgt.push_back(16'h0005);
    // JAL: the fetch unit sends the target word's address (here 0x0040)
    put(jal(7, 16'h0300), 1, LINK, IS, 2);
    iq.push_back(16'h0040);
    one(alu("ADD", 15, 7, 0)); exp_out.push_back(16'h0041);
    put(done(), 1, T(PC_DONE), IS, 2);
    two(addi(5, 0, 3));
    one(schedule(5, 1, 2)); exp_cmd.push_back($sformatf("T0 3 %h", 32'h00051254));
    one(cancel(5));         exp_cmd.push_back($sformatf("T1 3 %h", 32'h00000003));
    one(timescale(1));      exp_cmd.push_back($sformatf("T2 0 %h", 32'h00000005));
    one(seth(5, 2));        exp_cmd.push_back("SETH 3 1254");
    one(status(15));        exp_out.push_back(16'd9);
    wait (iq.size() == 0);
    repeat (30) @(posedge clk);
    // skipped r15 write: no operand read, nothing written
    @(negedge clk);
    out_full = 1;
    inq.push_back(16'hAAAA);
    one(alu("ADD", 15, 15, 1));
    one(alu("ADD", 6, 1, 1));
    wait (iq.size() == 0);
    repeat (30) @(posedge clk);
    @(negedge clk);
    out_full = 0;
    one(alu("ADD", 15, 15, 6)); exp_out.push_back(16'hAAAA + 16'd10);
    wait (iq.size() == 0);
    repeat (30) @(posedge clk);
    checks += 5;
    if (exp_out.size() != 0) fail($sformatf("%0d results missing", exp_out.size()));
    if (exp_tok.size() != 0) fail($sformatf("%0d tokens missing", exp_tok.size()));
    if (exp_cmd.size() != 0 || exp_tgt.size() != 0) fail("commands missing");
    if (inq.size() != 0) fail("message words not read");
    if (nskipped != 1) fail($sformatf("skipped %0d", nskipped));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
