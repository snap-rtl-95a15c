// tb_snap_fetch_unit: self-checking test of the instruction-fetch unit.
// The testbench plays the execution unit (B tokens, TGT values), the
// executable queue with the handler table, and a 256-word bank 0 whose word
// at address i is a fixed function of i. A reference model applies the same
// random token stream (INC, REL, ABS, TGT, DONE, each with or without
// forwarding, and forwarding either the word or its pc) to its own pc and predicts every word on the I channel and
// the final pc. Phase 1 runs with every channel ready and checks the rate:
// three cycles per word. Phase 2 adds random stalls on all channels and
// random memory grants.
module tb_snap_fetch_unit;
  import snap_pkg::*;
  logic clk = 0, rst_n = 0;
  logic b_valid, b_ready, tgt_valid, tgt_ready, i_valid, i_ready, eq_valid, eq_ready;
  logic f_req, f_gnt, f_rvalid;
  btok_t b_tok;
  word_t tgt_data, i_data, ht_addr, f_rdata, pc;
  tok_t eq_tok, ht_row;
  logic [7:0] f_addr;
  int checks = 0, failures = 0;
  int ntok;
  btok_t toks [$];
  word_t tgts [$];
  tok_t eqs [$];
  word_t exp_i [$];
  word_t mpc;
  longint cyc = 0, t_start, t_end;
  logic stall;
  int seen [5];

  always #5 clk = ~clk;

  snap_fetch_unit #(.AW(8)) dut (.*);

  function automatic word_t memw(input logic [7:0] a);
    return {a ^ 8'h5A, 8'(a * 3)} & 16'h00FF | (16'(a[1:0]) << 14);
  endfunction
  function automatic word_t hta(input tok_t r);
    return 16'(r) * 16'd21 + 16'd3;
  endfunction

  // memory with random grant
  logic [7:0] raddr;
  logic gnt_ok;
  assign f_gnt = f_req && gnt_ok;
  always @(posedge clk) begin
    cyc++;
    f_rvalid <= rst_n && f_gnt;
    if (f_gnt) raddr <= f_addr;
  end
  assign f_rdata = memw(raddr);
  assign ht_addr = hta(ht_row);

  task automatic fail(input string s);
    failures++;
    $display("FAIL %s", s);
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sources and sink
  always @(posedge clk) if (rst_n) begin
    if (b_valid && b_ready) begin void'(toks.pop_front()); seen[b_tok.sel]++; end
    if (tgt_valid && tgt_ready) void'(tgts.pop_front());
    if (eq_valid && eq_ready) void'(eqs.pop_front());
    if (i_valid && i_ready) begin
      checks++;
      if (exp_i.size() == 0 || i_data !== exp_i[0]) fail($sformatf("I word %h", i_data));
      else void'(exp_i.pop_front());
    end
  end
  // channel offers change at the falling edge, away from the sampling edge
  always @(negedge clk) begin
    gnt_ok    = !stall || 1'($urandom_range(0, 1));
    // an offer, once made, stays until taken (valid is never withdrawn)
    b_valid   = toks.size() != 0 && (b_valid || !(stall && cyc % 3 == 0));
    b_tok     = toks.size() != 0 ? toks[0] : '0;
    tgt_valid = tgts.size() != 0 && (tgt_valid || !(stall && cyc % 5 == 1));
    tgt_data  = tgts.size() != 0 ? tgts[0] : '0;
    eq_valid  = eqs.size() != 0 && (eq_valid || !(stall && cyc % 4 == 2));
    eq_tok    = eqs.size() != 0 ? eqs[0] : '0;
    i_ready   = !(stall && cyc % 7 == 3);
  end

  // Build a token stream and its expected I words.
  task automatic make(input int n, input logic first);
    word_t w;
    if (first) begin
      mpc = 0;
      exp_i.push_back(memw(8'(mpc)));
      mpc = 1;
    end
    for (int k = 0; k < n; k++) begin
      btok_t t;
      int r = $urandom_range(0, 9);
      t.sel = (r < 5) ? PC_INC : pcsel_e'(r - 4 > 4 ? 4 : r - 4);
      t.send = 1'($urandom_range(0, 3) != 0);
      t.pcout = t.send && $urandom_range(0, 4) == 0;
      toks.push_back(t);
      w = memw(8'(mpc));
      if (t.send) exp_i.push_back(t.pcout ? mpc : w);
      unique case (t.sel)
        PC_INC: mpc = mpc + 1;
        PC_REL: mpc = mpc + w;
        PC_ABS: mpc = w;
        PC_TGT: begin word_t g = 16'($urandom); tgts.push_back(g); mpc = g; end
        default: begin tok_t e = 3'($urandom); eqs.push_back(e); mpc = hta(e); end
      endcase
    end
  endtask

  initial begin
    stall = 0; b_valid = 0; tgt_valid = 0; eq_valid = 0;
    for (int i = 0; i < 5; i++) seen[i] = 0;
    repeat (2) @(posedge clk);
    // phase 1: rate with no stalls
    make(200, 1);
    t_start = cyc;
    rst_n = 1;
    wait (toks.size() == 0 && exp_i.size() == 0);
    @(posedge clk);
    t_end = cyc;
    repeat (4) @(posedge clk);
    checks++;
    if (pc !== mpc) fail($sformatf("pc %h expected %h", pc, mpc));
    checks++;
    if (t_end - t_start > 3 * 201 + 3 || t_end - t_start < 3 * 201 - 3)
      fail($sformatf("201 words took %0d cycles, expected about %0d", t_end - t_start, 3 * 201));
    $display("201 words in %0d cycles", t_end - t_start);
    // phase 2: random stalls
    stall = 1;
    make(1500, 0);
    wait (toks.size() == 0 && exp_i.size() == 0);
    repeat (4) @(posedge clk);
    checks++;
    if (pc !== mpc) fail($sformatf("pc %h expected %h", pc, mpc));
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (seen[i] == 0) fail($sformatf("token kind %0d never used", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
