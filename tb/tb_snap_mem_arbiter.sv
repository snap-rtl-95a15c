// tb_snap_mem_arbiter: self-checking test of the bank-0 arbiter with a real
// bank behind it. Fetch and execution requesters issue random reads and
// writes, holding each request until granted; checks: never two grants,
// read data one cycle after the grant equals a reference memory, and under
// constant contention the grants alternate (no requester waits more than one
// cycle past the other's grant).
module tb_snap_mem_arbiter;
  logic clk = 0, rst_n = 0;
  logic f_req, f_gnt, f_rvalid, e_req, e_we, e_gnt, e_rvalid, m_en, m_we;
  logic [7:0] f_addr, e_addr, m_addr;
  logic [15:0] e_wdata, m_wdata, rdata;
  logic [15:0] model [256];
  int checks = 0, failures = 0, contended = 0, f_wait = 0, e_wait = 0;
  logic [7:0] f_last, e_last;
  logic f_pend, e_pend;

  always #5 clk = ~clk;

  snap_mem_arbiter #(.AW(8)) dut (.*);
  snap_mem_bank #(.AW(8)) bank (.clk, .en(m_en), .we(m_we), .addr(m_addr), .wdata(m_wdata), .rdata);

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
    checks++;
    if (f_gnt && e_gnt) fail("two grants");
    if (f_req && e_req) contended++;
    f_wait = (f_req && !f_gnt) ? f_wait + 1 : 0;
    e_wait = (e_req && !e_gnt) ? e_wait + 1 : 0;
    if (f_wait > 1 || e_wait > 1) fail("requester starved");
    if (f_rvalid) begin
      checks++;
      if (rdata !== model[f_last]) fail($sformatf("fetch read %h got %h exp %h", f_last, rdata, model[f_last]));
    end
    if (e_rvalid) begin
      checks++;
      if (rdata !== model[e_last]) fail($sformatf("exec read %h got %h", e_last, rdata));
    end
    f_pend = f_gnt; e_pend = e_gnt;
    if (f_gnt) f_last = f_addr;
    if (e_gnt) begin
      e_last = e_addr;
      if (e_we) model[e_addr] = e_wdata;
    end
  end

  initial begin
    f_req = 0; e_req = 0; e_we = 0; f_addr = 0; e_addr = 0; e_wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // initialise memory through the execution port
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      e_req = 1; e_we = 1; e_addr = 8'(i); e_wdata = 16'($urandom);
    end
    @(negedge clk);
    e_req = 0;
    f_pend = 0; e_pend = 0;
    for (int n = 0; n < 3000; n++) begin
      // a requester keeps its request until granted (f_pend / e_pend: granted
      // at the last edge), then picks a new one
      if (!f_req || f_pend) begin f_req = 1'($urandom_range(0, 3) != 0); f_addr = 8'($urandom); end
      if (!e_req || e_pend) begin
        e_req = 1'($urandom_range(0, 3) != 0); e_we = 1'($urandom); e_addr = 8'($urandom); e_wdata = 16'($urandom);
      end
      @(negedge clk);
    end
    checks++;
    if (contended < 100) fail("too little contention");
    $display("contended cycles=%0d", contended);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
