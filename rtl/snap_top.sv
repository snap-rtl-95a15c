// snap_top: SNAP, a 16-bit message-passing processor for sensor-network
// nodes and for a many-processor chip that simulates sensor networks.
//
// Instead of interrupts and a software event queue, SNAP keeps its pending
// events in a timer coprocessor and dispatches work through an executable
// queue: the timer inserts a token when an event's timestamp equals scaled
// real time, the incoming-message buffer inserts one when a message starts,
// and the DONE instruction makes the processor jump to the handler for the
// head token (waiting, with no activity, while the queue is empty).
// Messages are sent and received through register r15.
//
// Blocks and the channels between them:
//   fetch unit --I (words, or the pc for JAL)--> execution unit
//   execution unit --B (pc-update tokens), TGT (jump targets)--> fetch unit
//   fetch unit, execution unit --arbiter--> memory bank 0 (+ boot code overlay)
//   execution unit --> memory bank 1 (data only)
//   execution unit <--r15--> incoming / outgoing message buffers <--> network
//   execution unit --commands--> timer coprocessor --tokens--> executable queue
//   incoming buffer --message tokens--> executable queue --> fetch unit
//   execution unit --SETH--> handler table --> fetch unit
// I, B and TGT are FIFOs so that fetch and execution run concurrently.
//
// Interface: net_in_* is the channel from the interconnect (net_in_first
// marks the first word of each message), net_out_* the channel to it, both
// valid/ready. `tick` advances the timer's incrementer by one: it is the
// clocked time base. One clock domain, active-low asynchronous reset.
// After reset the boot code waits for a startup message (word 0: program
// length N, then N words), copies it to LOAD_ADDR and runs it.
//
// The block structure, the channel names, the seven timestamp registers, the
// eight-row handler table and the two memory banks follow the original
// description. That design is asynchronous (QDI). Here every block is clocked
// logic joined by valid/ready channels. The buffer and queue depths, the bank
// size, the message framing and the boot protocol are this design's own
// choices.
module snap_top
  import snap_pkg::*;
#(
  parameter int unsigned BANK_AW   = 12,   // words per bank = 2**BANK_AW
  parameter int unsigned IN_DEPTH  = 16,
  parameter int unsigned OUT_DEPTH = 16,
  parameter int unsigned EQ_DEPTH  = 8,
  parameter int unsigned CH_DEPTH  = 4,    // slack of the I and B channels
  parameter int unsigned BOOT_AW   = 5,
  parameter word_t       LOAD_ADDR = 16'd32
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  tick,
  input  logic  net_in_valid,
  output logic  net_in_ready,
  input  word_t net_in_data,
  input  logic  net_in_first,
  output logic  net_out_valid,
  input  logic  net_out_ready,
  output word_t net_out_data
);
  // I, B, TGT channels
  logic  i_wv, i_wr, i_rv, i_rr;  word_t i_wd, i_rd;
  logic  b_wv, b_wr, b_rv, b_rr;  btok_t b_wd, b_rd;
  logic  g_wv, g_wr, g_rv, g_rr;  word_t g_wd, g_rd;
  // memory
  logic f_req, f_gnt, f_rvalid, e_req, e_we, e_gnt, e_rvalid;
  logic [BANK_AW-1:0] f_addr, e_addr, m0_addr, m1_addr;
  word_t e_wdata, m0_wdata, m0_rdata, m1_wdata, m1_rdata, bank0_rdata, rom_word, rom_q;
  logic m0_en, m0_we, m1_en, m1_we, rom_hit_q;
  // queues, timer, table
  logic eq_v, eq_r, tmr_v, tmr_r, msg_v, msg_r;
  tok_t eq_tok, tmr_tok, ht_row_rd, ht_row_wr;
  word_t ht_addr_rd, ht_addr_wr;
  logic ht_we, t_valid;
  tcmd_t t_cmd;
  logic in_v, in_r, out_v, out_full;
  word_t in_d, out_d, out_status;
  logic retire, skipped;
  word_t pc;
  logic [39:0] tcount;
  logic [N_TS-1:0] ts_on;

  snap_fetch_unit #(.AW(BANK_AW)) u_fetch (
    .clk, .rst_n,
    .b_valid(b_rv), .b_ready(b_rr), .b_tok(b_rd),
    .tgt_valid(g_rv), .tgt_ready(g_rr), .tgt_data(g_rd),
    .i_valid(i_wv), .i_ready(i_wr), .i_data(i_wd),
    .eq_valid(eq_v), .eq_ready(eq_r), .eq_tok,
    .ht_row(ht_row_rd), .ht_addr(ht_addr_rd),
    .f_req, .f_addr, .f_gnt, .f_rvalid, .f_rdata(bank0_rdata),
    .pc
  );

  snap_fifo #(.W(W), .DEPTH(CH_DEPTH)) u_ich (
    .clk, .rst_n, .in_valid(i_wv), .in_ready(i_wr), .in_data(i_wd),
    .out_valid(i_rv), .out_ready(i_rr), .out_data(i_rd), .count());
  snap_fifo #(.W($bits(btok_t)), .DEPTH(CH_DEPTH)) u_bch (
    .clk, .rst_n, .in_valid(b_wv), .in_ready(b_wr), .in_data(b_wd),
    .out_valid(b_rv), .out_ready(b_rr), .out_data(b_rd), .count());
  snap_fifo #(.W(W), .DEPTH(2)) u_tgt (
    .clk, .rst_n, .in_valid(g_wv), .in_ready(g_wr), .in_data(g_wd),
    .out_valid(g_rv), .out_ready(g_rr), .out_data(g_rd), .count());

  snap_exec_unit #(.BANK_AW(BANK_AW)) u_exec (
    .clk, .rst_n,
    .i_valid(i_rv), .i_ready(i_rr), .i_data(i_rd),
    .b_valid(b_wv), .b_ready(b_wr), .b_tok(b_wd),
    .tgt_valid(g_wv), .tgt_ready(g_wr), .tgt_data(g_wd),
    .in_valid(in_v), .in_ready(in_r), .in_data(in_d),
    .out_valid(out_v), .out_full, .out_data(out_d), .out_status,
    .e_req, .e_we, .e_addr, .e_wdata, .e_gnt, .e_rvalid, .e_rdata(bank0_rdata),
    .m1_en, .m1_we, .m1_addr, .m1_wdata, .m1_rdata,
    .t_valid, .t_cmd,
    .ht_we, .ht_row(ht_row_wr), .ht_addr(ht_addr_wr),
    .retire, .skipped
  );

  snap_mem_arbiter #(.AW(BANK_AW)) u_arb (
    .clk, .rst_n,
    .f_req, .f_addr, .f_gnt, .f_rvalid,
    .e_req, .e_we, .e_addr, .e_wdata, .e_gnt, .e_rvalid,
    .m_en(m0_en), .m_we(m0_we), .m_addr(m0_addr), .m_wdata(m0_wdata)
  );

  snap_mem_bank #(.AW(BANK_AW)) u_bank0 (
    .clk, .en(m0_en), .we(m0_we), .addr(m0_addr), .wdata(m0_wdata), .rdata(m0_rdata));
  snap_mem_bank #(.AW(BANK_AW)) u_bank1 (
    .clk, .en(m1_en), .we(m1_we), .addr(m1_addr), .wdata(m1_wdata), .rdata(m1_rdata));

  // Boot code overlays the lowest 2**BOOT_AW words of bank 0 for reads.
  snap_boot_rom #(.AW(BOOT_AW), .LOAD_ADDR(LOAD_ADDR)) u_boot (
    .addr(m0_addr[BOOT_AW-1:0]), .word(rom_word));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rom_hit_q <= 1'b0;
      rom_q     <= '0;
    end else if (m0_en && !m0_we) begin
      rom_hit_q <= (m0_addr >> BOOT_AW) == '0;
      rom_q     <= rom_word;
    end
  end
  assign bank0_rdata = rom_hit_q ? rom_q : m0_rdata;

  snap_handler_table #(.ROWS(8), .BOOT_MSG(16'd2)) u_ht (
    .clk, .rst_n, .rd_row(ht_row_rd), .rd_addr(ht_addr_rd),
    .we(ht_we), .wr_row(ht_row_wr), .wr_addr(ht_addr_wr));

  snap_exec_queue #(.DEPTH(EQ_DEPTH)) u_eq (
    .clk, .rst_n,
    .tmr_valid(tmr_v), .tmr_ready(tmr_r), .tmr_tok,
    .msg_valid(msg_v), .msg_ready(msg_r),
    .out_valid(eq_v), .out_ready(eq_r), .out_tok(eq_tok));

  snap_timer #(.NTS(N_TS), .INC_W(40), .TS_W(32)) u_timer (
    .clk, .rst_n, .tick, .cmd_valid(t_valid), .cmd(t_cmd),
    .tok_valid(tmr_v), .tok_ready(tmr_r), .tok(tmr_tok),
    .count(tcount), .ts_on);

  snap_in_buffer #(.DEPTH(IN_DEPTH)) u_inb (
    .clk, .rst_n,
    .net_valid(net_in_valid), .net_ready(net_in_ready), .net_data(net_in_data), .net_first(net_in_first),
    .tok_valid(msg_v), .tok_ready(msg_r),
    .rd_valid(in_v), .rd_ready(in_r), .rd_data(in_d));

  snap_out_buffer #(.DEPTH(OUT_DEPTH)) u_outb (
    .clk, .rst_n,
    .wr_valid(out_v), .full(out_full), .wr_data(out_d), .status(out_status),
    .net_valid(net_out_valid), .net_ready(net_out_ready), .net_data(net_out_data));
endmodule
