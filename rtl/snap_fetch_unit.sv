// snap_fetch_unit: SNAP's instruction-fetch unit.
//
// Keeps the program counter and fetches one 16-bit word at a time from
// memory bank 0 (FetchAddr out, FetchLine in). SNAP has one- and two-word
// instructions; to keep the fetch loop simple, every word tells the fetch
// unit, through a token on the pipelined B channel, how to update pc after
// the *next* word has been fetched, much like a branch-delay slot. The
// execution unit decodes and sends these tokens, so the fetch unit can fetch
// one word while the execution unit works on the previous one.
//
// Each B token (snap_pkg::btok_t) gives the pc source and whether the word
// just fetched is forwarded on the I channel to the execution unit:
//   PC_INC   pc := pc + 1                    (incrementer)
//   PC_REL   pc := pc + fetched word         (adder, relative branch)
//   PC_ABS   pc := fetched word              (FetchLine, absolute jump)
//   PC_TGT   pc := TGT channel value         (jump register)
//   PC_DONE  pc := handler_table[head of the executable queue]   (DONE)
// A jump's target word is not forwarded: the fetch unit consumes it. A
// token with `pcout` set makes the I-channel multiplexer send the pc of the
// fetched word (its address) instead of the word: this is how a
// jump-and-link learns its return address.
//
// Loop per word: request bank 0 at pc until granted; take the word the next
// cycle; then wait for a token (and, as the token needs, I-channel space, a
// TGT value or an executable-queue token) and apply it. That is three cycles
// per word without contention. After reset pc = 0 and the first word is
// forwarded and followed by pc + 1 without a token, since no word before it
// could have sent one. Tokens PC_DONE wait while the executable queue is
// empty: that is where the processor idles.
//
// The word-by-word token scheme and the five pc sources follow the original
// fetch unit, as do the I-channel multiplexer of word or pc. The token
// encoding, the clocked three-step loop, the reset behaviour and the `pcout`
// bit are this design's own.
module snap_fetch_unit
  import snap_pkg::*;
#(
  parameter int unsigned AW = 12      // bank-0 word address bits
) (
  input  logic          clk,
  input  logic          rst_n,
  // B channel
  input  logic          b_valid,
  output logic          b_ready,
  input  btok_t         b_tok,
  // TGT channel
  input  logic          tgt_valid,
  output logic          tgt_ready,
  input  word_t         tgt_data,
  // I channel
  output logic          i_valid,
  input  logic          i_ready,
  output word_t         i_data,
  // executable queue and handler table
  input  logic          eq_valid,
  output logic          eq_ready,
  input  tok_t          eq_tok,
  output tok_t          ht_row,
  input  word_t         ht_addr,
  // bank-0 port of the memory arbiter
  output logic          f_req,
  output logic [AW-1:0] f_addr,
  input  logic          f_gnt,
  input  logic          f_rvalid,
  input  word_t         f_rdata,
  // program counter (observation)
  output word_t         pc
);
  typedef enum logic [1:0] {S_REQ, S_WAIT, S_UPD} state_e;
  state_e state;
  word_t  line;      // last fetched word
  logic   credit;    // first word after reset needs no token
  btok_t  t;
  logic   have_tok, srcs_ok, go;
  word_t  pc_next;

  assign t        = credit ? btok_t'{sel: PC_INC, send: 1'b1, pcout: 1'b0} : b_tok;
  assign have_tok = credit || b_valid;
  assign srcs_ok  = (t.sel != PC_TGT || tgt_valid) && (t.sel != PC_DONE || eq_valid);
  assign go       = (state == S_UPD) && have_tok && srcs_ok && (!t.send || i_ready);

  assign i_valid   = (state == S_UPD) && have_tok && srcs_ok && t.send;
  assign i_data    = t.pcout ? pc : line;
  assign b_ready   = go && !credit;
  assign tgt_ready = go && t.sel == PC_TGT;
  assign eq_ready  = go && t.sel == PC_DONE;
  assign ht_row    = eq_tok;
  assign f_req     = (state == S_REQ);
  assign f_addr    = pc[AW-1:0];

  always_comb begin
    unique case (t.sel)
      PC_REL:  pc_next = pc + line;
      PC_ABS:  pc_next = line;
      PC_TGT:  pc_next = tgt_data;
      PC_DONE: pc_next = ht_addr;
      default: pc_next = pc + 16'd1;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_REQ;
      pc     <= '0;
      line   <= '0;
      credit <= 1'b1;
    end else begin
      unique case (state)
        S_REQ:  if (f_gnt) state <= S_WAIT;
        S_WAIT: if (f_rvalid) begin
                  line  <= f_rdata;
                  state <= S_UPD;
                end
        S_UPD:  if (go) begin
                  pc     <= pc_next;
                  credit <= 1'b0;
                  state  <= S_REQ;
                end
        default: state <= S_REQ;
      endcase
    end
  end

  // A held I-channel offer stays until taken.
  assert property (@(posedge clk) disable iff (!rst_n) i_valid && !i_ready |=> i_valid);
endmodule
