// snap_exec_unit: SNAP's execution unit.
//
// Receives instruction words from the fetch unit on the I channel, decodes
// them, reads operands, tells the fetch unit through B-channel tokens how to
// update its pc, and executes the instruction on one of its function blocks:
// adder, shifter, logic, bit-field, memory interface, timer commands and
// conditional branch, with the register file.
//
// Register r0 reads zero. Register r15 is the message port: each operand
// field naming r15 removes the head word of the incoming-message buffer
// (waiting while it is empty; fields are read in the order d, a, b), and a
// result written to r15 goes into the outgoing-message buffer. If that buffer
// is full when the instruction is decoded, the instruction is skipped: no
// operand is read and nothing is written, but its words are still consumed
// so the program continues with the next instruction.
//
// Tokens sent per instruction (one per word the fetch unit will fetch; the
// last one always forwards the first word of the next instruction):
//   one-word ALU/event ops ........ INC+send
//   ADDI LD ST BFS BFR ............ INC+send (immediate), INC+send
//   JUMP .......................... ABS (target word consumed), INC+send
//   JAL ........................... ABS with the target word's pc sent on I,
//                                   INC+send; d := that pc + 1
//   BR taken / not taken .......... REL / INC (offset consumed), INC+send
//   JR ............................ TGT (next word dropped), INC+send; the
//                                   register value goes on the TGT channel
//   DONE .......................... DONE (next word dropped), INC+send
//
// This is a multi-cycle, one-instruction-at-a-time controller clocked by
// clk: W0 -> DEC -> OPD -> OPA -> OPB -> TOK0 [-> TOK1] [-> TGT] [-> IMM] ->
// EXE [-> MEMW]. Loads from bank 0 go through the memory arbiter; bank 1 is
// private to this unit (one-cycle read latency both ways). The instruction
// encoding, operand order and the multi-cycle schedule are this design's
// own; the original unit overlaps function blocks with pipelined mutual
// exclusion, which this controller does not attempt.
module snap_exec_unit
  import snap_pkg::*;
#(
  parameter int unsigned BANK_AW = 12
) (
  input  logic               clk,
  input  logic               rst_n,
  // I channel
  input  logic               i_valid,
  output logic               i_ready,
  input  word_t              i_data,
  // B channel
  output logic               b_valid,
  input  logic               b_ready,
  output btok_t              b_tok,
  // TGT channel
  output logic               tgt_valid,
  input  logic               tgt_ready,
  output word_t              tgt_data,
  // incoming-message buffer (reads of r15)
  input  logic               in_valid,
  output logic               in_ready,
  input  word_t              in_data,
  // outgoing-message buffer (writes of r15)
  output logic               out_valid,
  input  logic               out_full,
  output word_t              out_data,
  input  word_t              out_status,
  // bank 0 through the arbiter
  output logic               e_req,
  output logic               e_we,
  output logic [BANK_AW-1:0] e_addr,
  output word_t              e_wdata,
  input  logic               e_gnt,
  input  logic               e_rvalid,
  input  word_t              e_rdata,
  // bank 1, private
  output logic               m1_en,
  output logic               m1_we,
  output logic [BANK_AW-1:0] m1_addr,
  output word_t              m1_wdata,
  input  word_t              m1_rdata,
  // timer coprocessor
  output logic               t_valid,
  output tcmd_t              t_cmd,
  // handler table
  output logic               ht_we,
  output tok_t               ht_row,
  output word_t              ht_addr,
  // events (observation): instruction retired, r15 write skipped
  output logic               retire,
  output logic               skipped
);
  typedef enum logic [3:0] {
    S_W0, S_DEC, S_OPD, S_OPA, S_OPB, S_TOK0, S_TOK1, S_TGT, S_IMM, S_EXE, S_MEMW
  } state_e;

  state_e     state;
  word_t      ir, imm, opd, opa, opb;
  opcode_e    op;
  logic [3:0] fd, fa, fb;
  logic       skip;

  assign op = opcode_e'(ir[15:12]);
  assign fd = ir[11:8];
  assign fa = ir[7:4];
  assign fb = ir[3:0];

  // ---------------- decode ----------------
  logic use_d, use_a, use_b, wr_en, imm_exec, is_jr, is_jal, two_tok;
  logic [3:0] wr_reg;
  evfn_e ev;
  assign ev = evfn_e'(fb);

  always_comb begin
    use_d = 1'b0; use_a = 1'b0; use_b = 1'b0;
    wr_en = 1'b0; wr_reg = fd; imm_exec = 1'b0; is_jr = 1'b0; is_jal = 1'b0;
    unique case (op)
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLL, OP_SRL: begin
        use_a = 1'b1; use_b = 1'b1; wr_en = 1'b1;
      end
      OP_ADDI, OP_LD: begin use_a = 1'b1; wr_en = 1'b1; imm_exec = 1'b1; end
      OP_ST:          begin use_a = 1'b1; use_d = 1'b1; imm_exec = 1'b1; end
      OP_BFS:         begin use_a = 1'b1; use_d = 1'b1; wr_en = 1'b1; imm_exec = 1'b1; end
      OP_BFR:         begin use_d = 1'b1; wr_en = 1'b1; wr_reg = fa; imm_exec = 1'b1; end
      OP_BR:          use_d = 1'b1;
      OP_JMP:         if (fb == 4'd1) begin use_d = 1'b1; is_jr = 1'b1; end
                      else if (fb == 4'd2) begin wr_en = 1'b1; imm_exec = 1'b1; is_jal = 1'b1; end
      OP_EVT: unique case (ev)
        EV_CANCEL, EV_TSCALE: use_d = 1'b1;
        EV_SETH:              begin use_d = 1'b1; use_a = 1'b1; end
        EV_STATUS:            wr_en = 1'b1;
        default: ;
      endcase
      OP_SCHED: begin use_d = 1'b1; use_a = 1'b1; use_b = 1'b1; end
      default: ;
    endcase
  end

  // ---------------- function blocks ----------------
  word_t rf_d, rf_a, rf_b, add_y, sh_y, lg_y, bfs_y, bfr_y;
  logic  taken, mbank;
  logic [BANK_AW-1:0] mword;
  logic  rf_we;
  word_t rf_wd;

  snap_regfile u_rf (
    .clk, .rst_n, .ra_d(fd), .ra_a(fa), .ra_b(fb), .rd_d(rf_d), .rd_a(rf_a), .rd_b(rf_b),
    .we(rf_we), .wa(wr_reg), .wd(rf_wd)
  );
  snap_adder #(.W(W)) u_add (.a(opa), .b(op == OP_ADDI ? imm : opb), .sub(op == OP_SUB), .y(add_y));
  snap_shifter #(.W(W)) u_sh (.a(opa), .amt(opb[3:0]), .right(op == OP_SRL), .y(sh_y));
  snap_logic #(.W(W)) u_lg (.a(opa), .b(opb), .op(2'(ir[13:12] - 2'd2)), .y(lg_y));
  snap_bitfield #(.W(W)) u_bf (.dst_old(opd), .src(opa), .hi(imm[11:8]), .lo(imm[3:0]),
                               .set_y(bfs_y), .read_y(bfr_y));
  snap_branch u_br (.v(opd), .cond(fa), .taken);
  snap_memif #(.BANK_AW(BANK_AW)) u_mi (.base(opa), .offset(imm), .addr(), .bank(mbank), .word(mword));

  // ---------------- tokens ----------------
  btok_t tok0;
  always_comb begin
    two_tok = 1'b1;
    tok0    = btok_t'{sel: PC_INC, send: 1'b1, pcout: 1'b0};
    unique case (op)
      OP_ADDI, OP_LD, OP_ST, OP_BFS, OP_BFR: ;
      OP_BR:  tok0 = btok_t'{sel: taken ? PC_REL : PC_INC, send: 1'b0, pcout: 1'b0};
      OP_JMP: tok0 = btok_t'{sel: is_jr ? PC_TGT : PC_ABS, send: is_jal, pcout: is_jal};
      OP_EVT: if (ev == EV_DONE) tok0 = btok_t'{sel: PC_DONE, send: 1'b0, pcout: 1'b0};
              else two_tok = 1'b0;
      default: two_tok = 1'b0;
    endcase
  end

  // ---------------- result ----------------
  word_t result;
  always_comb begin
    unique case (op)
      OP_ADD, OP_SUB, OP_ADDI: result = add_y;
      OP_AND, OP_OR, OP_XOR:   result = lg_y;
      OP_SLL, OP_SRL:          result = sh_y;
      OP_BFS:                  result = bfs_y;
      OP_BFR:                  result = bfr_y;
      OP_LD:                   result = mbank ? m1_rdata : e_rdata;
      OP_JMP:                  result = imm + 16'd1;   // JAL: word after the target word
      default:                 result = out_status;
    endcase
  end

  logic writeback;   // in the cycle the result is final
  assign writeback = wr_en && !skip &&
                     ((state == S_EXE && op != OP_LD) || (state == S_MEMW && (mbank || e_rvalid)));
  assign rf_we     = writeback && wr_reg != RMSG;
  assign rf_wd     = result;
  assign out_valid = writeback && wr_reg == RMSG;
  assign out_data  = result;

  // ---------------- handshakes ----------------
  logic [3:0] cur_field;
  logic       cur_use, need_pop;
  always_comb begin
    unique case (state)
      S_OPD:   begin cur_field = fd; cur_use = use_d; end
      S_OPA:   begin cur_field = fa; cur_use = use_a; end
      default: begin cur_field = fb; cur_use = use_b; end
    endcase
    need_pop = cur_use && !skip && cur_field == RMSG &&
               (state == S_OPD || state == S_OPA || state == S_OPB);
  end

  assign i_ready   = (state == S_W0) || (state == S_IMM);
  assign in_ready  = need_pop;
  assign b_valid   = (state == S_TOK0) || (state == S_TOK1);
  assign b_tok     = (state == S_TOK0) ? tok0 : btok_t'{sel: PC_INC, send: 1'b1, pcout: 1'b0};
  assign tgt_valid = (state == S_TGT);
  assign tgt_data  = opd;

  logic is_mem;
  assign is_mem  = (op == OP_LD || op == OP_ST) && !skip;
  assign e_req   = state == S_EXE && is_mem && !mbank;
  assign e_we    = op == OP_ST;
  assign e_addr  = mword;
  assign e_wdata = opd;
  assign m1_en   = state == S_EXE && is_mem && mbank;
  assign m1_we   = op == OP_ST;
  assign m1_addr = mword;
  assign m1_wdata = opd;

  assign t_valid = state == S_EXE && !skip &&
                   (op == OP_SCHED || (op == OP_EVT && (ev == EV_CANCEL || ev == EV_TSCALE)));
  always_comb begin
    t_cmd.id = (op == OP_EVT && ev == EV_TSCALE) ? 3'd0 : opd[2:0];
    t_cmd.ts = (op == OP_SCHED) ? {opa, opb} : {16'd0, opd};
    t_cmd.cmd = (op == OP_SCHED) ? TC_SCHED : (ev == EV_CANCEL ? TC_CANCEL : TC_SCALE);
  end
  assign ht_we   = state == S_EXE && !skip && op == OP_EVT && ev == EV_SETH;
  assign ht_row  = opd[2:0];
  assign ht_addr = opa;

  // ---------------- sequencing ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_W0;
      ir <= '0; imm <= '0; opd <= '0; opa <= '0; opb <= '0; skip <= 1'b0;
      retire <= 1'b0; skipped <= 1'b0;
    end else begin
      retire  <= 1'b0;
      skipped <= 1'b0;
      unique case (state)
        S_W0: if (i_valid) begin ir <= i_data; state <= S_DEC; end
        S_DEC: begin
          skip  <= wr_en && wr_reg == RMSG && out_full;
          state <= S_OPD;
        end
        S_OPD, S_OPA, S_OPB: begin
          if (!need_pop || in_valid) begin
            logic [3:0] f; word_t v;
            f = cur_field;
            v = (f == RMSG) ? in_data : (state == S_OPD ? rf_d : state == S_OPA ? rf_a : rf_b);
            if (state == S_OPD) opd <= v;
            else if (state == S_OPA) opa <= v;
            else opb <= v;
            state <= (state == S_OPD) ? S_OPA : (state == S_OPA) ? S_OPB : S_TOK0;
          end
        end
        S_TOK0: if (b_ready) state <= two_tok ? S_TOK1 : S_EXE;
        S_TOK1: if (b_ready) state <= is_jr ? S_TGT : (imm_exec ? S_IMM : S_EXE);
        S_TGT:  if (tgt_ready) state <= S_EXE;
        S_IMM:  if (i_valid) begin imm <= i_data; state <= S_EXE; end
        S_EXE: begin
          if (op == OP_LD && !skip) begin
            if (mbank || e_gnt) state <= S_MEMW;
          end else if (op == OP_ST && !skip) begin
            if (mbank || e_gnt) begin state <= S_W0; retire <= 1'b1; end
          end else begin
            state   <= S_W0;
            retire  <= 1'b1;
            skipped <= skip;
          end
        end
        S_MEMW: if (mbank || e_rvalid) begin state <= S_W0; retire <= 1'b1; end
        default: state <= S_W0;
      endcase
    end
  end

  // A result for r15 is only produced when the outgoing buffer has room.
  assert property (@(posedge clk) disable iff (!rst_n) out_valid |-> !out_full);
endmodule
