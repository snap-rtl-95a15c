// snap_pkg: types and constants shared by the SNAP processor blocks.
//
// SNAP is a 16-bit message-passing processor whose event queue lives in a
// timer coprocessor. This package holds the data-path width, the register
// numbers with special meaning (r0 reads zero, r15 is the message port), the
// opcode map of the instruction set, and the token format of the B channel
// that the execution unit uses to tell the fetch unit how to update its
// program counter. The opcode numbers and field layout are this design's
// own choice; the instruction semantics follow the SNAP description.
//
// Instruction word 0: op[15:12] d[11:8] a[7:4] b[3:0]. Two-word
// instructions carry a 16-bit immediate in word 1.
package snap_pkg;

  localparam int unsigned W      = 16;  // data-path and instruction word width
  localparam int unsigned NREG   = 16;  // general-purpose registers
  localparam logic [3:0]  RMSG   = 4'd15;  // r15 maps to the message queues
  localparam int unsigned N_TS   = 7;   // timestamp registers
  localparam int unsigned TOK_W  = 3;   // executable-queue token width
  localparam logic [2:0]  TOK_MSG = 3'd7; // token for an incoming message

  typedef logic [W-1:0] word_t;
  typedef logic [TOK_W-1:0] tok_t;

  typedef enum logic [3:0] {
    OP_ADD   = 4'd0,   // d := a + b
    OP_SUB   = 4'd1,   // d := a - b
    OP_AND   = 4'd2,
    OP_OR    = 4'd3,
    OP_XOR   = 4'd4,
    OP_SLL   = 4'd5,   // d := a << b[3:0]
    OP_SRL   = 4'd6,   // d := a >> b[3:0]
    OP_ADDI  = 4'd7,   // d := a + imm                  (2 words)
    OP_LD    = 4'd8,   // d := mem[a + imm]             (2 words)
    OP_ST    = 4'd9,   // mem[a + imm] := d             (2 words)
    OP_BFS   = 4'd10,  // d[hi:lo] := a                 (2 words)
    OP_BFR   = 4'd11,  // a := d[hi:lo]                 (2 words)
    OP_BR    = 4'd12,  // if cond(a, d) pc := addr(imm word) + imm (2 words)
    OP_JMP   = 4'd13,  // b=0: JUMP imm (2 words); b=1: JR d (1 word); b=2: JAL d, imm (2 words)
    OP_EVT   = 4'd14,  // event group, selected by b
    OP_SCHED = 4'd15   // timestamp_register[d] := {a, b}
  } opcode_e;

  // Functions of the OP_EVT group (field b).
  typedef enum logic [3:0] {
    EV_DONE   = 4'd0,  // wait for the next executable token
    EV_CANCEL = 4'd1,  // timestamp_register[reg[d]] off
    EV_TSCALE = 4'd2,  // lowest sample bit := reg[d]
    EV_SETH   = 4'd3,  // handler_table[reg[d]] := reg[a]
    EV_STATUS = 4'd4   // reg[d] := free spaces in the outgoing buffer
  } evfn_e;

  // Branch conditions (field a of OP_BR).
  typedef enum logic [3:0] {
    BC_EQZ = 4'd0, BC_NEZ = 4'd1, BC_LTZ = 4'd2, BC_GEZ = 4'd3, BC_ALW = 4'd4
  } bcond_e;

  // How the fetch unit updates pc after fetching the next word.
  typedef enum logic [2:0] {
    PC_INC  = 3'd0,  // pc := pc + 1
    PC_REL  = 3'd1,  // pc := pc + fetched word (relative branch)
    PC_ABS  = 3'd2,  // pc := fetched word (absolute jump)
    PC_TGT  = 3'd3,  // pc := value from the TGT channel (jump register)
    PC_DONE = 3'd4   // pc := handler_table[executable-queue token]
  } pcsel_e;

  // One B-channel token: the pc update, whether the fetched word is
  // forwarded to the execution unit on the I channel, and whether the I
  // channel carries the pc of that word instead of the word itself.
  typedef struct packed {
    pcsel_e sel;
    logic   send;
    logic   pcout;
  } btok_t;

  // Command from the execution unit to the timer coprocessor.
  typedef enum logic [1:0] {
    TC_SCHED = 2'd0, TC_CANCEL = 2'd1, TC_SCALE = 2'd2
  } tcmd_e;

  typedef struct packed {
    tcmd_e       cmd;
    logic [2:0]  id;     // timestamp register (SCHEDULE, CANCEL)
    logic [31:0] ts;     // timestamp (SCHEDULE) or lowest sample bit (TIMESCALE)
  } tcmd_t;

endpackage
