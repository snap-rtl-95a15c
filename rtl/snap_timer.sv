// snap_timer: SNAP's timer coprocessor, a hardware event queue.
//
// Holds NTS (7) timestamp registers of TS_W (32) bits, each with an on/off
// bit; a register that is on stands for one scheduled event. A self-
// incrementing INC_W (40) bit counter holds scaled real time: it advances by
// one on every `tick` from the clocked time base. A contiguous TS_W-bit
// sample of it, starting at bit `lsb` (0..INC_W-TS_W), is the current
// simulated time; lowering lsb by one doubles the time scale. Whenever the
// counter changes, every register that is on is compared with the new
// sample; on equality the register turns off and its number is inserted as
// a token into the executable queue.
//
// Structure, as in the original coprocessor: the incrementer feeds shift
// units that pick the sample bits by time scale and forward them only to
// registers that are on; each timestamp register is split into 2-bit digits
// whose equality results are ANDed in a chain from the lowest-order digit
// to the highest, whose output is the match. The comparison is pipelined:
// tick at edge k -> sample registered (shift-unit stage) -> compare result
// registered at edge k+2 (register turns off, token pending) -> token offered
// from the next cycle, so one full set of comparisons completes per cycle.
// Several registers may match at once; their tokens are offered one per
// cycle, lowest register first.
//
// Commands (one per cycle, cmd_valid, always accepted):
//   SCHEDULE id, ts : register id := ts, turned on (ids above NTS-1 ignored)
//   CANCEL id       : register id turned off, a token not yet queued dropped
//   TIMESCALE n     : lsb := min(n, INC_W-TS_W)
// A command on a register wins over a match in the same cycle. Matching is
// on equality, as described: an event scheduled for a time the sample has
// already passed fires only when the sample wraps round. Reset: counter,
// lsb and all registers cleared, all off; these are this design's choices.
module snap_timer
  import snap_pkg::*;
#(
  parameter int unsigned NTS   = 7,
  parameter int unsigned INC_W = 40,
  parameter int unsigned TS_W  = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tick,        // advance the incrementer
  input  logic              cmd_valid,
  input  tcmd_t             cmd,
  output logic              tok_valid,   // to the executable queue
  input  logic              tok_ready,
  output tok_t              tok,
  output logic [INC_W-1:0]  count,       // incrementer value
  output logic [NTS-1:0]    ts_on        // on/off bits
);
  localparam int unsigned MAXLSB = INC_W - TS_W;
  localparam int unsigned ND     = TS_W / 2;     // 2-bit digits per register
  localparam int unsigned LW     = $clog2(MAXLSB + 1);

  logic [LW-1:0]   lsb;
  logic [TS_W-1:0] ts   [NTS];
  logic [NTS-1:0]  pend;
  logic [TS_W-1:0] samp;
  logic            samp_v;
  logic [NTS-1:0]  match;
  logic [INC_W-1:0] count_next;

  assign count_next = count + INC_W'(tick);

  // Incrementer and shift-unit stage.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count  <= '0;
      samp   <= '0;
      samp_v <= 1'b0;
    end else begin
      count  <= count_next;
      samp   <= TS_W'(count_next >> lsb);
      samp_v <= tick;
    end
  end

  // Digit comparators with the ripple AND from low to high order.
  for (genvar r = 0; r < NTS; r++) begin : g_reg
    logic [ND:0] chain;
    assign chain[0] = samp_v && ts_on[r];
    for (genvar d = 0; d < ND; d++) begin : g_dig
      assign chain[d+1] = chain[d] && (ts[r][2*d +: 2] == samp[2*d +: 2]);
    end
    assign match[r] = chain[ND];
  end

  // Token output: lowest pending register first.
  always_comb begin
    tok_valid = |pend;
    tok       = '0;
    for (int i = NTS-1; i >= 0; i--) if (pend[i]) tok = TOK_W'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lsb   <= '0;
      ts_on <= '0;
      pend  <= '0;
      for (int i = 0; i < NTS; i++) ts[i] <= '0;
    end else begin
      for (int i = 0; i < NTS; i++) begin
        if (match[i]) begin
          ts_on[i] <= 1'b0;
          pend[i]  <= 1'b1;
        end
      end
      if (tok_valid && tok_ready) pend[tok] <= 1'b0;
      if (cmd_valid) begin
        unique case (cmd.cmd)
          TC_SCHED:
            if (32'(cmd.id) < NTS) begin
              ts[cmd.id]    <= cmd.ts;
              ts_on[cmd.id] <= 1'b1;
              pend[cmd.id]  <= 1'b0;
            end
          TC_CANCEL:
            if (32'(cmd.id) < NTS) begin
              ts_on[cmd.id] <= 1'b0;
              pend[cmd.id]  <= 1'b0;
            end
          TC_SCALE:
            lsb <= (cmd.ts > 32'(MAXLSB)) ? LW'(MAXLSB) : LW'(cmd.ts);
          default: ;
        endcase
      end
    end
  end
endmodule
