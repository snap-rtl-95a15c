// snap_mem_arbiter: access arbiter for bank 0 of SNAP's memory.
//
// Bank 0 holds instructions and data. The fetch unit reads words from it
// (FetchAddr in, FetchLine out) and the execution unit loads and stores
// (ExecOp, ExecAddr, ExecStore in, ExecLoad out); this arbiter lets one
// of them use the single bank port per cycle. Bank 1 is private to the
// execution unit, so loads and stores there run in parallel with fetches.
//
// Protocol: a requester holds req (and its address/data) until it sees gnt
// in the same cycle. Granted reads return data on the shared rdata bus in
// the next cycle, flagged by that requester's rvalid. When both request, the
// one not granted last time wins (round robin), so neither starves; the
// grant policy is this design's choice.
module snap_mem_arbiter
  import snap_pkg::*;
#(
  parameter int unsigned AW = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  // fetch unit (read only)
  input  logic          f_req,
  input  logic [AW-1:0] f_addr,
  output logic          f_gnt,
  output logic          f_rvalid,
  // execution unit
  input  logic          e_req,
  input  logic          e_we,
  input  logic [AW-1:0] e_addr,
  input  word_t         e_wdata,
  output logic          e_gnt,
  output logic          e_rvalid,
  // memory bank port
  output logic          m_en,
  output logic          m_we,
  output logic [AW-1:0] m_addr,
  output word_t         m_wdata
);
  logic last_exec;   // the execution unit had the most recent contested grant

  always_comb begin
    f_gnt = f_req && (!e_req || last_exec);
    e_gnt = e_req && !f_gnt;
    m_en    = f_gnt || e_gnt;
    m_we    = e_gnt && e_we;
    m_addr  = f_gnt ? f_addr : e_addr;
    m_wdata = e_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_exec <= 1'b0;
      f_rvalid  <= 1'b0;
      e_rvalid  <= 1'b0;
    end else begin
      if (f_req && e_req) last_exec <= e_gnt;
      f_rvalid <= f_gnt;
      e_rvalid <= e_gnt && !e_we;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(f_gnt && e_gnt));
endmodule
