// hws_warp_pool: the warp pool of one SM.
//
// DEPTH entries, each holding a warp that is ready to be scheduled: its PC,
// its thread placement and its quarter-warp mask. A warp leaves the pool when
// it is issued (clr) and comes back through the write port once it has been
// committed, possibly after squeezing or combination with another entry.
//
// The pool also answers two questions combinationally: which entry is the
// lowest free one (free_idx, full), and which valid entries hold a given PC
// (pc_match), for warp formation.
//
// Timing: one write and one clear per cycle, both take effect at the next
// clock edge. Writing to an entry that is cleared in the same cycle is not
// allowed; the clear wins. Synchronous active-low reset empties the pool.
module hws_warp_pool
  import hws_pkg::*;
#(
  parameter int unsigned DEPTH = 32,
  localparam int unsigned IW   = $clog2(DEPTH)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    wr_en,
  input  logic [IW-1:0]           wr_idx,
  input  pool_entry_t             wr_data,
  input  logic                    clr_en,
  input  logic [IW-1:0]           clr_idx,
  input  pc_t                     match_pc,
  output logic [DEPTH-1:0]        valid,
  output pool_entry_t [DEPTH-1:0] entries,
  output logic [DEPTH-1:0]        pc_match,
  output logic [IW-1:0]           free_idx,
  output logic                    full,
  output logic [IW:0]             count
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid <= '0;
    end else begin
      if (wr_en)  valid[wr_idx]  <= 1'b1;
      if (clr_en) valid[clr_idx] <= 1'b0;
    end
  end

  // entry contents are only looked at while the entry is valid: no reset
  always_ff @(posedge clk)
    if (wr_en) entries[wr_idx] <= wr_data;

  always_comb begin
    full     = &valid;
    free_idx = '0;
    count    = '0;
    for (int i = int'(DEPTH) - 1; i >= 0; i--)
      if (!valid[i]) free_idx = IW'(i);
    for (int i = 0; i < int'(DEPTH); i++) begin
      count       = count + (IW+1)'(valid[i]);
      pc_match[i] = valid[i] && (entries[i].pc == match_pc);
    end
  end

  // a warp being issued cannot be written in the same cycle, and only a
  // valid entry can be issued
  a_no_wr_clr_same: assert property (@(posedge clk) disable iff (!rst_n)
    !(wr_en && clr_en && wr_idx == clr_idx));
  a_clr_valid: assert property (@(posedge clk) disable iff (!rst_n)
    clr_en |-> valid[clr_idx]);

endmodule
