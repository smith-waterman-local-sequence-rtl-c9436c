// Register-and-mux stage placed in front of each group of 32 PEs and after
// the last one.
//
// The only difference between starting a new query and continuing the
// previous one at a group boundary is what the next PE sees on its left:
// the row-0 defaults (S = 0, H = -eog, row maximum 0) or the scores of the
// PE before it.  `new_query` selects the defaults, so several short queries
// can share one pass of the database.  The database beat always continues,
// except that the stage at the array input may take it from the local
// database interface (`use_alt_db`) instead of the adjacent FPGA.  The
// query-loading bundle passes through unchanged (its time-to-live counts
// PEs, not stages).
//
// Timing: one register stage on every path, so a stage adds one cycle and
// keeps the database, score and query bundles aligned.
//
// The mux and its defaults follow the document; making the stage a
// register (rather than a pure mux) is this design's choice.
module sw_group_link
  import sw_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  cfg_t     gap_open,
  input  logic     new_query,   // 1: start a query here, 0: continue
  input  logic     use_alt_db,  // 1: take the database beat from alt_db
  input  db_beat_t alt_db,
  input  sw_link_t up,
  input  qload_t   q_up,
  output sw_link_t down,
  output qload_t   q_down
);

  sw_link_t nxt;

  always_comb begin
    nxt    = up;
    nxt.db = use_alt_db ? alt_db : up.db;
    if (new_query) begin
      nxt.s   = '0;
      nxt.h   = -ext(gap_open);
      nxt.max = '0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      down   <= '0;
      q_down <= '0;
    end else begin
      down   <= nxt;
      q_down <= q_up;
    end
  end

endmodule
