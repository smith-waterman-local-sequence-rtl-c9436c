// Max-score register at the end of a group of 32 PEs.
//
// The link leaving the last PE of a group carries, for each database row,
// the best score of that row over the query columns since the query's
// start.  This register keeps the maximum of those row maxima over the
// whole database: the first beat of a database loads it, later valid beats
// raise it.  The value is the alignment score of a query that ends at this
// group.  `last_seen` pulses for one cycle after the last database beat has
// been folded in, so `max_score` is then final.
//
// Timing: one cycle from the beat to `max_score`.
//
// The register and its place follow the document; the load-on-first rule
// is this design's way of clearing it for each database.
module sw_max_latch
  import sw_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  sw_link_t in,
  output score_t   max_score,
  output logic     last_seen
);

  always_ff @(posedge clk) begin
    if (rst) begin
      max_score <= '0;
      last_seen <= 1'b0;
    end else begin
      last_seen <= in.db.valid && in.db.last;
      if (in.db.valid) begin
        if (in.db.first) max_score <= in.max;
        else             max_score <= smax(max_score, in.max);
      end
    end
  end

endmodule
