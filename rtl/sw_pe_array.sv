// Linear unidirectional systolic array of Smith-Waterman PEs.
//
// NUM_GROUPS groups of GROUP_SIZE PEs (16 x 32 = 512 by default) are chained
// left to right.  A register-and-mux link stands before every group and after
// the last one (NUM_GROUPS+1 links); link k applies score_select[k]:
//   link 0         array input: chooses the database beat from the local
//                  database interface (db_select = 1) or from the adjacent
//                  FPGA (peg_in), and the left scores from the defaults
//                  (score_select[0] = 1) or from peg_in
//   link 1..N      after group k-1: start a new query in the next group
//                  (score_select[k] = 1) or extend the current one
// Each group output also feeds a max-score register, giving NUM_GROUPS
// reported maxima; the maximum of a query is read from the register of the
// group holding its last character.  peg_out leaves the last link for the
// next FPGA.
//
// Query characters enter at link 0 with a time-to-live equal to the index
// of the destination PE (0 = first PE) and hop one PE per cycle.
//
// Timing: a database character reaches PE i (0-based, in group g) i+g+1
// cycles after it enters link 0, and leaves peg_out NUM_PE+NUM_GROUPS+1
// cycles after entering.  `last_out` pulses one cycle after the last beat of
// a database has been folded into the final max register, when all
// max_scores are final.
//
// The group size, group count, link placement and max registers follow the
// document; the pipeline registers in the links are this design's choice.
module sw_pe_array
  import sw_pkg::*;
#(
  parameter int unsigned NUM_GROUPS = 16,
  parameter int unsigned GROUP_SIZE = 32
) (
  input  logic                   clk,
  input  logic                   rst,
  input  sw_cfg_t                cfg,
  input  logic                   q_clear,
  input  logic [NUM_GROUPS:0]    score_select,
  input  logic                   db_select,
  input  db_beat_t               local_db,
  input  qload_t                 local_q,
  input  sw_link_t               peg_in,
  output sw_link_t               peg_out,
  output score_t                 max_score [NUM_GROUPS],
  output logic                   last_out,
  output char_t                  q_chars   [NUM_GROUPS*GROUP_SIZE]
);

  localparam int unsigned NUM_PE = NUM_GROUPS * GROUP_SIZE;

  // pe_link[i] is the input of PE i; pe_link[i+1] its output (within a group
  // the chain is direct, across groups it goes through a link stage).
  sw_link_t link_out [NUM_GROUPS+1];
  qload_t   linkq_out[NUM_GROUPS+1];
  sw_link_t grp_out  [NUM_GROUPS];
  qload_t   grpq_out [NUM_GROUPS];
  logic     last_seen[NUM_GROUPS];

  sw_group_link u_link_in (
    .clk, .rst,
    .gap_open  (cfg.gap_open),
    .new_query (score_select[0]),
    .use_alt_db(db_select),
    .alt_db    (local_db),
    .up        (peg_in),
    .q_up      (local_q),
    .down      (link_out[0]),
    .q_down    (linkq_out[0])
  );

  for (genvar g = 0; g < NUM_GROUPS; g++) begin : g_group
    sw_link_t chain  [GROUP_SIZE+1];
    qload_t   qchain [GROUP_SIZE+1];

    assign chain[0]  = link_out[g];
    assign qchain[0] = linkq_out[g];

    for (genvar p = 0; p < GROUP_SIZE; p++) begin : g_pe
      sw_pe u_pe (
        .clk, .rst, .cfg, .q_clear,
        .in    (chain[p]),
        .q_in  (qchain[p]),
        .out   (chain[p+1]),
        .q_out (qchain[p+1]),
        .q_char(q_chars[g*GROUP_SIZE+p])
      );
    end

    assign grp_out[g]  = chain[GROUP_SIZE];
    assign grpq_out[g] = qchain[GROUP_SIZE];

    sw_max_latch u_max (
      .clk, .rst,
      .in       (grp_out[g]),
      .max_score(max_score[g]),
      .last_seen(last_seen[g])
    );

    sw_group_link u_link (
      .clk, .rst,
      .gap_open  (cfg.gap_open),
      .new_query (score_select[g+1]),
      .use_alt_db(1'b0),
      .alt_db    ('0),
      .up        (grp_out[g]),
      .q_up      (grpq_out[g]),
      .down      (link_out[g+1]),
      .q_down    (linkq_out[g+1])
    );
  end

  assign peg_out  = link_out[NUM_GROUPS];
  assign last_out = last_seen[NUM_GROUPS-1];

  initial assert (NUM_PE <= (1 << TTL_W))
    else $error("sw_pe_array: %0d PEs exceed the time-to-live range", NUM_PE);

endmodule
