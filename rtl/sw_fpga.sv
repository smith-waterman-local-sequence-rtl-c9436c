// One FPGA of the Smith-Waterman accelerator.
//
// A query of up to NUM_GROUPS*GROUP_SIZE characters (512 by default), or
// several shorter queries each starting at a 32-PE group boundary, is loaded
// into the systolic PE array from the Query FIFO, one character per PE.  A
// database held in board memory is then streamed through the array from the
// MultiPort at one character per clock, and each PE computes one cell of the
// score matrix per clock.  The best local-alignment score of a query is read
// from the max-score register of the group that holds its last character.
//
// Blocks: sw_query_interface (Query FIFO -> array, by time-to-live),
// sw_db_interface (MultiPort -> array), sw_pe_array (PEs, group links, max
// registers) and sw_status_regs (host registers).  The Query FIFO and the
// MultiPort are vendor memory cores outside this module; their read ports
// are the q_fifo_* and mp_* ports.
//
// Several FPGAs extend one query: peg_out of one FPGA drives peg_in of the
// next (the adjacent-FPGA bus), the next FPGA sets db_select = 0 to continue
// the database and score_select0 = 0 to continue the query.  The first FPGA
// sets db_select = 1 and score_select0 = 1.
//
// Operation: write the scoring values, QUERY_SIZE, DB_LEN and SCORE_SEL;
// pulse q_go and wait for q_done; pulse db_go (on every FPGA of a chain,
// the continuing ones included) and wait for db_done; read the MAX_SCORE
// registers.  db_go may be repeated against the same database with
// a new query load.  Control inputs are sampled on the rising clock edge;
// rst is synchronous and active high.
//
// Latency of one database pass: db_len characters (plus bubbles when the
// MultiPort runs empty) + NUM_PE + NUM_GROUPS + a few cycles to drain.
module sw_fpga
  import sw_pkg::*;
#(
  parameter int unsigned NUM_GROUPS = 16,
  parameter int unsigned GROUP_SIZE = 32
) (
  input  logic        clk,
  input  logic        rst,
  // host register port
  input  logic        reg_wr,
  input  logic [5:0]  reg_addr,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  // Query FIFO read port
  output logic        q_fifo_rd,
  input  word_t       q_fifo_data,
  input  logic        q_fifo_empty,
  // DB MultiPort read port
  output logic        mp_restart,
  output logic        mp_rd,
  input  word_t       mp_data,
  input  logic        mp_empty,
  // control pins
  input  logic        db_select,
  input  logic        db_go,
  output logic        db_done,
  input  logic        score_select0,
  input  logic        q_go,
  output logic        q_done,
  // adjacent-FPGA bus
  input  sw_link_t    peg_in,
  output sw_link_t    peg_out
);

  localparam int unsigned NUM_PE = NUM_GROUPS * GROUP_SIZE;

  sw_cfg_t             cfg;
  logic [15:0]         q_size;
  logic [31:0]         db_len;
  logic [NUM_GROUPS:1] score_select_reg;
  score_t              max_score [NUM_GROUPS];
  char_t               q_chars   [NUM_PE];
  db_beat_t            local_db;
  qload_t              local_q;
  logic                q_clear, last_out, db_busy, q_busy;

  sw_status_regs #(.NUM_GROUPS(NUM_GROUPS)) u_regs (
    .clk, .rst, .reg_wr, .reg_addr, .reg_wdata, .reg_rdata,
    .db_select, .score_select0, .db_done, .q_done, .db_busy, .q_busy,
    .max_score, .cfg, .q_size, .db_len,
    .score_select(score_select_reg)
  );

  sw_query_interface #(.DRAIN_CYCLES(NUM_PE + NUM_GROUPS + 2)) u_qif (
    .clk, .rst, .q_go, .q_size,
    .fifo_rd   (q_fifo_rd),
    .fifo_data (q_fifo_data),
    .fifo_empty(q_fifo_empty),
    .q_clear,
    .q_out     (local_q),
    .q_done,
    .busy      (q_busy)
  );

  sw_db_interface u_dbif (
    .clk, .rst, .db_go, .db_select, .db_len,
    .mp_restart, .mp_rd, .mp_data, .mp_empty,
    .db_out    (local_db),
    .array_last(last_out),
    .db_done,
    .busy      (db_busy)
  );

  sw_pe_array #(.NUM_GROUPS(NUM_GROUPS), .GROUP_SIZE(GROUP_SIZE)) u_array (
    .clk, .rst, .cfg, .q_clear,
    .score_select({score_select_reg, score_select0}),
    .db_select,
    .local_db,
    .local_q,
    .peg_in,
    .peg_out,
    .max_score,
    .last_out,
    .q_chars
  );

endmodule
