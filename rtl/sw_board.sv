// One accelerator board: NUM_FPGA identical Smith-Waterman FPGAs (4 by
// default) chained by the adjacent-FPGA bus.
//
// Every FPGA carries the same sw_fpga design; only its control pins and
// registers differ.  peg_out of FPGA i drives peg_in of FPGA i+1, so a
// database streamed by one FPGA can be continued by the next (db_select = 0
// there) and a query longer than one FPGA's 512 PEs can be continued across
// FPGAs (score_select0 = 0 there), up to 2048 characters on four FPGAs.
// Alternatively each FPGA streams its own database (db_select = 1) with its
// own queries.  The first FPGA has no left neighbour and must stream its own
// database; its peg_in is tied to zero.
//
// All per-FPGA ports are arrays indexed by FPGA number; the host register
// port, the Query FIFO and the MultiPort of each FPGA are separate, as on
// the board.  board_peg_out is the bus leaving the last FPGA.  Each FPGA
// boundary adds the latency of one full array (NUM_PE + NUM_GROUPS + 1
// cycles).
//
// The chaining over the adjacent-FPGA bus follows the document; its width
// and the struct carried on it are this design's.
module sw_board
  import sw_pkg::*;
#(
  parameter int unsigned NUM_FPGA   = 4,
  parameter int unsigned NUM_GROUPS = 16,
  parameter int unsigned GROUP_SIZE = 32
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        reg_wr       [NUM_FPGA],
  input  logic [5:0]  reg_addr     [NUM_FPGA],
  input  logic [31:0] reg_wdata    [NUM_FPGA],
  output logic [31:0] reg_rdata    [NUM_FPGA],
  output logic        q_fifo_rd    [NUM_FPGA],
  input  word_t       q_fifo_data  [NUM_FPGA],
  input  logic        q_fifo_empty [NUM_FPGA],
  output logic        mp_restart   [NUM_FPGA],
  output logic        mp_rd        [NUM_FPGA],
  input  word_t       mp_data      [NUM_FPGA],
  input  logic        mp_empty     [NUM_FPGA],
  input  logic        db_select    [NUM_FPGA],
  input  logic        db_go        [NUM_FPGA],
  output logic        db_done      [NUM_FPGA],
  input  logic        score_select0[NUM_FPGA],
  input  logic        q_go         [NUM_FPGA],
  output logic        q_done       [NUM_FPGA],
  output sw_link_t    board_peg_out
);

  sw_link_t peg [NUM_FPGA+1];

  assign peg[0] = '0;

  for (genvar f = 0; f < NUM_FPGA; f++) begin : g_fpga
    sw_fpga #(.NUM_GROUPS(NUM_GROUPS), .GROUP_SIZE(GROUP_SIZE)) u_fpga (
      .clk, .rst,
      .reg_wr       (reg_wr[f]),
      .reg_addr     (reg_addr[f]),
      .reg_wdata    (reg_wdata[f]),
      .reg_rdata    (reg_rdata[f]),
      .q_fifo_rd    (q_fifo_rd[f]),
      .q_fifo_data  (q_fifo_data[f]),
      .q_fifo_empty (q_fifo_empty[f]),
      .mp_restart   (mp_restart[f]),
      .mp_rd        (mp_rd[f]),
      .mp_data      (mp_data[f]),
      .mp_empty     (mp_empty[f]),
      .db_select    (db_select[f]),
      .db_go        (db_go[f]),
      .db_done      (db_done[f]),
      .score_select0(score_select0[f]),
      .q_go         (q_go[f]),
      .q_done       (q_done[f]),
      .peg_in       (peg[f]),
      .peg_out      (peg[f+1])
    );
  end

  assign board_peg_out = peg[NUM_FPGA];

endmodule
