// Host-visible configuration and status registers of one FPGA.
//
// A simple word-addressed register port: reg_wr writes reg_wdata to
// reg_addr on the clock edge; reg_rdata shows the register at reg_addr
// combinationally.  Map (word addresses):
//   0x00  STATUS     RO  bit0 db_select pin, bit1 score_select0 pin,
//                        bit2 db_done, bit3 q_done, bit4 db_busy, bit5 q_busy
//   0x01  MATCH      RW  reward for equal characters            (reset 2)
//   0x02  MISMATCH   RW  penalty for different characters       (reset 1)
//   0x03  GAP_OPEN   RW  eog, cost of the first gap position    (reset 2)
//   0x04  GAP_EXT    RW  e, cost of each further gap position   (reset 1)
//   0x05  QUERY_SIZE RW  characters loaded by q_go (16 bits)
//   0x06  DB_LEN     RW  characters streamed by db_go (32 bits)
//   0x07  SCORE_SEL  RW  bit k (1..NUM_GROUPS): start a new query after
//                        group k-1; bit 0 reads the score_select0 pin
//   0x20+g MAX_SCORE RO  max-score register of group g, sign-extended
// The reset scoring values are those that reproduce the document's example
// score matrix (match +2, mismatch -1, gap open 2, gap extend 1).
//
// The document names this block and lists its contents (database select,
// score select, match, mismatch, query size, gap value, max scores); the
// bus, addresses and encodings are this design's.
module sw_status_regs
  import sw_pkg::*;
#(
  parameter int unsigned NUM_GROUPS = 16
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  reg_wr,
  input  logic [5:0]            reg_addr,
  input  logic [31:0]           reg_wdata,
  output logic [31:0]           reg_rdata,
  // status in
  input  logic                  db_select,
  input  logic                  score_select0,
  input  logic                  db_done,
  input  logic                  q_done,
  input  logic                  db_busy,
  input  logic                  q_busy,
  input  score_t                max_score [NUM_GROUPS],
  // configuration out
  output sw_cfg_t               cfg,
  output logic [15:0]           q_size,
  output logic [31:0]           db_len,
  output logic [NUM_GROUPS:1]   score_select
);

  localparam logic [5:0] A_STATUS = 6'h00, A_MATCH = 6'h01, A_MISMATCH = 6'h02,
                         A_GOPEN = 6'h03, A_GEXT = 6'h04, A_QSIZE = 6'h05,
                         A_DBLEN = 6'h06, A_SSEL = 6'h07, A_MAX = 6'h20;

  always_ff @(posedge clk) begin
    if (rst) begin
      cfg.match    <= cfg_t'(2);
      cfg.mismatch <= cfg_t'(1);
      cfg.gap_open <= cfg_t'(2);
      cfg.gap_ext  <= cfg_t'(1);
      q_size       <= '0;
      db_len       <= '0;
      score_select <= '0;
    end else if (reg_wr) begin
      unique case (reg_addr)
        A_MATCH:    cfg.match    <= reg_wdata[CFG_W-1:0];
        A_MISMATCH: cfg.mismatch <= reg_wdata[CFG_W-1:0];
        A_GOPEN:    cfg.gap_open <= reg_wdata[CFG_W-1:0];
        A_GEXT:     cfg.gap_ext  <= reg_wdata[CFG_W-1:0];
        A_QSIZE:    q_size       <= reg_wdata[15:0];
        A_DBLEN:    db_len       <= reg_wdata;
        A_SSEL:     score_select <= reg_wdata[NUM_GROUPS:1];
        default: ;  // read-only or unused address
      endcase
    end
  end

  always_comb begin
    reg_rdata = '0;
    if (reg_addr >= A_MAX) begin
      for (int g = 0; g < NUM_GROUPS; g++) begin
        if (32'(reg_addr) == 32'(A_MAX) + 32'(g)) reg_rdata = 32'(max_score[g]);
      end
    end else begin
      case (reg_addr)
        A_STATUS:   reg_rdata = {26'b0, q_busy, db_busy, q_done, db_done,
                                 score_select0, db_select};
        A_MATCH:    reg_rdata = 32'(cfg.match);
        A_MISMATCH: reg_rdata = 32'(cfg.mismatch);
        A_GOPEN:    reg_rdata = 32'(cfg.gap_open);
        A_GEXT:     reg_rdata = 32'(cfg.gap_ext);
        A_QSIZE:    reg_rdata = 32'(q_size);
        A_DBLEN:    reg_rdata = db_len;
        A_SSEL:     reg_rdata = 32'({score_select, score_select0});
        default:    reg_rdata = '0;
      endcase
    end
  end

endmodule
