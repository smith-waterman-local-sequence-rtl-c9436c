// Shared types and constants of the Smith-Waterman systolic accelerator.
//
// Characters are 5-bit codes: 1..26 are the letters A..Z and 0 is "no
// character".  A processing element (PE) that holds code 0 never scores a
// match, so unloaded PEs behave as padding.  Scores are signed and wide
// enough that no score of a 2048-character query can overflow with 8-bit
// scoring values (255 * 2048 < 2**19).
//
// Three bundles travel along the systolic array, one register stage per PE:
//   db_beat_t   one database character with its valid, first and last flags
//   sw_link_t   a database beat plus the score S, the horizontal-gap value H
//               and the running maximum of the row, as passed PE to PE and
//               FPGA to FPGA over the adjacent-FPGA bus
//   qload_t     one query character with its time-to-live (hops left)
package sw_pkg;

  localparam int unsigned CHAR_W  = 5;    // 26-letter alphabet in 5 bits
  localparam int unsigned SCORE_W = 20;   // signed score width
  localparam int unsigned CFG_W   = 8;    // match, mismatch, gap values
  localparam int unsigned TTL_W   = 9;    // hops within one FPGA of 512 PEs
  localparam int unsigned WORD_W  = 64;   // memory word of MultiPort and FIFO
  localparam int unsigned CHARS_PER_WORD = WORD_W / CHAR_W;  // 12

  typedef logic [CHAR_W-1:0]         char_t;
  typedef logic signed [SCORE_W-1:0] score_t;
  typedef logic [CFG_W-1:0]          cfg_t;
  typedef logic [TTL_W-1:0]          ttl_t;
  typedef logic [WORD_W-1:0]         word_t;

  localparam char_t NO_CHAR = '0;

  typedef struct packed {
    logic  valid;
    logic  first;   // first character of a database (row 1)
    logic  last;    // last character of a database
    char_t ch;
  } db_beat_t;

  typedef struct packed {
    db_beat_t db;
    score_t   s;    // S(y, x) of the sending PE
    score_t   h;    // H(y, x) of the sending PE
    score_t   max;  // max of S over this row, from the query's first PE on
  } sw_link_t;

  typedef struct packed {
    logic  valid;
    char_t ch;
    ttl_t  ttl;
  } qload_t;

  // Scoring values, all unsigned magnitudes: a match adds `match`, a
  // mismatch subtracts `mismatch`, opening a gap costs `gap_open` (eog) and
  // each further gap position costs `gap_ext` (e).
  typedef struct packed {
    cfg_t match;
    cfg_t mismatch;
    cfg_t gap_open;
    cfg_t gap_ext;
  } sw_cfg_t;

  function automatic score_t smax(score_t a, score_t b);
    return (a > b) ? a : b;
  endfunction

  function automatic score_t ext(cfg_t v);
    return score_t'({{(SCORE_W-CFG_W){1'b0}}, v});
  endfunction

  // Letter 'A'..'Z' (ASCII) to the 5-bit code; anything else gives NO_CHAR.
  function automatic char_t encode_ascii(logic [7:0] a);
    if (a >= 8'h41 && a <= 8'h5A) return char_t'(a - 8'h40);
    return NO_CHAR;
  endfunction

endpackage
