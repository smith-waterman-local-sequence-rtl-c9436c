// Smith-Waterman processing element (one column of the score matrix).
//
// The PE holds one query character c_x and sees the database stream go by
// at one character c_y per clock.  For each database character it computes,
// in one cycle, the affine-gap local-alignment recurrences
//
//   S(y,x) = max{ 0, S(y-1,x-1)+Sub(c_y,c_x), S(y,x-1)-eog, S(y-1,x)-eog,
//                 H(y,x-1)-e, V(y-1,x)-e }
//   H(y,x) = max{ H(y,x-1)-e, S(y,x-1)-eog }
//   V(y,x) = max{ V(y-1,x)-e, S(y-1,x)-eog }
//
// with S(0,x) = 0 and V(0,x) = -eog.  S(y,x-1) and H(y,x-1) arrive from the
// left neighbour together with c_y; S(y-1,x-1) is the left score of the
// previous database character, kept in `s_diag`; S(y-1,x) and V(y-1,x) are
// this PE's own results for the previous character.  A beat flagged `first`
// starts a new database and uses the row-0 values instead of the stored ones.
// Sub is +match when the characters are equal and the PE holds a letter,
// else -mismatch.  The row maximum max(max_in, S) is passed on, so the last
// PE of a query delivers the best score of each row.
//
// Query loading: a character arriving with time-to-live 0 is kept; one with
// a larger time-to-live is forwarded with the value decremented.  q_clear
// empties the PE (code 0, which never matches).
//
// Timing: every output is registered, so the PE adds one cycle of latency on
// both the score path and the query-loading path.  Invalid beats (bubbles)
// pass through and leave the column state untouched.
//
// The recurrences, the time-to-live forwarding and the one-cell-per-clock
// rate follow the document; the character code 0 for "empty" and the
// `first` flag that replaces a separate array reset are this design's own.
module sw_pe
  import sw_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  sw_cfg_t  cfg,
  input  logic     q_clear,
  input  sw_link_t in,
  input  qload_t   q_in,
  output sw_link_t out,
  output qload_t   q_out,
  output char_t    q_char       // the query character held (for observation)
);

  char_t  qch;
  score_t s_up, v_up, s_diag;

  score_t eog, e;
  score_t diag_v, up_s, up_v, sub;
  score_t h_new, v_new, s_new;

  always_comb begin
    eog    = ext(cfg.gap_open);
    e      = ext(cfg.gap_ext);
    diag_v = in.db.first ? score_t'(0) : s_diag;
    up_s   = in.db.first ? score_t'(0) : s_up;
    up_v   = in.db.first ? -eog         : v_up;
    sub    = (qch != NO_CHAR && qch == in.db.ch) ? ext(cfg.match) : -ext(cfg.mismatch);
    h_new  = smax(in.h - e, in.s - eog);
    v_new  = smax(up_v - e, up_s - eog);
    s_new  = smax(smax(score_t'(0), diag_v + sub), smax(h_new, v_new));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      qch    <= NO_CHAR;
      s_up   <= '0;
      v_up   <= '0;
      s_diag <= '0;
      out    <= '0;
      q_out  <= '0;
    end else begin
      // score path
      out.db <= in.db;
      if (in.db.valid) begin
        s_up    <= s_new;
        v_up    <= v_new;
        s_diag  <= in.s;
        out.s   <= s_new;
        out.h   <= h_new;
        out.max <= smax(in.max, s_new);
      end else begin
        out.s   <= in.s;
        out.h   <= in.h;
        out.max <= in.max;
      end
      // query-loading path
      q_out <= '0;
      if (q_clear) begin
        qch <= NO_CHAR;
      end else if (q_in.valid) begin
        if (q_in.ttl == '0) begin
          qch <= q_in.ch;
        end else begin
          q_out.valid <= 1'b1;
          q_out.ch    <= q_in.ch;
          q_out.ttl   <= q_in.ttl - 1'b1;
        end
      end
    end
  end

  assign q_char = qch;

endmodule
