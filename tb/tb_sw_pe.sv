// Testbench of sw_pe: query-character loading by time-to-live, and the
// scoring recurrences against a cell-by-cell model of one matrix column fed
// with random left-neighbour values, bubbles and database restarts.
module tb_sw_pe;
  import sw_pkg::*;

  logic     clk = 0, rst = 1, q_clear = 0;
  sw_cfg_t  cfg;
  sw_link_t in, out;
  qload_t   q_in, q_out;
  char_t    q_char;
  int checks = 0, failures = 0;

  sw_pe dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic int imax(int a, int b);
    return a > b ? a : b;
  endfunction

  // model state: this PE's previous S and V, and the previous left S
  int m_s_up, m_v_up, m_diag;

  initial begin
    int qc;
    cfg = '{match: 2, mismatch: 1, gap_open: 2, gap_ext: 1};
    in = '0; q_in = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;

    // time-to-live forwarding
    q_in = '{valid: 1, ch: 5'd7, ttl: 9'd3};
    @(posedge clk); #1;
    q_in = '0;
    check(q_out.valid && q_out.ch == 7 && q_out.ttl == 2, "forward with ttl-1");
    check(q_char == NO_CHAR, "forwarded char not kept");
    @(posedge clk); #1;
    check(!q_out.valid, "single-cycle forward");
    q_in = '{valid: 1, ch: 5'd3, ttl: 9'd0};
    @(posedge clk); #1;
    q_in = '0;
    check(q_char == 3, "ttl 0 kept");
    check(!q_out.valid, "kept char not forwarded");
    q_clear = 1;
    @(posedge clk); #1;
    q_clear = 0;
    check(q_char == NO_CHAR, "q_clear empties");

    // scoring: several configurations and query characters
    for (int run = 0; run < 6; run++) begin
      qc = (run == 5) ? 0 : 1 + ($urandom % 4);
      cfg = (run < 2) ? '{match: 2, mismatch: 1, gap_open: 2, gap_ext: 1}
                      : '{match: cfg_t'(1 + $urandom % 9), mismatch: cfg_t'($urandom % 6),
                          gap_open: cfg_t'(1 + $urandom % 8), gap_ext: cfg_t'($urandom % 4)};
      q_in = '{valid: 1, ch: char_t'(qc), ttl: 9'd0};
      @(posedge clk); #1;
      q_in = '0;
      for (int row = 0; row < 60; row++) begin
        int ls, lh, lm, dch, sub, s, h, v, up_s, up_v, diag;
        bit valid, first;
        valid = (row == 0) || ($urandom % 5 != 0);
        first = (row == 0);
        dch = 1 + ($urandom % 4);
        ls  = $urandom % 30;
        lh  = int'($urandom % 30) - int'(cfg.gap_open);
        lm  = ls + ($urandom % 10);
        in.db = '{valid: valid, first: first, last: 1'b0, ch: char_t'(dch)};
        in.s = score_t'(ls); in.h = score_t'(lh); in.max = score_t'(lm);
        @(posedge clk); #1;
        if (valid) begin
          // Fig-3 style: six candidates
          up_s = first ? 0 : m_s_up;
          up_v = first ? -int'(cfg.gap_open) : m_v_up;
          diag = first ? 0 : m_diag;
          sub  = (qc != 0 && qc == dch) ? int'(cfg.match) : -int'(cfg.mismatch);
          h = imax(lh - int'(cfg.gap_ext), ls - int'(cfg.gap_open));
          v = imax(up_v - int'(cfg.gap_ext), up_s - int'(cfg.gap_open));
          s = imax(imax(0, diag + sub), imax(imax(ls - int'(cfg.gap_open), up_s - int'(cfg.gap_open)),
                   imax(lh - int'(cfg.gap_ext), up_v - int'(cfg.gap_ext))));
          m_s_up = s; m_v_up = v; m_diag = ls;
          check(int'(out.s) == s, $sformatf("S run %0d row %0d: got %0d exp %0d", run, row, out.s, s));
          check(int'(out.h) == h, $sformatf("H run %0d row %0d: got %0d exp %0d", run, row, out.h, h));
          check(int'(out.max) == imax(lm, s), $sformatf("max run %0d row %0d", run, row));
        end else begin
          check(!out.db.valid, "bubble passes as bubble");
        end
        check(out.db.ch == char_t'(dch) && out.db.first == first, "db beat forwarded");
      end
      in = '0;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
