// Testbench of sw_pe_array at 4 groups of 4 PEs.  Two arrays are chained
// through the adjacent-FPGA bus (peg_out -> peg_in), the second continuing
// the database and the query of the first.  Checks: query characters settle
// in the PE given by their time-to-live; the example matrix (query
// ACGTATGC, database ACGAACCCTTGC, best score 8); several queries sharing
// one database pass through the group links; a query extended across both
// arrays; bubbles; the input-to-output latency NUM_PE + NUM_GROUPS + 1.
module tb_sw_pe_array;
  import sw_pkg::*;
  import sw_ref_pkg::*;

  localparam int NG = 4, GS = 4, NPE = NG * GS;

  logic     clk = 0, rst = 1, q_clear = 0;
  sw_cfg_t  cfg;
  logic [NG:0] ssel_a, ssel_b;
  logic     dbsel_a, dbsel_b;
  db_beat_t local_db;
  qload_t   q_a, q_b;
  sw_link_t peg_a_out, peg_b_out;
  score_t   max_a [NG], max_b [NG];
  logic     last_a, last_b;
  char_t    qch_a [NPE], qch_b [NPE];
  int checks = 0, failures = 0;
  int cyc = 0;

  sw_pe_array #(.NUM_GROUPS(NG), .GROUP_SIZE(GS)) dut_a (
    .clk, .rst, .cfg, .q_clear, .score_select(ssel_a), .db_select(dbsel_a),
    .local_db, .local_q(q_a), .peg_in('0), .peg_out(peg_a_out),
    .max_score(max_a), .last_out(last_a), .q_chars(qch_a));

  sw_pe_array #(.NUM_GROUPS(NG), .GROUP_SIZE(GS)) dut_b (
    .clk, .rst, .cfg, .q_clear, .score_select(ssel_b), .db_select(dbsel_b),
    .local_db('0), .local_q(q_b), .peg_in(peg_a_out), .peg_out(peg_b_out),
    .max_score(max_b), .last_out(last_b), .q_chars(qch_b));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // load characters (code 0 = empty) into PE 0.. of array a or b
  task automatic load(chars_t qa, chars_t qb);
    q_clear = 1;
    @(posedge clk); #1;
    q_clear = 0;
    for (int i = 0; i < NPE; i++) begin
      q_a = (i < qa.size()) ? '{valid: 1, ch: char_t'(qa[i]), ttl: ttl_t'(i)} : '0;
      q_b = (i < qb.size()) ? '{valid: 1, ch: char_t'(qb[i]), ttl: ttl_t'(i)} : '0;
      @(posedge clk); #1;
    end
    q_a = '0; q_b = '0;
    repeat (NPE + NG + 2) @(posedge clk);
    #1;
    for (int i = 0; i < NPE; i++) begin
      check(qch_a[i] == ((i < qa.size()) ? char_t'(qa[i]) : NO_CHAR), $sformatf("array a PE %0d char", i));
      check(qch_b[i] == ((i < qb.size()) ? char_t'(qb[i]) : NO_CHAR), $sformatf("array b PE %0d char", i));
    end
  endtask

  int t_in, t_out_a, t_out_b;
  always @(posedge clk) begin
    if (peg_a_out.db.valid && peg_a_out.db.first) t_out_a = cyc;
    if (peg_b_out.db.valid && peg_b_out.db.first) t_out_b = cyc;
  end

  // stream a database into array a, with bubbles at gap_pct percent
  task automatic stream(chars_t d, int gap_pct);
    int i = 0;
    while (i < d.size()) begin
      if (i > 0 && ($urandom % 100) < gap_pct) begin
        local_db = '0;
      end else begin
        local_db = '{valid: 1, first: (i == 0), last: (i == d.size() - 1), ch: char_t'(d[i])};
        if (i == 0) t_in = cyc;
        i++;
      end
      @(posedge clk); #1;
    end
    local_db = '0;
    wait (last_b);
    @(posedge clk); #1;
  endtask

  function automatic chars_t slice(chars_t c, int from, int len);
    chars_t r = new[len];
    foreach (r[i]) r[i] = c[from + i];
    return r;
  endfunction

  function automatic chars_t pad(chars_t c, int len);
    chars_t r = new[len];
    foreach (r[i]) r[i] = (i < c.size()) ? c[i] : 0;
    return r;
  endfunction

  initial begin
    chars_t q, d, q0, q1, q2, qa, qb, empty;
    int exp;
    cfg = '{match: 2, mismatch: 1, gap_open: 2, gap_ext: 1};
    local_db = '0; q_a = '0; q_b = '0;
    ssel_a = '0; ssel_b = '0; dbsel_a = 1; dbsel_b = 0;
    empty = new[0];
    repeat (3) @(posedge clk);
    #1 rst = 0;

    // 1. example matrix: one query in array a only, array b empty
    ssel_a = 5'b00001; ssel_b = 5'b00000;
    q = from_string("ACGTATGC");
    d = from_string("ACGAACCCTTGC");
    load(q, empty);
    stream(d, 0);
    check(max_a[1] == 8, $sformatf("example best score %0d, expected 8", max_a[1]));
    check(max_b[NG-1] == 8, "example best score through array b");
    check(t_out_a - t_in == NPE + NG + 1, $sformatf("latency %0d", t_out_a - t_in));
    check(t_out_b - t_out_a == NPE + NG + 1, "latency of the second array");

    // 2. several queries per array: a has groups {0}, {1,2}, {3};
    //    b has {0,1}, {2}, {3}
    for (int rep = 0; rep < 6; rep++) begin
      if (rep >= 3) cfg = '{match: cfg_t'(1 + $urandom % 5), mismatch: cfg_t'($urandom % 4),
                            gap_open: cfg_t'(1 + $urandom % 4), gap_ext: cfg_t'($urandom % 3)};
      ssel_a = 5'b01011; ssel_b = 5'b01101;
      q0 = random_chars(1 + $urandom % GS, 4);
      q1 = random_chars(GS + 1 + $urandom % GS, 4);
      q2 = random_chars(1 + $urandom % GS, 4);
      qa = new[NPE];
      foreach (qa[i]) qa[i] = 0;
      foreach (q0[i]) qa[i] = q0[i];
      foreach (q1[i]) qa[GS + i] = q1[i];
      foreach (q2[i]) qa[3*GS + i] = q2[i];
      qb = pad(random_chars(2*GS, 4), NPE);
      d = random_chars(20 + $urandom % 40, 4);
      load(qa, qb);
      stream(d, 25);
      exp = sw_best(q0, d, cfg.match, cfg.mismatch, cfg.gap_open, cfg.gap_ext);
      check(max_a[0] == exp, $sformatf("rep %0d q0 %0d exp %0d", rep, max_a[0], exp));
      exp = sw_best(slice(q1, 0, GS), d, cfg.match, cfg.mismatch, cfg.gap_open, cfg.gap_ext);
      check(max_a[1] == exp, $sformatf("rep %0d q1 prefix %0d exp %0d", rep, max_a[1], exp));
      exp = sw_best(q1, d, cfg.match, cfg.mismatch, cfg.gap_open, cfg.gap_ext);
      check(max_a[2] == exp, $sformatf("rep %0d q1 %0d exp %0d", rep, max_a[2], exp));
      exp = sw_best(q2, d, cfg.match, cfg.mismatch, cfg.gap_open, cfg.gap_ext);
      check(max_a[3] == exp, $sformatf("rep %0d q2 %0d exp %0d", rep, max_a[3], exp));
      exp = sw_best(slice(qb, 0, 2*GS), d, cfg.match, cfg.mismatch, cfg.gap_open, cfg.gap_ext);
      check(max_b[1] == exp, $sformatf("rep %0d b q %0d exp %0d", rep, max_b[1], exp));
      check(max_b[2] == 0 && max_b[3] == 0, "empty query groups score 0");
    end

    // 3. one query extended across both arrays
    for (int rep = 0; rep < 4; rep++) begin
      ssel_a = 5'b00001; ssel_b = 5'b00000;
      q = random_chars(NPE + 1 + $urandom % (NPE - 1), 4);
      d = random_chars(30 + $urandom % 40, 4);
      load(slice(q, 0, NPE), slice(q, NPE, q.size() - NPE));
      stream(d, 20);
      exp = sw_best(q, d, cfg.match, cfg.mismatch, cfg.gap_open, cfg.gap_ext);
      check(max_b[NG-1] == exp, $sformatf("extended query %0d exp %0d", max_b[NG-1], exp));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
