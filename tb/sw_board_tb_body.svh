// Shared body of the board testbenches.  The including module defines NF,
// NG, GS, N_REPS and instantiates `dut` (sw_board) on the signals declared
// here.  Behavioural Query FIFO and MultiPort models sit on every FPGA.
//
// Scenarios, each checked against the reference model:
//   example   the 8x12 example matrix on FPGA 0 (best score 8)
//   extend    one query across all FPGAs, FPGA 0 streams the database and
//             the others continue it over the adjacent-FPGA bus
//   reuse     a new query load against the database already in memory
//   pairs     FPGAs 0+1 and 2+3 each run their own database and query
//   multi     every FPGA streams its own database and runs one query per
//             32-PE group (several queries in one pass)
//   configs   all 2**(NF-1) database arrangements: FPGA 0 streams a
//             database, every other FPGA either streams its own or
//             continues its neighbour's; each chain runs one query that
//             spans it
// Mechanism counters (each must be non-zero): bubbles from MultiPort
// stalls, multi-query passes, cross-FPGA extensions, database restarts
// without reloading, independent-database passes.

  localparam int NPE = NG * GS;

  logic        clk = 0, rst = 1;
  logic        reg_wr       [NF];
  logic [5:0]  reg_addr     [NF];
  logic [31:0] reg_wdata    [NF];
  logic [31:0] reg_rdata    [NF];
  logic        q_fifo_rd    [NF];
  word_t       q_fifo_data  [NF];
  logic        q_fifo_empty [NF];
  logic        mp_restart   [NF];
  logic        mp_rd        [NF];
  word_t       mp_data      [NF];
  logic        mp_empty     [NF];
  logic        db_select    [NF];
  logic        db_go        [NF];
  logic        db_done      [NF];
  logic        score_select0[NF];
  logic        q_go         [NF];
  logic        q_done       [NF];
  sw_link_t    board_peg_out;

  int checks = 0, failures = 0;
  int n_bubbles = 0, n_multi = 0, n_extend = 0, n_reuse = 0, n_indep = 0, n_configs = 0;

  for (genvar f = 0; f < NF; f++) begin : g_m
    sw_word_source_model #(.DEPTH(4096)) qf (
      .clk, .restart(1'b0), .rd(q_fifo_rd[f]), .data(q_fifo_data[f]), .empty(q_fifo_empty[f]));
    sw_word_source_model #(.DEPTH(4096)) mp (
      .clk, .restart(mp_restart[f]), .rd(mp_rd[f]), .data(mp_data[f]), .empty(mp_empty[f]));
  end

  always #5 clk = ~clk;

  // bubbles seen on the bus leaving the last FPGA inside a database pass
  logic in_pass = 0;
  always @(posedge clk) begin
    if (board_peg_out.db.valid && board_peg_out.db.first) in_pass <= 1;
    if (board_peg_out.db.valid && board_peg_out.db.last)  in_pass <= 0;
    if (in_pass && !board_peg_out.db.valid) n_bubbles++;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(int f, logic [5:0] a, logic [31:0] d);
    reg_addr[f] = a; reg_wdata[f] = d; reg_wr[f] = 1;
    @(posedge clk); #1;
    reg_wr[f] = 0;
  endtask

  task automatic rd(int f, logic [5:0] a, output int d);
    reg_addr[f] = a; #1 d = int'(reg_rdata[f]);
  endtask

  task automatic push_word(int f, bit to_mp, word_t w);
    case (f)
      0: if (to_mp) g_m[0].mp.push(w); else g_m[0].qf.push(w);
      1: if (to_mp) g_m[1].mp.push(w); else g_m[1].qf.push(w);
      2: if (to_mp) g_m[2].mp.push(w); else g_m[2].qf.push(w);
      default: if (to_mp) g_m[3].mp.push(w); else g_m[3].qf.push(w);
    endcase
  endtask

  task automatic set_gaps(int pct);
    g_m[0].mp.gap_pct = pct; g_m[1].mp.gap_pct = pct;
    g_m[2].mp.gap_pct = pct; g_m[3].mp.gap_pct = pct;
  endtask

  task automatic clear_mp(int f);
    case (f)
      0: g_m[0].mp.clear();
      1: g_m[1].mp.clear();
      2: g_m[2].mp.clear();
      default: g_m[3].mp.clear();
    endcase
  endtask

  task automatic push_chars(int f, bit to_mp, chars_t c);
    word_t w;
    for (int i = 0; i < c.size(); i += CHARS_PER_WORD) begin
      w = '0;
      for (int k = 0; k < CHARS_PER_WORD && i + k < c.size(); k++)
        w[k*CHAR_W +: CHAR_W] = char_t'(c[i + k]);
      push_word(f, to_mp, w);
    end
  endtask

  function automatic chars_t slice(chars_t c, int from, int len);
    chars_t r = new[len];
    foreach (r[i]) r[i] = (from + i < c.size()) ? c[from + i] : 0;
    return r;
  endfunction

  // store a database in the memory of FPGA f
  task automatic store_db(int f, chars_t d);
    clear_mp(f);
    push_chars(f, 1, d);
    wr(f, 6'h06, d.size());
  endtask

  // load query characters (code 0 pads) into FPGA f, score_sel = SCORE_SEL
  task automatic start_query(int f, chars_t q, int score_sel);
    push_chars(f, 0, q);
    wr(f, 6'h05, q.size());
    wr(f, 6'h07, score_sel);
    q_go[f] = 1; @(posedge clk); #1; q_go[f] = 0;
  endtask

  task automatic wait_all(bit use_q);
    bit all;
    do begin
      @(posedge clk); #1;
      all = 1;
      for (int f = 0; f < NF; f++) all &= use_q ? q_done[f] : db_done[f];
    end while (!all);
  endtask

  // every FPGA gets db_go: those with db_select stream their database, the
  // others wait for their neighbour's; all must finish
  task automatic run_dbs();
    for (int f = 0; f < NF; f++) db_go[f] = 1;
    @(posedge clk); #1;
    for (int f = 0; f < NF; f++) db_go[f] = 0;
    @(posedge clk); #1;
    wait_all(0);
  endtask

  // chain FPGAs [lo..hi]: lo streams its database and starts the query
  task automatic chain(int lo, int hi);
    for (int f = lo; f <= hi; f++) begin
      db_select[f] = (f == lo);
      score_select0[f] = (f == lo);
    end
  endtask

  function automatic int best(chars_t q, chars_t d);
    return sw_best(q, d, 2, 1, 2, 1);
  endfunction

  task automatic run_scenarios(int reps, int db_len);
    chars_t q, d, d2, qs[NF], parts[NG];
    int v, len;
    foreach (reg_wr[f]) begin
      reg_wr[f] = 0; reg_addr[f] = 0; reg_wdata[f] = 0;
      db_go[f] = 0; q_go[f] = 0; db_select[f] = 1; score_select0[f] = 1;
    end
    repeat (3) @(posedge clk);
    #1 rst = 0;

    // example matrix on FPGA 0; the others run an empty query on it
    chain(0, NF - 1);
    store_db(0, from_string("ACGAACCCTTGC"));
    start_query(0, from_string("ACGTATGC"), 0);
    for (int f = 1; f < NF; f++) start_query(f, slice(q, 0, 0), 0);
    wait_all(1);
    run_dbs();
    rd(0, 6'h20, v);
    check(v == 8, $sformatf("example: %0d, expected 8", v));
    rd(NF - 1, 6'h20 + 6'(NG - 1), v);
    check(v == 8, "example result carried to the last FPGA");

    for (int rep = 0; rep < reps; rep++) begin
      set_gaps((rep == 0 && reps > 1) ? 0 : 15);
      // extend: one long query over all FPGAs
      len = (NF - 1) * NPE + 1 + $urandom % NPE;
      q = random_chars(len, 4);
      d = random_chars(db_len, 4);
      chain(0, NF - 1);
      store_db(0, d);
      for (int f = 0; f < NF; f++) start_query(f, slice(q, f * NPE, (f == NF - 1) ? len - f * NPE : NPE), 0);
      wait_all(1);
      run_dbs();
      rd(NF - 1, 6'h20 + 6'(NG - 1), v);
      check(v == best(q, d), $sformatf("extend rep %0d: %0d, expected %0d", rep, v, best(q, d)));
      n_extend++;

      // reuse: new query, same stored database, no reload
      q = random_chars(len, 4);
      for (int f = 0; f < NF; f++) start_query(f, slice(q, f * NPE, (f == NF - 1) ? len - f * NPE : NPE), 0);
      wait_all(1);
      run_dbs();
      rd(NF - 1, 6'h20 + 6'(NG - 1), v);
      check(v == best(q, d), $sformatf("reuse rep %0d: %0d, expected %0d", rep, v, best(q, d)));
      n_reuse++;

      // pairs: FPGAs 0+1 and 2+3
      d2 = random_chars(db_len / 2 + 7, 4);
      chain(0, 1); chain(2, 3);
      store_db(2, d2);
      for (int p = 0; p < 2; p++) begin
        qs[p] = random_chars(NPE + 1 + $urandom % NPE, 4);
        start_query(2 * p, slice(qs[p], 0, NPE), 0);
        start_query(2 * p + 1, slice(qs[p], NPE, qs[p].size() - NPE), 0);
      end
      wait_all(1);
      run_dbs();
      rd(1, 6'h20 + 6'(NG - 1), v);
      check(v == best(qs[0], d), $sformatf("pair 0 rep %0d", rep));
      rd(3, 6'h20 + 6'(NG - 1), v);
      check(v == best(qs[1], d2), $sformatf("pair 1 rep %0d", rep));
      n_extend++;

      // multi: every FPGA on its own database, one query per group
      for (int f = 0; f < NF; f++) begin
        chars_t dd, qq;
        db_select[f] = 1; score_select0[f] = 1;
        dd = random_chars(db_len / 4 + f, 4);
        store_db(f, dd);
        qq = new[NPE];
        for (int g = 0; g < NG; g++) begin
          parts[g] = random_chars(1 + $urandom % GS, 4);
          for (int i = 0; i < GS; i++) qq[g * GS + i] = (i < parts[g].size()) ? parts[g][i] : 0;
        end
        start_query(f, qq, ((1 << NG) - 1) << 1);
        wait_all(1);
        run_dbs();
        for (int g = 0; g < NG; g++) begin
          rd(f, 6'h20 + 6'(g), v);
          check(v == best(parts[g], dd), $sformatf("multi rep %0d fpga %0d group %0d", rep, f, g));
        end
      end
      n_multi++;
      n_indep++;
    end

    // configs: every arrangement of databases over the FPGAs
    set_gaps(10);
    for (int c = 0; c < (1 << (NF - 1)); c++) begin
      chars_t cq[NF], cd[NF];
      int lo[NF];
      int head = 0;
      for (int f = 0; f < NF; f++) begin
        bit starts = (f == 0) || c[f-1];
        db_select[f] = starts; score_select0[f] = starts;
        if (starts) head = f;
        lo[f] = head;
      end
      // one query and one database per chain, stored on its first FPGA
      for (int f = 0; f < NF; f++) begin
        if (lo[f] == f) begin
          int span = 1;
          while (f + span < NF && lo[f + span] == f) span++;
          cq[f] = random_chars((span - 1) * NPE + 1 + $urandom % NPE, 4);
          cd[f] = random_chars(db_len / 2 + f, 4);
          store_db(f, cd[f]);
        end
        start_query(f, slice(cq[lo[f]], (f - lo[f]) * NPE,
                             (f + 1 < NF && lo[f + 1] == lo[f]) ? NPE
                               : cq[lo[f]].size() - (f - lo[f]) * NPE), 0);
      end
      wait_all(1);
      run_dbs();
      for (int f = 0; f < NF; f++) begin
        if (f == NF - 1 || lo[f + 1] != lo[f]) begin
          rd(f, 6'h20 + 6'(NG - 1), v);
          check(v == best(cq[lo[f]], cd[lo[f]]),
                $sformatf("config %0d chain %0d..%0d: %0d expected %0d", c, lo[f], f, v,
                          best(cq[lo[f]], cd[lo[f]])));
        end
      end
      n_configs++;
    end

    check(n_bubbles > 0, "MultiPort stalls produced bubbles");
    check(n_multi > 0 && n_extend > 0 && n_reuse > 0 && n_indep > 0, "every mode ran");
    check(n_configs == (1 << (NF - 1)), "every database arrangement ran");
    $display("mechanisms: bubbles=%0d multi=%0d extend=%0d reuse=%0d independent=%0d arrangements=%0d",
             n_bubbles, n_multi, n_extend, n_reuse, n_indep, n_configs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
