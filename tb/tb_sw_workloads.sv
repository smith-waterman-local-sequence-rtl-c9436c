// Workload testbench on one full-size sw_fpga (16 groups of 32 PEs),
// with the memories as behavioural models.  Two evaluation workloads, with
// database lengths scaled down to keep the simulation short:
//   long query  one 512-character query against a 3000-character database
//               (evaluated at 16 MB)
//   batch       a batch of short DNA queries (all shorter than 128
//               characters, like the evaluation's micro-RNA batch) packed
//               several per load on 32-PE group boundaries, against one
//               stored 1500-character database that is rewound for each
//               load (evaluated against a 250 MB chromosome)
// Every score is compared with the reference model; the pass time is
// checked against characters + bubbles + array latency.
module tb_sw_workloads;
  import sw_pkg::*;
  import sw_ref_pkg::*;

  localparam int NG = 16, GS = 32, NPE = NG * GS;

  logic        clk = 0, rst = 1;
  logic        reg_wr = 0;
  logic [5:0]  reg_addr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  logic        q_fifo_rd, q_fifo_empty, mp_restart, mp_rd, mp_empty;
  word_t       q_fifo_data, mp_data;
  logic        db_select = 1, db_go = 0, db_done, score_select0 = 1, q_go = 0, q_done;
  sw_link_t    peg_in, peg_out;
  int checks = 0, failures = 0;
  int n_loads = 0, n_queries = 0, n_bubbles = 0;

  sw_fpga dut (.*);
  sw_word_source_model #(.DEPTH(2048)) qf (
    .clk, .restart(1'b0), .rd(q_fifo_rd), .data(q_fifo_data), .empty(q_fifo_empty));
  sw_word_source_model #(.DEPTH(2048)) mp (
    .clk, .restart(mp_restart), .rd(mp_rd), .data(mp_data), .empty(mp_empty));

  assign peg_in = '0;
  always #5 clk = ~clk;

  logic in_pass = 0;
  always @(posedge clk) begin
    if (peg_out.db.valid && peg_out.db.first) in_pass <= 1;
    if (peg_out.db.valid && peg_out.db.last)  in_pass <= 0;
    if (in_pass && !peg_out.db.valid) n_bubbles++;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(logic [5:0] a, logic [31:0] d);
    reg_addr = a; reg_wdata = d; reg_wr = 1;
    @(posedge clk); #1;
    reg_wr = 0;
  endtask

  task automatic rd(logic [5:0] a, output int d);
    reg_addr = a; #1 d = int'(reg_rdata);
  endtask

  task automatic push_chars(chars_t c, bit to_mp);
    word_t w;
    for (int i = 0; i < c.size(); i += CHARS_PER_WORD) begin
      w = '0;
      for (int k = 0; k < CHARS_PER_WORD && i + k < c.size(); k++)
        w[k*CHAR_W +: CHAR_W] = char_t'(c[i + k]);
      if (to_mp) mp.push(w); else qf.push(w);
    end
  endtask

  task automatic load_query(chars_t c, int ssel);
    push_chars(c, 0);
    wr(6'h05, c.size());
    wr(6'h07, ssel);
    q_go = 1; @(posedge clk); #1; q_go = 0;
    wait (q_done); @(posedge clk); #1;
    n_loads++;
  endtask

  int pass_cycles;
  task automatic run_db();
    int t = 0;
    db_go = 1; @(posedge clk); #1; db_go = 0;
    while (!db_done) begin @(posedge clk); #1; t++; end
    pass_cycles = t;
  endtask

  initial begin
    chars_t q, d, qs[$], packed_q;
    int v, g, first_group[$], last_group[$], b0;
    repeat (3) @(posedge clk);
    #1 rst = 0;

    // long query: 512 characters, protein-like 20-letter alphabet
    q = random_chars(NPE, 20);
    d = random_chars(3000, 20);
    push_chars(d, 1);
    wr(6'h06, d.size());
    load_query(q, 0);
    run_db();
    rd(6'h20 + 6'(NG - 1), v);
    check(v == sw_best(q, d, 2, 1, 2, 1), $sformatf("512-character query: %0d expected %0d", v, sw_best(q, d, 2, 1, 2, 1)));
    check(pass_cycles == 1 + 1 + 4 + 3000 + NPE + NG + 1 + 1, $sformatf("pass of %0d cycles", pass_cycles));
    n_queries++;

    // batch of short DNA queries against one stored database
    mp.clear();
    d = random_chars(1500, 4);
    push_chars(d, 1);
    wr(6'h06, d.size());
    mp.gap_pct = 10;
    for (int load = 0; load < 4; load++) begin
      int ssel = 0;
      qs.delete(); first_group.delete(); last_group.delete();
      packed_q = new[NPE];
      foreach (packed_q[i]) packed_q[i] = 0;
      g = 0;
      while (1) begin
        int len = 10 + $urandom % 118;          // shorter than 128
        int ng = (len + GS - 1) / GS;
        if (g + ng > NG) break;
        q = random_chars(len, 4);
        qs.push_back(q);
        first_group.push_back(g);
        last_group.push_back(g + ng - 1);
        foreach (q[i]) packed_q[g * GS + i] = q[i];
        if (g > 0) ssel |= 1 << g;              // new query at link g
        g += ng;
      end
      load_query(packed_q, ssel);
      b0 = n_bubbles;
      run_db();
      check(pass_cycles == 1 + 1 + 4 + 1500 + (n_bubbles - b0) + NPE + NG + 1 + 1,
            $sformatf("load %0d pass of %0d cycles", load, pass_cycles));
      foreach (qs[k]) begin
        rd(6'h20 + 6'(last_group[k]), v);
        check(v == sw_best(qs[k], d, 2, 1, 2, 1),
              $sformatf("load %0d query %0d (groups %0d..%0d): %0d expected %0d", load, k,
                        first_group[k], last_group[k], v, sw_best(qs[k], d, 2, 1, 2, 1)));
        n_queries++;
      end
    end
    check(n_bubbles > 0, "MultiPort stalls occurred");
    $display("workloads: %0d queries in %0d loads, %0d bubbles", n_queries, n_loads, n_bubbles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
