// Testbench of sw_fpga at 4 groups of 8 PEs, driven only through its pins:
// the host register port, behavioural Query FIFO and MultiPort models, and
// the go/done handshakes.  Checks the example matrix (best score 8), several
// queries per load read from the MAX_SCORE registers, repeated passes over
// one stored database with new query loads, MultiPort stalls, and the
// duration of a pass (characters + bubbles + array latency).
module tb_sw_fpga;
  import sw_pkg::*;
  import sw_ref_pkg::*;

  localparam int NG = 4, GS = 8, NPE = NG * GS;

  logic        clk = 0, rst = 1;
  logic        reg_wr = 0;
  logic [5:0]  reg_addr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  logic        q_fifo_rd, q_fifo_empty, mp_restart, mp_rd, mp_empty;
  word_t       q_fifo_data, mp_data;
  logic        db_select = 1, db_go = 0, db_done, score_select0 = 1, q_go = 0, q_done;
  sw_link_t    peg_in, peg_out;
  int checks = 0, failures = 0;

  sw_fpga #(.NUM_GROUPS(NG), .GROUP_SIZE(GS)) dut (.*);
  sw_word_source_model #(.DEPTH(1024)) qf (
    .clk, .restart(1'b0), .rd(q_fifo_rd), .data(q_fifo_data), .empty(q_fifo_empty));
  sw_word_source_model #(.DEPTH(1024)) mp (
    .clk, .restart(mp_restart), .rd(mp_rd), .data(mp_data), .empty(mp_empty));

  assign peg_in = '0;
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  task automatic rd(logic [5:0] a, output logic [31:0] d);
    reg_addr = a; #1 d = reg_rdata;
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

  task automatic load_query(chars_t c);
    push_chars(c, 0);
    wr(6'h05, c.size());
    q_go = 1; @(posedge clk); #1; q_go = 0;
    wait (q_done); @(posedge clk); #1;
  endtask

  int pass_cycles;
  task automatic run_db();
    int t = 0;
    db_go = 1; @(posedge clk); #1; db_go = 0;
    while (!db_done) begin @(posedge clk); #1; t++; end
    pass_cycles = t;
  endtask

  initial begin
    chars_t q, d, qa, q0, q1, q2;
    logic [31:0] v;
    int exp, bubbles0;
    repeat (3) @(posedge clk);
    #1 rst = 0;

    // example matrix
    wr(6'h07, 0);
    d = from_string("ACGAACCCTTGC");
    push_chars(d, 1);
    wr(6'h06, d.size());
    load_query(from_string("ACGTATGC"));
    run_db();
    rd(6'h20, v);
    check(v == 8, $sformatf("example best score %0d, expected 8", v));
    // restart, 12 characters, array latency NPE + NG + 1, a few control cycles
    check(pass_cycles == 1 + 1 + 12 + NPE + NG + 1 + 1 + 4,
          $sformatf("pass took %0d cycles", pass_cycles));

    // a longer database stored once, then several query loads against it
    mp.clear();
    d = random_chars(300, 4);
    push_chars(d, 1);
    wr(6'h06, d.size());
    for (int r = 0; r < 5; r++) begin
      if (r >= 2) mp.gap_pct = 20;
      if (r == 4) begin wr(6'h01, 3); wr(6'h02, 2); wr(6'h03, 3); wr(6'h04, 1); end
      // queries: q0 in group 0, q1 in groups 1-2, q2 in group 3
      q0 = random_chars(1 + $urandom % GS, 4);
      q1 = random_chars(GS + 1 + $urandom % GS, 4);
      q2 = random_chars(1 + $urandom % GS, 4);
      qa = new[NPE];
      foreach (qa[i]) qa[i] = 0;
      foreach (q0[i]) qa[i] = q0[i];
      foreach (q1[i]) qa[GS + i] = q1[i];
      foreach (q2[i]) qa[3*GS + i] = q2[i];
      wr(6'h07, 32'b01010);    // new queries after groups 0 and 2
      load_query(qa);
      bubbles0 = 0;
      run_db();
      check(pass_cycles >= 300 + NPE + NG, "pass length");
      if (r < 2) check(pass_cycles == 1 + 1 + 4 + 300 + NPE + NG + 1 + 1, "full-rate pass");
      rd(6'h01, v); exp = int'(v);
      begin
        int mm, go, ge;
        rd(6'h02, v); mm = int'(v);
        rd(6'h03, v); go = int'(v);
        rd(6'h04, v); ge = int'(v);
        rd(6'h20, v); check(int'(v) == sw_best(q0, d, exp, mm, go, ge), $sformatf("load %0d q0", r));
        rd(6'h22, v); check(int'(v) == sw_best(q1, d, exp, mm, go, ge), $sformatf("load %0d q1", r));
        rd(6'h23, v); check(int'(v) == sw_best(q2, d, exp, mm, go, ge), $sformatf("load %0d q2", r));
      end
      rd(6'h00, v);
      check(v[3:2] == 2'b11, "status shows both done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
