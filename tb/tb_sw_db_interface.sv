// Testbench of sw_db_interface with a behavioural MultiPort.  Checks the
// restart pulse, the character order and flags of each streamed database,
// one character per clock when the port never runs empty, bubbles when it
// does, repeated passes over the same database, and db_done following the
// array's last-beat report (including a pass continued from a neighbour).
module tb_sw_db_interface;
  import sw_pkg::*;

  logic        clk = 0, rst = 1;
  logic        db_go = 0, array_last = 0, db_select = 1;
  logic [31:0] db_len;
  logic        mp_restart, mp_rd, mp_empty, db_done, busy;
  word_t       mp_data;
  db_beat_t    db_out;
  int checks = 0, failures = 0;

  sw_db_interface dut (.*);
  sw_word_source_model #(.DEPTH(256)) mp (
    .clk, .restart(mp_restart), .rd(mp_rd), .data(mp_data), .empty(mp_empty));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  int unsigned chars [$];
  int restarts = 0;
  always @(posedge clk) if (!rst && mp_restart) restarts++;

  // one pass: returns the number of cycles from the first to the last beat
  task automatic pass(int len, output int span, output int bubbles);
    int got = 0, t0 = 0, cyc = 0;
    bubbles = 0;
    db_len = len;
    db_go = 1;
    @(posedge clk); #1;
    db_go = 0;
    while (got < len) begin
      @(posedge clk); #1;
      cyc++;
      check(!db_done, "no done while streaming");
      if (db_out.valid) begin
        if (got == 0) t0 = cyc;
        check(db_out.ch == char_t'(chars[got]), $sformatf("char %0d", got));
        check(db_out.first == (got == 0), "first flag");
        check(db_out.last == (got == len - 1), "last flag");
        got++;
      end else if (got > 0) begin
        bubbles++;
      end
    end
    span = cyc - t0 + 1;
    repeat (5) begin
      @(posedge clk); #1;
      check(!db_out.valid, "nothing after the last beat");
      check(!db_done, "done waits for the array");
    end
    array_last = 1;
    @(posedge clk); #1;
    array_last = 0;
    check(db_done, "done after the array's last beat");
    @(posedge clk); #1;
    check(db_done, "done stays high");
  endtask

  initial begin
    int span, bubbles, total_bubbles = 0;
    word_t w;
    db_len = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // a database of 100 words of random letters
    for (int i = 0; i < 100; i++) begin
      w = '0;
      for (int k = 0; k < CHARS_PER_WORD; k++) begin
        chars.push_back(1 + $urandom % 26);
        w[k*CHAR_W +: CHAR_W] = char_t'(chars[$]);
      end
      mp.push(w);
    end
    // full rate
    pass(500, span, bubbles);
    check(span == 500, $sformatf("500 characters in %0d cycles", span));
    check(restarts == 1, $sformatf("one restart per pass (%0d)", restarts));
    // same database again, odd length
    pass(37, span, bubbles);
    check(span == 37, "full rate on the second pass");
    check(restarts == 2, "restart on the second pass");
    // port running empty at random
    mp.gap_pct = 30;
    for (int r = 0; r < 4; r++) begin
      pass(100 + r * 97, span, bubbles);
      total_bubbles += bubbles;
      check(span == 100 + r * 97 + bubbles, "span counts characters and bubbles");
    end
    check(total_bubbles > 0, "port stalls produced bubbles");
    // a database continued from the neighbour: no restart, no beats, done
    // only when the neighbour's last beat has come through
    db_select = 0;
    db_go = 1; @(posedge clk); #1; db_go = 0;
    check(!db_done, "continuing pass clears done");
    repeat (10) begin
      @(posedge clk); #1;
      check(!db_done && !db_out.valid && !mp_restart, "continuing pass waits");
    end
    array_last = 1; @(posedge clk); #1; array_last = 0;
    check(db_done, "continuing pass done on the array's last beat");
    check(restarts == 6, "no restart when continuing");
    db_select = 1;
    db_go = 1; @(posedge clk); #1; db_go = 0;
    db_len = 0;
    repeat (3) @(posedge clk);
    #1;
    check(db_done, "zero-length pass completes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
