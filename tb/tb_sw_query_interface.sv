// Testbench of sw_query_interface with a behavioural Query FIFO.  Checks
// the clear pulse, that character k leaves with time-to-live k in FIFO
// order, one per clock when the FIFO has data, that exactly the needed
// words are popped (the next load starts on a fresh word), and the q_done
// delay of DRAIN_CYCLES after the last character.
module tb_sw_query_interface;
  import sw_pkg::*;

  localparam int DRAIN = 20;

  logic        clk = 0, rst = 1, q_go = 0;
  logic [15:0] q_size;
  logic        fifo_rd, fifo_empty, q_clear, q_done, busy;
  word_t       fifo_data;
  qload_t      q_out;
  int checks = 0, failures = 0;

  sw_query_interface #(.DRAIN_CYCLES(DRAIN)) dut (.*);
  sw_word_source_model #(.DEPTH(512)) fifo (
    .clk, .restart(1'b0), .rd(fifo_rd), .data(fifo_data), .empty(fifo_empty));

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

  // push a query of len characters, padded to whole words
  task automatic put_query(int len, ref int unsigned q[$]);
    word_t w;
    int n = 0;
    q.delete();
    while (n < len) begin
      w = '0;
      for (int k = 0; k < CHARS_PER_WORD; k++) begin
        if (n < len) begin
          q.push_back($urandom % 27);
          w[k*CHAR_W +: CHAR_W] = char_t'(q[$]);
          n++;
        end else begin
          w[k*CHAR_W +: CHAR_W] = char_t'(31);   // junk after the query
        end
      end
      fifo.push(w);
    end
  endtask

  initial begin
    int unsigned q[$];
    int got, cyc, t0, t_last, pops0;
    q_size = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int r = 0; r < 8; r++) begin
      int len = (r == 0) ? 24 : 1 + $urandom % 100;
      fifo.gap_pct = (r < 2) ? 0 : 25;
      put_query(len, q);
      pops0 = fifo.pops;
      q_size = 16'(len);
      q_go = 1;
      @(posedge clk); #1;
      q_go = 0;
      check(q_clear, "clear pulse first");
      got = 0; cyc = 0; t0 = 0; t_last = 0;
      while (!q_done && cyc < 1000) begin
        @(posedge clk); #1;
        cyc++;
        check(!q_clear, "clear lasts one cycle");
        if (q_out.valid) begin
          if (got == 0) t0 = cyc;
          check(got < len && q_out.ch == char_t'(q[got]) && q_out.ttl == ttl_t'(got),
                $sformatf("load %0d char %0d", r, got));
          got++;
          t_last = cyc;
        end
      end
      check(got == len, $sformatf("load %0d: %0d characters sent, expected %0d", r, got, len));
      check(cyc - t_last == DRAIN, $sformatf("q_done %0d cycles after the last character", cyc - t_last));
      if (r < 2) check(t_last - t0 + 1 == len, "one character per clock");
      check(fifo.pops - pops0 == (len + CHARS_PER_WORD - 1) / CHARS_PER_WORD, "words popped");
      @(posedge clk); #1;
      check(q_done, "q_done holds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
