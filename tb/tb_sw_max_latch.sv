// Testbench of sw_max_latch: random database passes with bubbles; checks
// that the register reloads on the first beat, keeps the running maximum
// of valid beats only, and pulses last_seen once after the last beat.
module tb_sw_max_latch;
  import sw_pkg::*;

  logic     clk = 0, rst = 1;
  sw_link_t in;
  score_t   max_score;
  logic     last_seen;
  int checks = 0, failures = 0;

  sw_max_latch dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int exp_max, len;
    in = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int pass = 0; pass < 8; pass++) begin
      len = 5 + $urandom % 40;
      exp_max = 0;
      for (int r = 0; r < len; r++) begin
        int m;
        bit v;
        v = (r == 0) || (r == len - 1) || ($urandom % 4 != 0);
        m = $urandom % 200;
        in = '0;
        in.db.valid = v;
        in.db.first = (r == 0);
        in.db.last  = (r == len - 1);
        in.max      = score_t'(m);
        if (v) exp_max = (r == 0) ? m : (m > exp_max ? m : exp_max);
        @(posedge clk); #1;
        check(int'(max_score) == exp_max, $sformatf("pass %0d row %0d max %0d exp %0d", pass, r, max_score, exp_max));
        check(last_seen == (r == len - 1), "last_seen timing");
      end
      in = '0;
      @(posedge clk); #1;
      check(!last_seen, "last_seen is a pulse");
      check(int'(max_score) == exp_max, "holds after the pass");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
