// Testbench of sw_status_regs: reset values, write/read of every
// configuration register, the configuration outputs, the read-only status
// word and the max-score window, and that writes to read-only addresses
// change nothing.
module tb_sw_status_regs;
  import sw_pkg::*;

  localparam int NG = 16;

  logic        clk = 0, rst = 1, reg_wr = 0;
  logic [5:0]  reg_addr;
  logic [31:0] reg_wdata, reg_rdata;
  logic        db_select, score_select0, db_done, q_done, db_busy, q_busy;
  score_t      max_score [NG];
  sw_cfg_t     cfg;
  logic [15:0] q_size;
  logic [31:0] db_len;
  logic [NG:1] score_select;
  int checks = 0, failures = 0;

  sw_status_regs #(.NUM_GROUPS(NG)) dut (.*);

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

  task automatic wr(logic [5:0] a, logic [31:0] d);
    reg_addr = a; reg_wdata = d; reg_wr = 1;
    @(posedge clk); #1;
    reg_wr = 0;
  endtask

  initial begin
    reg_addr = 0; reg_wdata = 0;
    {db_select, score_select0, db_done, q_done, db_busy, q_busy} = '0;
    foreach (max_score[g]) max_score[g] = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check(cfg == '{match: 2, mismatch: 1, gap_open: 2, gap_ext: 1}, "reset scoring values");
    reg_addr = 6'h01; #1 check(reg_rdata == 2, "MATCH reset");
    for (int r = 0; r < 50; r++) begin
      logic [31:0] m, mm, go, ge, qs, dl, ss;
      m = $urandom % 256; mm = $urandom % 256; go = $urandom % 256; ge = $urandom % 256;
      qs = $urandom % 65536; dl = $urandom; ss = $urandom;
      wr(6'h01, m); wr(6'h02, mm); wr(6'h03, go); wr(6'h04, ge);
      wr(6'h05, qs); wr(6'h06, dl); wr(6'h07, ss);
      wr(6'h00, 32'hFFFF_FFFF); wr(6'h20, 32'h1234);   // read-only: ignored
      check(cfg.match == m[7:0] && cfg.mismatch == mm[7:0] && cfg.gap_open == go[7:0]
            && cfg.gap_ext == ge[7:0], "scoring outputs");
      check(q_size == qs[15:0] && db_len == dl, "sizes");
      check(score_select == ss[NG:1], "score select output");
      score_select0 = $urandom % 2;
      db_select = $urandom % 2; db_done = $urandom % 2; q_done = $urandom % 2;
      db_busy = $urandom % 2; q_busy = $urandom % 2;
      foreach (max_score[g]) max_score[g] = score_t'($urandom % 100000);
      reg_addr = 6'h01; #1 check(reg_rdata == m[7:0], "MATCH read");
      reg_addr = 6'h02; #1 check(reg_rdata == mm[7:0], "MISMATCH read");
      reg_addr = 6'h03; #1 check(reg_rdata == go[7:0], "GAP_OPEN read");
      reg_addr = 6'h04; #1 check(reg_rdata == ge[7:0], "GAP_EXT read");
      reg_addr = 6'h05; #1 check(reg_rdata == qs[15:0], "QUERY_SIZE read");
      reg_addr = 6'h06; #1 check(reg_rdata == dl, "DB_LEN read");
      reg_addr = 6'h07; #1 check(reg_rdata == 32'({ss[NG:1], score_select0}), "SCORE_SEL read");
      reg_addr = 6'h00; #1 check(reg_rdata == {26'b0, q_busy, db_busy, q_done, db_done, score_select0, db_select}, "STATUS read");
      for (int g = 0; g < NG; g++) begin
        reg_addr = 6'h20 + 6'(g); #1
        check(reg_rdata == 32'(max_score[g]), $sformatf("MAX_SCORE %0d read", g));
      end
      reg_addr = 6'h10; #1 check(reg_rdata == 0, "unused address reads 0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
