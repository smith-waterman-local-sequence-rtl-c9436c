// Testbench of sw_group_link: random inputs; checks the one-cycle register,
// the new-query defaults (S = 0, H = -eog, max = 0), the database-source
// select and the untouched query-loading bundle.
module tb_sw_group_link;
  import sw_pkg::*;

  logic     clk = 0, rst = 1;
  cfg_t     gap_open;
  logic     new_query, use_alt_db;
  db_beat_t alt_db;
  sw_link_t up, down;
  qload_t   q_up, q_down;
  int checks = 0, failures = 0;

  sw_group_link dut (.*);

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
    sw_link_t e_down;
    qload_t   e_q;
    up = '0; q_up = '0; alt_db = '0; new_query = 0; use_alt_db = 0; gap_open = 8'd3;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 400; i++) begin
      up        = sw_link_t'({$urandom, $urandom, $urandom});
      q_up      = qload_t'($urandom);
      alt_db    = db_beat_t'($urandom);
      new_query = $urandom % 2;
      use_alt_db = $urandom % 2;
      gap_open  = cfg_t'($urandom);
      e_down    = up;
      if (use_alt_db) e_down.db = alt_db;
      if (new_query) begin
        e_down.s = 0; e_down.h = -score_t'(gap_open); e_down.max = 0;
      end
      e_q = q_up;
      @(posedge clk); #1;
      check(down == e_down, $sformatf("link output cycle %0d", i));
      check(q_down == e_q, "query bundle passes");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
