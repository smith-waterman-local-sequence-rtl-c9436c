// End-to-end testbench of sw_board at reduced size: four FPGAs of 2 groups
// of 8 PEs.  The scenarios are in sw_board_tb_body.svh: the example matrix,
// one query extended over all four FPGAs, database reuse, two FPGA pairs,
// one query per group on every FPGA, and all eight database arrangements,
// with MultiPort stalls.
module tb_sw_board;
  import sw_pkg::*;
  import sw_ref_pkg::*;

  localparam int NF = 4, NG = 2, GS = 8;

  `include "sw_board_tb_body.svh"

  sw_board #(.NUM_FPGA(NF), .NUM_GROUPS(NG), .GROUP_SIZE(GS)) dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial run_scenarios(3, 120);
endmodule
