// Full-size testbench of sw_board with its default parameters: four FPGAs
// of 16 groups of 32 PEs.  Runs the shared scenarios once (example matrix,
// a query of up to 2048 characters over all four FPGAs, database reuse,
// FPGA pairs, sixteen queries per FPGA) against databases of 120 characters.
module tb_sw_board_full;
  import sw_pkg::*;
  import sw_ref_pkg::*;

  localparam int NF = 4, NG = 16, GS = 32;

  `include "sw_board_tb_body.svh"

  sw_board dut (.*);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial run_scenarios(1, 120);
endmodule
