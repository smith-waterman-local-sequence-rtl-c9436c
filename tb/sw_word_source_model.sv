// Behavioural model of a show-ahead word memory port, used for both the
// board-memory MultiPort (sequential reads that restart at the start
// address) and the Query FIFO.  The testbench fills it with push();
// `restart` rewinds the read pointer to the first word and keeps the port
// empty for a few cycles, as a flushed and refilling FIFO would.  With
// gap_pct > 0 the port also runs empty at random cycles.
module sw_word_source_model
  import sw_pkg::*;
#(
  parameter int DEPTH = 4096
) (
  input  logic  clk,
  input  logic  restart,
  input  logic  rd,
  output word_t data,
  output logic  empty
);
  word_t mem [DEPTH];
  int    wr_ptr = 0;
  int    rd_ptr = 0;
  int    refill = 0;
  int    gap_pct = 0;
  int    pops = 0;
  logic  stall = 1'b0;

  task automatic push(word_t w);
    mem[wr_ptr] = w;
    wr_ptr++;
  endtask

  task automatic clear();
    wr_ptr = 0;
    rd_ptr = 0;
  endtask

  assign empty = (rd_ptr >= wr_ptr) || (refill != 0) || stall;
  assign data  = (rd_ptr < wr_ptr) ? mem[rd_ptr] : '0;

  always @(posedge clk) begin
    if (rd && !empty) begin
      rd_ptr <= rd_ptr + 1;
      pops   <= pops + 1;
    end
    if (restart) begin
      rd_ptr <= 0;
      refill <= 4;
    end else if (refill != 0) begin
      refill <= refill - 1;
    end
    stall <= (gap_pct > 0) && (($urandom % 100) < gap_pct);
  end
endmodule
