// Serializer from packed memory words to 5-bit characters.
//
// Database and query memories deliver WORD_W-bit words holding
// CHARS_PER_WORD characters, character 0 in the low bits; the unused top
// bits are ignored.  The unpacker keeps one word and offers its characters
// one at a time (ch_valid/ch, consumed by ch_take).  When its last character
// is taken, or the buffer is empty, and the caller still needs characters
// (`more`), it pops the next word from a show-ahead source (src_empty low
// means src_data is valid; src_rd consumes it) in the same cycle, so a
// source that never runs empty yields one character per clock.  `flush`
// drops what is buffered.
//
// Packing order and word width are this design's choice; the document only
// says that the interfaces serialize parallel inputs.
module sw_unpacker
  import sw_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  flush,
  input  logic  more,       // characters are needed after this cycle's take
  input  word_t src_data,
  input  logic  src_empty,
  output logic  src_rd,
  output logic  ch_valid,
  output char_t ch,
  input  logic  ch_take
);

  localparam int unsigned CNT_W = $clog2(CHARS_PER_WORD + 1);

  word_t             wbuf;
  logic [CNT_W-1:0]  wleft;
  logic              drained;

  assign ch_valid = (wleft != '0);
  assign ch       = wbuf[CHAR_W-1:0];
  assign drained  = (wleft == '0) || (ch_take && wleft == CNT_W'(1));
  assign src_rd   = !flush && more && drained && !src_empty;

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      wleft <= '0;
      wbuf  <= '0;
    end else if (src_rd) begin
      wbuf  <= src_data;
      wleft <= CNT_W'(CHARS_PER_WORD);
    end else if (ch_take && ch_valid) begin
      wbuf  <= wbuf >> CHAR_W;
      wleft <= wleft - 1'b1;
    end
  end

endmodule
