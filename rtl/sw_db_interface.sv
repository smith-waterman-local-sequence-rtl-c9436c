// Database interface between the MultiPort memory port and the PE array.
//
// db_go restarts the MultiPort at the database start address (one-cycle
// mp_restart pulse, which flushes the port's FIFO and refills it from the
// start), then streams db_len characters into the array, one per clock
// whenever the port has data and a bubble (invalid beat) when it runs
// empty.  The first character is flagged `first`, which makes every PE start
// a fresh score matrix, and the last is flagged `last`.  Because the
// database stays in board memory, the same database can be streamed again
// for the next query load with another db_go and no host transfer.
//
// db_done rises when the array reports that the last beat has reached the
// final max register (array_last) and stays high until the next db_go.  On
// an FPGA that continues the database of its left neighbour (db_select = 0)
// db_go streams nothing: it only clears db_done and waits for the last beat
// of the neighbour's database to come through.
//
// States: IDLE -> RESTART -> STREAM -> DRAIN -> DONE.  The restart,
// one-character-per-clock streaming and done signal follow the document; the
// state machine itself is this design's (the document's 20-state protocol
// is not given).
module sw_db_interface
  import sw_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        db_go,
  input  logic        db_select,    // 1: stream the local database
  input  logic [31:0] db_len,       // characters in the database
  // MultiPort read port (show-ahead)
  output logic        mp_restart,
  output logic        mp_rd,
  input  word_t       mp_data,
  input  logic        mp_empty,
  // to the array
  output db_beat_t    db_out,
  input  logic        array_last,
  output logic        db_done,
  output logic        busy
);

  typedef enum logic [2:0] {IDLE, RESTART, STREAM, DRAIN, DONE} state_t;
  state_t state;

  logic [31:0] remaining;
  logic        first_pend;
  logic        ch_valid, take, more;
  char_t       ch;

  assign take = (state == STREAM) && ch_valid && (remaining != '0);
  assign more = (state == STREAM) && ((remaining - 32'(take)) != '0);

  sw_unpacker u_unpack (
    .clk, .rst,
    .flush   (state == RESTART),
    .more,
    .src_data(mp_data),
    .src_empty(mp_empty),
    .src_rd  (mp_rd),
    .ch_valid,
    .ch,
    .ch_take (take)
  );

  assign mp_restart = (state == RESTART);
  assign db_done    = (state == DONE);
  assign busy       = (state != IDLE) && (state != DONE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= IDLE;
      remaining  <= '0;
      first_pend <= 1'b0;
      db_out     <= '0;
    end else begin
      db_out <= '0;
      unique case (state)
        IDLE, DONE: begin
          if (db_go) state <= db_select ? RESTART : DRAIN;
        end
        RESTART: begin
          remaining  <= db_len;
          first_pend <= 1'b1;
          state      <= (db_len == '0) ? DONE : STREAM;
        end
        STREAM: begin
          if (take) begin
            db_out.valid <= 1'b1;
            db_out.first <= first_pend;
            db_out.last  <= (remaining == 32'd1);
            db_out.ch    <= ch;
            first_pend   <= 1'b0;
            remaining    <= remaining - 1'b1;
            if (remaining == 32'd1) state <= DRAIN;
          end
        end
        DRAIN: begin
          if (array_last) state <= DONE;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
