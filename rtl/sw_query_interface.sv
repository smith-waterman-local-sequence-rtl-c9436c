// Query interface between the Query FIFO and the PE array.
//
// q_go first empties every PE (one-cycle q_clear), then pops q_size
// characters from the Query FIFO and sends them into the array, one per
// clock while the FIFO has data, character k with time-to-live k so that it
// settles in PE k.  Several queries are loaded in one go by packing them in
// the FIFO one after another, each starting at a group boundary (a multiple
// of 32 characters) and padded with code 0, which leaves a PE empty.
// q_done rises DRAIN_CYCLES after the last character has been sent, when it
// has surely reached its PE, and stays high until the next q_go.
//
// States: IDLE -> CLEAR -> LOAD -> DRAIN -> DONE.  Loading by
// time-to-live from a FIFO follows the document; the clear, the packing and
// the fixed drain time are this design's choices.
module sw_query_interface
  import sw_pkg::*;
#(
  parameter int unsigned DRAIN_CYCLES = 530   // >= PEs + link stages
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        q_go,
  input  logic [15:0] q_size,          // characters to load (<= PEs)
  // Query FIFO read port (show-ahead)
  output logic        fifo_rd,
  input  word_t       fifo_data,
  input  logic        fifo_empty,
  // to the array
  output logic        q_clear,
  output qload_t      q_out,
  output logic        q_done,
  output logic        busy
);

  typedef enum logic [2:0] {IDLE, CLEAR, LOAD, DRAIN, DONE} state_t;
  state_t state;

  logic [15:0] index;
  logic [15:0] wait_cnt;
  logic        ch_valid, take, more;
  char_t       ch;

  assign take = (state == LOAD) && ch_valid && (index != q_size);
  assign more = (state == LOAD) && ((index + 16'(take)) != q_size);

  sw_unpacker u_unpack (
    .clk, .rst,
    .flush    (state == CLEAR),
    .more,
    .src_data (fifo_data),
    .src_empty(fifo_empty),
    .src_rd   (fifo_rd),
    .ch_valid,
    .ch,
    .ch_take  (take)
  );

  assign q_clear = (state == CLEAR);
  assign q_done  = (state == DONE);
  assign busy    = (state != IDLE) && (state != DONE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= IDLE;
      index    <= '0;
      wait_cnt <= '0;
      q_out    <= '0;
    end else begin
      q_out <= '0;
      unique case (state)
        IDLE, DONE: if (q_go) state <= CLEAR;
        CLEAR: begin
          index <= '0;
          state <= (q_size == '0) ? DONE : LOAD;
        end
        LOAD: begin
          if (take) begin
            q_out.valid <= 1'b1;
            q_out.ch    <= ch;
            q_out.ttl   <= ttl_t'(index);
            index       <= index + 1'b1;
            if (index + 16'd1 == q_size) begin
              wait_cnt <= 16'(DRAIN_CYCLES);
              state    <= DRAIN;
            end
          end
        end
        DRAIN: begin
          wait_cnt <= wait_cnt - 1'b1;
          if (wait_cnt == 16'd1) state <= DONE;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
