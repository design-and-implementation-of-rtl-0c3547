// pon_mac: ONU downstream receiver (PON MAC).
//
// Takes the 16-bit words from the SerDes, which may be shifted by any number
// of bits, finds the header AAAA AAE2 with a stream_aligner, reads the
// payload length that follows, and writes the next ceil(length/2) words, the
// Ethernet frame, into the ONU downstream data buffer; the cycle after the
// last word it writes the length, which closes the packet. Then it searches
// again. Header and idle words never reach the buffer.
// A length of zero or above MAX_BYTES is taken as a false sync and ignored;
// a packet that does not fit the buffer is skipped and counted.
// Latency: a payload word reaches the buffer three clocks after it enters rx_word.
// Finding the delimiter after shifting the data into place and passing payload
// and length to the buffer follow the design; the length check and the drop
// rule are this design's own.
module pon_mac
  import dhpon_pkg::*;
#(
  parameter int unsigned AW        = 11,
  parameter int unsigned MAX_BYTES = 1526
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] rx_word,
  // downstream data buffer, write side
  output logic        wr_en,
  output logic [15:0] wr_data,
  output logic        wr_len_we,
  output logic [15:0] wr_len,
  input  logic [AW:0] wr_free_words,
  input  logic        wr_len_full,
  // status
  output logic        locked,
  output logic [3:0]  bit_offset,
  output logic [15:0] frames_ok,
  output logic [15:0] frames_dropped
);

  typedef enum logic [1:0] {S_SEARCH, S_LEN, S_PAY, S_COMMIT} state_t;
  state_t      state;
  logic        found, skip;
  logic [15:0] aligned, len, left;

  stream_aligner #(.PREV(PSYNC_WORD), .CUR_VAL({PSYNC_WORD[15:8], DELIM}),
                   .CUR_MASK(16'hFFFF)) u_align (
    .clk(clk), .rst_n(rst_n), .din(rx_word), .search(state == S_SEARCH),
    .found(found), .found_word(), .offset(bit_offset), .dout(aligned)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_SEARCH;
      len            <= '0;
      left           <= '0;
      skip           <= 1'b0;
      frames_ok      <= '0;
      frames_dropped <= '0;
    end else begin
      unique case (state)
        S_SEARCH: if (found) state <= S_LEN;
        S_LEN: begin
          len  <= aligned;
          left <= words_of(aligned);
          if (aligned == 16'd0 || aligned > 16'(MAX_BYTES)) begin
            state <= S_SEARCH;
          end else begin
            skip  <= (wr_free_words < (AW+1)'(words_of(aligned))) || wr_len_full;
            state <= S_PAY;
          end
        end
        S_PAY: begin
          left <= left - 1'b1;
          if (left == 16'd1) state <= S_COMMIT;
        end
        S_COMMIT: begin
          if (skip) frames_dropped <= frames_dropped + 1'b1;
          else      frames_ok      <= frames_ok + 1'b1;
          state <= S_SEARCH;
        end
        default: state <= S_SEARCH;
      endcase
    end
  end

  assign wr_en     = (state == S_PAY) && !skip;
  assign wr_data   = aligned;
  assign wr_len_we = (state == S_COMMIT) && !skip;
  assign wr_len    = len;
  assign locked    = (state != S_SEARCH);

endmodule
