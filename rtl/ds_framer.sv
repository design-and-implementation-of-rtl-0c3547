// ds_framer: OLT downstream framer.
//
// For each packet waiting in the downstream data buffer it sends, as 16-bit
// words at the SerDes clock (77.76 MHz, 1.25 Gb/s): AAAA, AAE2, the payload
// length in bytes, then the payload words as stored (the Ethernet frame with
// its preamble and SFD). Between packets the line carries idle words 5555,
// at least GAP_WORDS of them. tx_word is registered; the first header word
// appears two clocks after a length becomes visible at the buffer.
// The header (3-byte PSYNC AAAAAA, delimiter E2, 2-byte length) follows the
// design, and so does the idle word 5555, which is what the original's
// measured line shows between frames; the minimum gap is this design's own.
module ds_framer
  import dhpon_pkg::*;
#(
  parameter int unsigned GAP_WORDS = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  // downstream data buffer, read side
  input  logic        rd_len_valid,
  input  logic [15:0] rd_len,
  output logic        rd_len_pop,
  input  logic        rd_word_valid,
  input  logic [15:0] rd_word,
  output logic        rd_word_pop,
  // to the SerDes
  output logic [15:0] tx_word,
  output logic [15:0] frames_sent,
  output logic [15:0] underruns
);

  typedef enum logic [1:0] {S_IDLE, S_HDR, S_PAY, S_GAP} state_t;
  state_t      state;
  logic [15:0] len, left;
  logic [1:0]  hidx;
  logic [15:0] gap;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_GAP;
      tx_word     <= IDLE_WORD;
      len         <= '0;
      left        <= '0;
      hidx        <= '0;
      gap         <= '0;
      frames_sent <= '0;
      underruns   <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          tx_word <= IDLE_WORD;
          if (rd_len_valid) begin
            len   <= rd_len;
            left  <= words_of(rd_len);
            hidx  <= '0;
            state <= S_HDR;
          end
        end
        S_HDR: begin
          hidx <= hidx + 1'b1;
          unique case (hidx)
            2'd0:    tx_word <= PSYNC_WORD;
            2'd1:    tx_word <= {PSYNC_WORD[15:8], DELIM};
            default: begin
              tx_word <= len;
              state   <= (left == 0) ? S_GAP : S_PAY;
              gap     <= '0;
            end
          endcase
        end
        S_PAY: begin
          tx_word <= rd_word;
          if (!rd_word_valid) underruns <= underruns + 1'b1;
          left <= left - 1'b1;
          if (left == 16'd1) begin
            state       <= S_GAP;
            gap         <= '0;
            frames_sent <= frames_sent + 1'b1;
          end
        end
        S_GAP: begin
          tx_word <= IDLE_WORD;
          gap     <= gap + 1'b1;
          if (gap + 1 >= 16'(GAP_WORDS)) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign rd_word_pop = (state == S_PAY) && rd_word_valid;
  assign rd_len_pop  = (state == S_HDR) && (hidx == 2'd2);

endmodule
