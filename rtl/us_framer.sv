// us_framer: ONU upstream framer.
//
// Takes each Ethernet packet out of the upstream data buffer and cuts it into
// 268-byte payloads. Each payload is written to the queue data buffer as one
// 280-byte DHPON packet of 140 words:
//   5555 5555 5555 5555       8-byte preamble
//   {E2, ONU-ID}              delimiter and this ONU's number
//   {EOFB, length[14:0]}      payload bytes in this packet; EOFB = 1 on the
//                             last packet of an Ethernet packet
//   134 payload words, the unused tail of a short payload filled with 0000.
// A full payload thus carries 010C, the last one 8xxx. A packet is written
// one word per clock once the queue has room for one more DHPON packet.
// The format and the segmentation follow the design; the fill word is this
// design's own choice.
module us_framer
  import dhpon_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  onu_id,
  // upstream data buffer, read side
  input  logic        rd_len_valid,
  input  logic [15:0] rd_len,
  output logic        rd_len_pop,
  input  logic        rd_word_valid,
  input  logic [15:0] rd_word,
  output logic        rd_word_pop,
  // queue data buffer, write side
  output logic        q_wr,
  output logic [15:0] q_wdata,
  input  logic        q_room,          // space for one more DHPON packet
  // status
  output logic [15:0] segments,
  output logic [15:0] underruns
);

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_HDR, S_PAY} state_t;
  state_t      state;
  logic [15:0] rem;        // bytes of the Ethernet packet not yet framed
  logic [15:0] seg;        // bytes in the current payload
  logic [7:0]  widx;       // word index inside the DHPON packet
  logic        eofb;

  logic [15:0] seg_words;
  assign seg_words = words_of(seg);

  logic in_data;
  assign in_data = (state == S_PAY) && (16'(widx) - 16'(US_HDR_WORDS) < seg_words);

  assign rd_len_pop  = (state == S_IDLE) && rd_len_valid;
  assign rd_word_pop = in_data && rd_word_valid;

  always_comb begin
    q_wr    = (state == S_HDR) || (state == S_PAY);
    q_wdata = PAD_WORD;
    if (state == S_HDR) begin
      if (widx < 8'd4)       q_wdata = PREAMBLE_WORD;
      else if (widx == 8'd4) q_wdata = {DELIM, onu_id};
      else                   q_wdata = {eofb, seg[14:0]};
    end else if (in_data) begin
      q_wdata = rd_word;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      rem       <= '0;
      seg       <= '0;
      widx      <= '0;
      eofb      <= 1'b0;
      segments  <= '0;
      underruns <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (rd_len_valid && rd_len != 16'd0) begin
          rem   <= rd_len;
          state <= S_WAIT;
        end
        S_WAIT: if (q_room) begin
          if (rem > 16'(US_PAYLOAD_BYTES)) begin
            seg  <= 16'(US_PAYLOAD_BYTES);
            eofb <= 1'b0;
            rem  <= rem - 16'(US_PAYLOAD_BYTES);
          end else begin
            seg  <= rem;
            eofb <= 1'b1;
            rem  <= '0;
          end
          widx  <= '0;
          state <= S_HDR;
        end
        S_HDR: begin
          widx <= widx + 1'b1;
          if (widx == 8'(US_HDR_WORDS - 1)) state <= S_PAY;
        end
        S_PAY: begin
          if (in_data && !rd_word_valid) underruns <= underruns + 1'b1;
          widx <= widx + 1'b1;
          if (widx == 8'(US_PKT_WORDS - 1)) begin
            segments <= segments + 1'b1;
            state    <= (rem == 16'd0) ? S_IDLE : S_WAIT;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
