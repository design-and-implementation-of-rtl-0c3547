// pon_processor: OLT upstream receiver (PON processor).
//
// Takes the 16-bit words from the SerDes. Each upstream burst is one 280-byte
// DHPON packet and may arrive shifted by any number of bits, so every packet
// is searched for afresh: a stream_aligner finds the end of the preamble
// (5555) followed by the delimiter E2, whose word also carries the ONU-ID.
// The next word gives EOFB (bit 15) and the payload length; of the 134
// payload words the first ceil(length/2) are written into the buffer of that
// ONU (ONU-ID 1..NUM_ONU selects buffer 0..NUM_ONU-1), the fill is dropped.
// Payload lengths are summed per ONU; on a packet with EOFB set the sum, the
// length of the rebuilt Ethernet frame, is written to that buffer's length
// memory, which makes the frame available to the multiplexer.
// If, at the first packet of a frame, that ONU's buffer has no room for a
// frame of MAX_BYTES, the whole frame is dropped and counted. A packet with
// an unknown ONU-ID or a length over 268 is taken as a false sync.
// Alignment, reading ONU-ID and length, storing by ONU-ID and closing a frame
// on EOFB follow the design; the room check and drop rule are this design's own.
module pon_processor
  import dhpon_pkg::*;
#(
  parameter int unsigned NUM_ONU   = 4,
  parameter int unsigned AW        = 11,
  parameter int unsigned MAX_BYTES = 1526
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [15:0]        rx_word,
  // ONU buffers, write side
  output logic [NUM_ONU-1:0] wr_en,
  output logic [15:0]        wr_data,
  output logic [NUM_ONU-1:0] wr_len_we,
  output logic [15:0]        wr_len,
  input  logic [AW:0]        wr_free_words [NUM_ONU],
  input  logic [NUM_ONU-1:0] wr_len_full,
  // status
  output logic [7:0]         last_onu_id,
  output logic [15:0]        last_length,
  output logic [15:0]        packets_ok,
  output logic [15:0]        frames_ok,
  output logic [15:0]        frames_dropped
);

  localparam int unsigned IW = (NUM_ONU > 1) ? $clog2(NUM_ONU) : 1;
  localparam int unsigned MAX_WORDS = (MAX_BYTES + 1) / 2;

  typedef enum logic [1:0] {S_SEARCH, S_LEN, S_PAY, S_CLOSE} state_t;
  state_t      state;
  logic        found;
  logic [15:0] found_word, aligned;
  logic [IW-1:0] idx;
  logic [15:0] seg;
  logic        eofb;
  logic [7:0]  widx;
  logic [15:0] acc  [NUM_ONU];
  logic [NUM_ONU-1:0] drop;

  stream_aligner #(.PREV(PREAMBLE_WORD), .CUR_VAL({DELIM, 8'h00}),
                   .CUR_MASK(16'hFF00)) u_align (
    .clk(clk), .rst_n(rst_n), .din(rx_word), .search(state == S_SEARCH),
    .found(found), .found_word(found_word), .offset(), .dout(aligned)
  );

  logic id_ok;
  assign id_ok = (found_word[7:0] >= 8'd1) && (int'(found_word[7:0]) <= int'(NUM_ONU));

  logic writing;
  assign writing = (state == S_PAY) && (16'(widx) < words_of(seg)) && !drop[idx];

  always_comb begin
    wr_en     = '0;
    wr_len_we = '0;
    if (writing) wr_en[idx] = 1'b1;
    if (state == S_CLOSE && eofb && !drop[idx]) wr_len_we[idx] = 1'b1;
  end
  assign wr_data = aligned;
  assign wr_len  = acc[idx] + seg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_SEARCH;
      idx            <= '0;
      seg            <= '0;
      eofb           <= 1'b0;
      widx           <= '0;
      drop           <= '0;
      last_onu_id    <= '0;
      last_length    <= '0;
      packets_ok     <= '0;
      frames_ok      <= '0;
      frames_dropped <= '0;
      for (int i = 0; i < int'(NUM_ONU); i++) acc[i] <= '0;
    end else begin
      unique case (state)
        S_SEARCH: if (found && id_ok) begin
          idx   <= IW'(found_word[7:0] - 8'd1);
          state <= S_LEN;
        end
        S_LEN: begin
          eofb <= aligned[EOFB_BIT];
          seg  <= {1'b0, aligned[14:0]};
          widx <= '0;
          if (aligned[14:0] == 15'd0 || aligned[14:0] > 15'(US_PAYLOAD_BYTES)) begin
            state <= S_SEARCH;
          end else begin
            state <= S_PAY;
            // first packet of a frame: make sure the whole frame will fit
            if (acc[idx] == 16'd0)
              drop[idx] <= (wr_free_words[idx] < (AW+1)'(MAX_WORDS)) || wr_len_full[idx];
          end
        end
        S_PAY: begin
          widx <= widx + 1'b1;
          if (widx == 8'(US_PAYLOAD_WORDS - 1)) state <= S_CLOSE;
        end
        S_CLOSE: begin
          packets_ok  <= packets_ok + 1'b1;
          last_onu_id <= 8'(idx) + 8'd1;
          last_length <= {eofb, seg[14:0]};
          if (eofb) begin
            acc[idx] <= '0;
            if (drop[idx]) frames_dropped <= frames_dropped + 1'b1;
            else           frames_ok      <= frames_ok + 1'b1;
          end else begin
            acc[idx] <= acc[idx] + seg;
          end
          state <= S_SEARCH;
        end
        default: state <= S_SEARCH;
      endcase
    end
  end

endmodule
