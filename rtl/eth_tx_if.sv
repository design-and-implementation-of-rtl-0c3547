// eth_tx_if: transmit side of GMII (DW = 8, 125 MHz) or MII (DW = 4, 25 MHz).
//
// Reads a packet from a data buffer (16-bit words, first byte in bits 15:8)
// and sends it to the PHY exactly as stored: the stored frame already carries
// its preamble and SFD. On MII each byte goes low nibble first. tx_en is high
// for exactly length*8/DW clocks, then stays low for at least IPG_BYTES byte
// times (the Ethernet inter-packet gap) before the next packet.
// The buffer's length becomes the frame length; the word is popped when its
// last unit is sent, or at the end of the frame for a half-used last word;
// the length entry is popped together with the frame's last unit.
// The 16-to-8 and 16-to-4 width changes follow the design; the gap length is
// the Ethernet minimum, chosen here.
module eth_tx_if #(
  parameter int unsigned DW        = 8,
  parameter int unsigned IPG_BYTES = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          rd_len_valid,
  input  logic [15:0]   rd_len,
  output logic          rd_len_pop,
  input  logic          rd_word_valid,
  input  logic [15:0]   rd_word,
  output logic          rd_word_pop,
  output logic          tx_en,
  output logic [DW-1:0] txd,
  output logic [15:0]   frames_sent,
  output logic [15:0]   underruns
);

  localparam int unsigned UNITS    = 16 / DW;
  localparam int unsigned UPB      = 8 / DW;              // units per byte
  localparam int unsigned IPG_UNITS = IPG_BYTES * UPB;

  typedef enum logic [1:0] {S_IDLE, S_SEND, S_GAP} state_t;
  state_t      state;
  logic [15:0] left;                  // units still to send
  logic [3:0]  u;                     // unit index inside the current word
  logic [15:0] gap;

  function automatic int unsigned unit_lsb(input int unsigned i);
    if (DW == 4) return (i == 0) ? 8 : (i == 1) ? 12 : (i == 2) ? 0 : 4;
    else         return 16 - DW * (i + 1);
  endfunction

  logic [DW-1:0] unit_now;
  always_comb begin
    unit_now = '0;
    for (int unsigned i = 0; i < UNITS; i++)
      if (int'(u) == int'(i)) unit_now = rd_word[unit_lsb(i) +: DW];
  end

  logic word_end;
  assign word_end    = (int'(u) == int'(UNITS) - 1) || (left == 16'd1);
  assign rd_word_pop = (state == S_SEND) && word_end && rd_word_valid;
  // the length entry is popped with the last unit, so it marks the frame end
  assign rd_len_pop  = ((state == S_IDLE) && rd_len_valid && rd_len == 16'd0) ||
                       ((state == S_SEND) && left == 16'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      left        <= '0;
      u           <= '0;
      gap         <= '0;
      tx_en       <= 1'b0;
      txd         <= '0;
      frames_sent <= '0;
      underruns   <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          tx_en <= 1'b0;
          txd   <= '0;
          u     <= '0;
          if (rd_len_valid && rd_len != 16'd0) begin
            left  <= 16'(rd_len * UPB);
            state <= S_SEND;
          end
        end
        S_SEND: begin
          tx_en <= 1'b1;
          txd   <= unit_now;
          if (!rd_word_valid) underruns <= underruns + 1'b1;
          u    <= word_end ? '0 : u + 1'b1;
          left <= left - 1'b1;
          if (left == 16'd1) begin
            state       <= S_GAP;
            gap         <= '0;
            frames_sent <= frames_sent + 1'b1;
          end
        end
        S_GAP: begin
          tx_en <= 1'b0;
          txd   <= '0;
          gap   <= gap + 1'b1;
          if (gap + 1 >= 16'(IPG_UNITS)) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
