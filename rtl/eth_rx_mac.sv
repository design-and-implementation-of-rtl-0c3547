// eth_rx_mac: receive MAC between the PHY interface and a data buffer.
//
// Used twice: as the OLT's GbE MAC behind GMII (DW = 8, 125 MHz) and as the
// ONU's Ethernet MAC behind MII (DW = 4, 25 MHz, low nibble first). While
// rx_dv is high every unit on rxd is passed to the payload memory, preamble
// and SFD included, and the bytes are counted; the cycle after rx_dv falls the
// count is written to the payload-length memory, which closes the packet.
// Timing: rxd/rx_dv are registered once, so writes trail the pins by a cycle.
// Overflow: when a frame starts while the buffer lacks room for a frame of
// MAX_BYTES, or its length memory is full, the whole frame is dropped and
// frames_dropped counts it. A frame longer than MAX_BYTES is cut to MAX_BYTES;
// the default 1526 is a 1518-byte frame plus its 8 bytes of preamble and SFD.
// Counting the length and storing it at the end of the frame follows the
// design; the drop and cut rules are this design's own.
module eth_rx_mac #(
  parameter int unsigned DW        = 8,
  parameter int unsigned AW        = 11,
  parameter int unsigned MAX_BYTES = 1526
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          rx_dv,
  input  logic [DW-1:0] rxd,

  output logic          wr_en,
  output logic [DW-1:0] wr_data,
  output logic          wr_len_we,
  output logic [15:0]   wr_len,
  input  logic [AW:0]   wr_free_words,
  input  logic          wr_len_full,

  output logic [15:0]   frames_ok,
  output logic [15:0]   frames_dropped
);

  localparam int unsigned MAX_UNITS = MAX_BYTES * 8 / DW;
  localparam int unsigned MAX_WORDS = (MAX_BYTES + 1) / 2;

  logic          dv_q;
  logic [DW-1:0] d_q;
  logic          in_frame, dropping;
  logic [15:0]   units;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dv_q <= 1'b0;
      d_q  <= '0;
    end else begin
      dv_q <= rx_dv;
      d_q  <= rxd;
    end
  end

  logic start, room;
  assign start = dv_q && !in_frame && !dropping;
  assign room  = (wr_free_words >= (AW+1)'(MAX_WORDS + 1)) && !wr_len_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_frame       <= 1'b0;
      dropping       <= 1'b0;
      units          <= '0;
      frames_ok      <= '0;
      frames_dropped <= '0;
    end else begin
      if (start) begin
        if (room) begin
          in_frame <= 1'b1;
          units    <= 16'd1;
        end else begin
          dropping       <= 1'b1;
          frames_dropped <= frames_dropped + 1'b1;
        end
      end else if (in_frame) begin
        if (!dv_q) begin
          in_frame  <= 1'b0;
          frames_ok <= frames_ok + 1'b1;
        end else if (units < 16'(MAX_UNITS)) begin
          units <= units + 1'b1;
        end
      end else if (dropping && !dv_q) begin
        dropping <= 1'b0;
      end
    end
  end

  assign wr_en     = dv_q && ((start && room) || (in_frame && units < 16'(MAX_UNITS)));
  assign wr_data   = d_q;
  assign wr_len_we = in_frame && !dv_q;
  assign wr_len    = (DW == 4) ? ((units + 16'd1) >> 1) : (DW == 16) ? (units << 1) : units;

endmodule
