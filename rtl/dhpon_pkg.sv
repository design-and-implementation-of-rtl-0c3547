// dhpon_pkg: constants shared by the OLT and ONU logic of the hybrid PON.
//
// Downstream frame (OLT -> all ONUs, 16-bit words at 77.76 MHz):
//   PSYNC AA AA AA, delimiter E2, 2-byte payload length, payload, then idle.
// Upstream DHPON packet (ONU -> OLT), always 280 bytes = 140 words:
//   preamble 8 x 55, delimiter E2, ONU-ID, 2-byte payload length whose bit 15
//   is the end-of-frame bit (EOFB), 268 bytes of payload padded with idle.
// DBA control message (ONU -> splitter -> all ONUs, serial, MSB first):
//   preamble 4 x 55, delimiter E2, ONU-ID, 2-byte Q-size.
// All field values and sizes follow the frame formats of the design; the
// idle word, the pad word and the control preamble value are this design's
// own choice.
package dhpon_pkg;

  localparam logic [7:0]  DELIM        = 8'hE2;
  localparam logic [15:0] PSYNC_WORD   = 16'hAAAA;   // downstream sync
  localparam logic [15:0] PREAMBLE_WORD = 16'h5555;  // upstream preamble
  localparam logic [15:0] IDLE_WORD    = 16'h5555;   // line idle between frames
  localparam logic [15:0] PAD_WORD     = 16'h0000;   // fill after a short payload

  localparam int unsigned US_PKT_BYTES     = 280;
  localparam int unsigned US_HDR_BYTES     = 12;
  localparam int unsigned US_PAYLOAD_BYTES = US_PKT_BYTES - US_HDR_BYTES;  // 268
  localparam int unsigned US_PKT_WORDS     = US_PKT_BYTES / 2;             // 140
  localparam int unsigned US_HDR_WORDS     = US_HDR_BYTES / 2;             // 6
  localparam int unsigned US_PAYLOAD_WORDS = US_PAYLOAD_BYTES / 2;         // 134
  localparam int unsigned DS_HDR_WORDS     = 3;                            // 6 bytes

  localparam int unsigned EOFB_BIT = 15;

  localparam logic [7:0] CTRL_PREAMBLE   = 8'h55;
  localparam int unsigned CTRL_MSG_BITS  = 64;     // 8 bytes

  // Byte length of a packet, 16 bits; upstream length fields carry 15.
  typedef logic [15:0] len_t;
  typedef logic [15:0] word_t;

  // Words needed to hold a number of bytes.
  function automatic logic [15:0] words_of(input logic [15:0] bytes);
    return (bytes + 16'd1) >> 1;
  endfunction

  // Status counters brought out of an ONU.
  typedef struct packed {
    logic [15:0] ds_frames_ok;     // downstream frames stored by the PON MAC
    logic [15:0] ds_frames_drop;   // downstream frames dropped, buffer full
    logic [15:0] mii_tx_frames;    // frames sent to the user on MII
    logic [15:0] us_frames_in;     // frames taken from the user on MII
    logic [15:0] us_frames_drop;   // user frames dropped, buffer full
    logic [15:0] segments;         // DHPON packets built by the framer
    logic [15:0] q_size;           // DHPON packets waiting for a grant
    logic [15:0] bursts;           // DHPON packets sent upstream
    logic [15:0] grants;           // slots this ONU has won
    logic [15:0] empty_grants;     // grants that found the queue empty
    logic [15:0] ctrl_msgs_rx;     // control messages received
    logic [7:0]  winner_id;        // ONU chosen at the end of the last slot
    logic [3:0]  ds_bit_offset;    // bit shift found in the downstream stream
    logic        ds_locked;        // PON MAC inside a downstream frame
    logic [2:0]  underruns;        // one per reader, sticky: buffer ran dry
  } onu_status_t;

  // Status counters brought out of the OLT.
  typedef struct packed {
    logic [15:0] gmii_rx_frames;   // frames taken from GMII
    logic [15:0] gmii_rx_drop;     // frames dropped, downstream buffer full
    logic [15:0] ds_frames_sent;   // downstream frames put on the fiber
    logic [15:0] us_packets;       // DHPON packets received
    logic [15:0] us_frames;        // Ethernet frames rebuilt
    logic [15:0] us_frames_drop;   // frames dropped, ONU buffer full
    logic [15:0] gmii_tx_frames;   // frames sent on GMII
    logic [7:0]  last_onu_id;      // ONU-ID of the last DHPON packet
    logic [15:0] last_length;      // EOFB and length of the last DHPON packet
    logic [1:0]  underruns;        // one per reader, sticky: buffer ran dry
  } olt_status_t;

endpackage
