// onu: optical network unit logic (the ONU FPGA).
//
// Downstream: the PON MAC finds each frame in the 16-bit stream from the
// SerDes, strips its header and stores the Ethernet frame in the downstream
// data buffer (16 bits in at 77.76 MHz); the MII transmitter sends it to the
// user PHY, 4 bits at 25 MHz.
// Upstream: the Ethernet MAC stores each user frame from MII in the upstream
// data buffer (4 bits in at 25 MHz, 16 bits out at 77.76 MHz); the framer cuts
// it into 280-byte DHPON packets for the queue data buffer. The DBA processor
// (125 MHz control clock) reports the queue's Q-size on the control channel,
// collects the Q-sizes of all ONUs and, when this ONU has the largest, grants
// its queue one slot; the queue then bursts one DHPON packet, 140 words, with
// us_tx_en high.
// Clocks: pon_clk 77.76 MHz (SerDes transmit and recovered receive clock taken
// as one), mii_clk 25 MHz (MII receive and transmit), ctrl_clk 125 MHz. The
// reset is asynchronous and common to all three domains. The block split
// follows the design; the clock and reset arrangement is this design's own.
module onu
  import dhpon_pkg::*;
#(
  parameter int unsigned NUM_ONU   = 4,
  parameter int unsigned BUF_AW    = 11,    // data buffers: 2**BUF_AW words
  parameter int unsigned LEN_AW    = 4,     // length memories: 2**LEN_AW frames
  parameter int unsigned QPKTS     = 16,    // queue data buffer, DHPON packets
  parameter int unsigned SLOT_BITS = 264,   // slot, in control-channel bits
  parameter int unsigned MAX_BYTES = 1526
) (
  input  logic        pon_clk,
  input  logic        mii_clk,
  input  logic        ctrl_clk,
  input  logic        rst_n,
  input  logic [7:0]  onu_id,
  // SerDes
  input  logic [15:0] ds_rx_word,
  output logic [15:0] us_tx_word,
  output logic        us_tx_en,
  // control channel (1550 nm, via the splitter)
  output logic        ctrl_tx,
  input  logic        ctrl_rx,
  // MII to the user PHY
  input  logic        mii_rx_dv,
  input  logic [3:0]  mii_rxd,
  output logic        mii_tx_en,
  output logic [3:0]  mii_txd,
  output onu_status_t status
);

  // ---------------- downstream ----------------
  logic        dsw_en, dsw_len_we, dsw_len_full;
  logic [15:0] dsw_data, dsw_len;
  logic [BUF_AW:0] dsw_free;
  logic        dsr_len_valid, dsr_len_pop, dsr_word_valid, dsr_word_pop;
  logic [15:0] dsr_len, dsr_word;
  logic [15:0] mii_tx_underruns;

  pon_mac #(.AW(BUF_AW), .MAX_BYTES(MAX_BYTES)) u_pon_mac (
    .clk(pon_clk), .rst_n(rst_n), .rx_word(ds_rx_word),
    .wr_en(dsw_en), .wr_data(dsw_data), .wr_len_we(dsw_len_we), .wr_len(dsw_len),
    .wr_free_words(dsw_free), .wr_len_full(dsw_len_full),
    .locked(status.ds_locked), .bit_offset(status.ds_bit_offset),
    .frames_ok(status.ds_frames_ok), .frames_dropped(status.ds_frames_drop)
  );

  data_buffer #(.WR_W(16), .AW(BUF_AW), .LAW(LEN_AW)) u_ds_buf (
    .wclk(pon_clk), .wrst_n(rst_n), .wr_en(dsw_en), .wr_data(dsw_data),
    .wr_len_we(dsw_len_we), .wr_len(dsw_len), .wr_free_words(dsw_free),
    .wr_len_full(dsw_len_full),
    .rclk(mii_clk), .rrst_n(rst_n), .rd_len_valid(dsr_len_valid), .rd_len(dsr_len),
    .rd_len_pop(dsr_len_pop), .rd_word_valid(dsr_word_valid), .rd_word(dsr_word),
    .rd_word_pop(dsr_word_pop)
  );

  eth_tx_if #(.DW(4)) u_mii_tx (
    .clk(mii_clk), .rst_n(rst_n),
    .rd_len_valid(dsr_len_valid), .rd_len(dsr_len), .rd_len_pop(dsr_len_pop),
    .rd_word_valid(dsr_word_valid), .rd_word(dsr_word), .rd_word_pop(dsr_word_pop),
    .tx_en(mii_tx_en), .txd(mii_txd),
    .frames_sent(status.mii_tx_frames), .underruns(mii_tx_underruns)
  );

  // ---------------- upstream ----------------
  logic        usw_en, usw_len_we, usw_len_full;
  logic [3:0]  usw_data;
  logic [15:0] usw_len;
  logic [BUF_AW:0] usw_free;
  logic        usr_len_valid, usr_len_pop, usr_word_valid, usr_word_pop;
  logic [15:0] usr_len, usr_word;
  logic        q_wr, q_room, grant_tgl, grant;
  logic [15:0] q_wdata, q_size_gray, fr_underruns;
  logic        dba_decided;

  eth_rx_mac #(.DW(4), .AW(BUF_AW), .MAX_BYTES(MAX_BYTES)) u_eth_mac (
    .clk(mii_clk), .rst_n(rst_n), .rx_dv(mii_rx_dv), .rxd(mii_rxd),
    .wr_en(usw_en), .wr_data(usw_data), .wr_len_we(usw_len_we), .wr_len(usw_len),
    .wr_free_words(usw_free), .wr_len_full(usw_len_full),
    .frames_ok(status.us_frames_in), .frames_dropped(status.us_frames_drop)
  );

  data_buffer #(.WR_W(4), .AW(BUF_AW), .LAW(LEN_AW)) u_us_buf (
    .wclk(mii_clk), .wrst_n(rst_n), .wr_en(usw_en), .wr_data(usw_data),
    .wr_len_we(usw_len_we), .wr_len(usw_len), .wr_free_words(usw_free),
    .wr_len_full(usw_len_full),
    .rclk(pon_clk), .rrst_n(rst_n), .rd_len_valid(usr_len_valid), .rd_len(usr_len),
    .rd_len_pop(usr_len_pop), .rd_word_valid(usr_word_valid), .rd_word(usr_word),
    .rd_word_pop(usr_word_pop)
  );

  us_framer u_framer (
    .clk(pon_clk), .rst_n(rst_n), .onu_id(onu_id),
    .rd_len_valid(usr_len_valid), .rd_len(usr_len), .rd_len_pop(usr_len_pop),
    .rd_word_valid(usr_word_valid), .rd_word(usr_word), .rd_word_pop(usr_word_pop),
    .q_wr(q_wr), .q_wdata(q_wdata), .q_room(q_room),
    .segments(status.segments), .underruns(fr_underruns)
  );

  queue_buffer #(.QPKTS(QPKTS)) u_queue (
    .clk(pon_clk), .rst_n(rst_n), .wr(q_wr), .wdata(q_wdata), .room(q_room),
    .q_size(status.q_size), .q_size_gray(q_size_gray), .grant(grant),
    .tx_en(us_tx_en), .tx_word(us_tx_word),
    .bursts(status.bursts), .empty_grants(status.empty_grants)
  );

  dba_processor #(.NUM_ONU(NUM_ONU), .SLOT_BITS(SLOT_BITS)) u_dba (
    .clk(ctrl_clk), .rst_n(rst_n), .onu_id(onu_id), .q_size_gray(q_size_gray),
    .ctrl_tx(ctrl_tx), .ctrl_rx(ctrl_rx), .grant_toggle(grant_tgl),
    .decided(dba_decided), .winner_id(status.winner_id), .grants(status.grants),
    .messages_rx(status.ctrl_msgs_rx)
  );

  toggle_sync u_grant_sync (
    .dst_clk(pon_clk), .dst_rst_n(rst_n), .tgl_in(grant_tgl), .pulse(grant)
  );

  assign status.underruns = {mii_tx_underruns != 16'd0, fr_underruns != 16'd0, 1'b0};

endmodule
