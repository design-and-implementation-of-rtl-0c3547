// olt: optical line terminal logic (the OLT FPGA).
//
// Downstream: the GbE MAC stores each frame from GMII (8 bits, 125 MHz) in
// the downstream buffer, whose 16-bit read port runs at the SerDes clock
// (77.76 MHz, 1.25 Gb/s); the framer puts a 6-byte header in front of each
// frame and broadcasts it to all ONUs.
// Upstream: the PON processor finds each 280-byte DHPON packet in the stream
// from the SerDes, reads its ONU-ID and length, and writes its payload into
// that ONU's buffer; when the packet with EOFB arrives the frame is complete.
// The multiplexer passes complete frames, one buffer at a time, to the GMII
// transmitter (16 bits at 77.76 MHz in, 8 bits at 125 MHz out).
// Clocks: pon_clk 77.76 MHz (SerDes transmit and recovered receive clock taken
// as one) and gmii_clk 125 MHz (GMII receive and transmit). The reset is
// asynchronous and common to both domains. The block split follows the
// design; the clock and reset arrangement is this design's own.
module olt
  import dhpon_pkg::*;
#(
  parameter int unsigned NUM_ONU   = 4,
  parameter int unsigned BUF_AW    = 11,
  parameter int unsigned LEN_AW    = 4,
  parameter int unsigned MAX_BYTES = 1526
) (
  input  logic        pon_clk,
  input  logic        gmii_clk,
  input  logic        rst_n,
  // SerDes
  output logic [15:0] ds_tx_word,
  input  logic [15:0] us_rx_word,
  // GMII to the central-office PHY
  input  logic        gmii_rx_dv,
  input  logic [7:0]  gmii_rxd,
  output logic        gmii_tx_en,
  output logic [7:0]  gmii_txd,
  output olt_status_t status
);

  // ---------------- downstream ----------------
  logic        dw_en, dw_len_we, dw_len_full;
  logic [7:0]  dw_data;
  logic [15:0] dw_len;
  logic [BUF_AW:0] dw_free;
  logic        dr_len_valid, dr_len_pop, dr_word_valid, dr_word_pop;
  logic [15:0] dr_len, dr_word, ds_underruns;

  eth_rx_mac #(.DW(8), .AW(BUF_AW), .MAX_BYTES(MAX_BYTES)) u_gbe_mac (
    .clk(gmii_clk), .rst_n(rst_n), .rx_dv(gmii_rx_dv), .rxd(gmii_rxd),
    .wr_en(dw_en), .wr_data(dw_data), .wr_len_we(dw_len_we), .wr_len(dw_len),
    .wr_free_words(dw_free), .wr_len_full(dw_len_full),
    .frames_ok(status.gmii_rx_frames), .frames_dropped(status.gmii_rx_drop)
  );

  data_buffer #(.WR_W(8), .AW(BUF_AW), .LAW(LEN_AW)) u_ds_buf (
    .wclk(gmii_clk), .wrst_n(rst_n), .wr_en(dw_en), .wr_data(dw_data),
    .wr_len_we(dw_len_we), .wr_len(dw_len), .wr_free_words(dw_free),
    .wr_len_full(dw_len_full),
    .rclk(pon_clk), .rrst_n(rst_n), .rd_len_valid(dr_len_valid), .rd_len(dr_len),
    .rd_len_pop(dr_len_pop), .rd_word_valid(dr_word_valid), .rd_word(dr_word),
    .rd_word_pop(dr_word_pop)
  );

  ds_framer u_framer (
    .clk(pon_clk), .rst_n(rst_n),
    .rd_len_valid(dr_len_valid), .rd_len(dr_len), .rd_len_pop(dr_len_pop),
    .rd_word_valid(dr_word_valid), .rd_word(dr_word), .rd_word_pop(dr_word_pop),
    .tx_word(ds_tx_word), .frames_sent(status.ds_frames_sent), .underruns(ds_underruns)
  );

  // ---------------- upstream ----------------
  logic [NUM_ONU-1:0] bw_en, bw_len_we, bw_len_full;
  logic [15:0]        bw_data, bw_len;
  logic [BUF_AW:0]    bw_free [NUM_ONU];
  logic [NUM_ONU-1:0] br_len_valid, br_len_pop, br_word_valid, br_word_pop;
  logic [15:0]        br_len [NUM_ONU];
  logic [15:0]        br_word [NUM_ONU];
  logic [15:0]        mux_frames [NUM_ONU];
  logic               mr_len_valid, mr_len_pop, mr_word_valid, mr_word_pop;
  logic [15:0]        mr_len, mr_word, gtx_underruns;

  pon_processor #(.NUM_ONU(NUM_ONU), .AW(BUF_AW), .MAX_BYTES(MAX_BYTES)) u_pon_proc (
    .clk(pon_clk), .rst_n(rst_n), .rx_word(us_rx_word),
    .wr_en(bw_en), .wr_data(bw_data), .wr_len_we(bw_len_we), .wr_len(bw_len),
    .wr_free_words(bw_free), .wr_len_full(bw_len_full),
    .last_onu_id(status.last_onu_id), .last_length(status.last_length),
    .packets_ok(status.us_packets), .frames_ok(status.us_frames),
    .frames_dropped(status.us_frames_drop)
  );

  for (genvar i = 0; i < NUM_ONU; i++) begin : g_onu_buf
    data_buffer #(.WR_W(16), .AW(BUF_AW), .LAW(LEN_AW)) u_onu_buf (
      .wclk(pon_clk), .wrst_n(rst_n), .wr_en(bw_en[i]), .wr_data(bw_data),
      .wr_len_we(bw_len_we[i]), .wr_len(bw_len), .wr_free_words(bw_free[i]),
      .wr_len_full(bw_len_full[i]),
      .rclk(gmii_clk), .rrst_n(rst_n), .rd_len_valid(br_len_valid[i]),
      .rd_len(br_len[i]), .rd_len_pop(br_len_pop[i]),
      .rd_word_valid(br_word_valid[i]), .rd_word(br_word[i]),
      .rd_word_pop(br_word_pop[i])
    );
  end

  buffer_mux #(.NUM_ONU(NUM_ONU)) u_mux (
    .clk(gmii_clk), .rst_n(rst_n),
    .b_len_valid(br_len_valid), .b_len(br_len), .b_len_pop(br_len_pop),
    .b_word_valid(br_word_valid), .b_word(br_word), .b_word_pop(br_word_pop),
    .rd_len_valid(mr_len_valid), .rd_len(mr_len), .rd_len_pop(mr_len_pop),
    .rd_word_valid(mr_word_valid), .rd_word(mr_word), .rd_word_pop(mr_word_pop),
    .frames(mux_frames)
  );

  eth_tx_if #(.DW(8)) u_gmii_tx (
    .clk(gmii_clk), .rst_n(rst_n),
    .rd_len_valid(mr_len_valid), .rd_len(mr_len), .rd_len_pop(mr_len_pop),
    .rd_word_valid(mr_word_valid), .rd_word(mr_word), .rd_word_pop(mr_word_pop),
    .tx_en(gmii_tx_en), .txd(gmii_txd),
    .frames_sent(status.gmii_tx_frames), .underruns(gtx_underruns)
  );

  assign status.underruns = {gtx_underruns != 16'd0, ds_underruns != 16'd0};

endmodule
