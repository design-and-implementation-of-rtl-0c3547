// dhpon_top: one sub-PON of the hybrid PON - one OLT and NUM_ONU ONUs.
//
// The OLT and the ONUs are the digital logic of their boards. What joins them
// is optical and analog - SerDes chips, optical transceivers, fiber, the
// splitter that merges the upstream bursts and reflects the control channel
// back to every ONU - so all of it stays outside and its signals are ports:
//   olt_ds_tx_word  -> (fiber, broadcast) -> onu_ds_rx_word[i]
//   onu_us_tx_word[i] gated by onu_us_tx_en[i] -> (splitter) -> olt_us_rx_word
//   onu_ctrl_tx[i]  -> (splitter, back to all ONUs) -> onu_ctrl_rx[i]
// ONU i (0-based) is given ONU-ID i+1. The user and central-office Ethernet
// ports are GMII on the OLT and MII on each ONU.
// All clocks are inputs: olt_pon_clk/onu_pon_clk[i] 77.76 MHz, gmii_clk
// 125 MHz, mii_clk[i] 25 MHz, ctrl_clk[i] 125 MHz.
// One OLT with four ONUs follows the design; bringing the optical side out as
// ports, and separate clock ports per ONU, is this design's own.
module dhpon_top
  import dhpon_pkg::*;
#(
  parameter int unsigned NUM_ONU   = 4,
  parameter int unsigned BUF_AW    = 11,
  parameter int unsigned LEN_AW    = 4,
  parameter int unsigned QPKTS     = 16,
  parameter int unsigned SLOT_BITS = 264,
  parameter int unsigned MAX_BYTES = 1526
) (
  input  logic        rst_n,
  // OLT
  input  logic        olt_pon_clk,
  input  logic        gmii_clk,
  output logic [15:0] olt_ds_tx_word,
  input  logic [15:0] olt_us_rx_word,
  input  logic        gmii_rx_dv,
  input  logic [7:0]  gmii_rxd,
  output logic        gmii_tx_en,
  output logic [7:0]  gmii_txd,
  output olt_status_t olt_status,
  // ONUs
  input  logic        onu_pon_clk   [NUM_ONU],
  input  logic        mii_clk       [NUM_ONU],
  input  logic        ctrl_clk      [NUM_ONU],
  input  logic [15:0] onu_ds_rx_word[NUM_ONU],
  output logic [15:0] onu_us_tx_word[NUM_ONU],
  output logic        onu_us_tx_en  [NUM_ONU],
  output logic        onu_ctrl_tx   [NUM_ONU],
  input  logic        onu_ctrl_rx   [NUM_ONU],
  input  logic        mii_rx_dv     [NUM_ONU],
  input  logic [3:0]  mii_rxd       [NUM_ONU],
  output logic        mii_tx_en     [NUM_ONU],
  output logic [3:0]  mii_txd       [NUM_ONU],
  output onu_status_t onu_status    [NUM_ONU]
);

  olt #(.NUM_ONU(NUM_ONU), .BUF_AW(BUF_AW), .LEN_AW(LEN_AW), .MAX_BYTES(MAX_BYTES)) u_olt (
    .pon_clk(olt_pon_clk), .gmii_clk(gmii_clk), .rst_n(rst_n),
    .ds_tx_word(olt_ds_tx_word), .us_rx_word(olt_us_rx_word),
    .gmii_rx_dv(gmii_rx_dv), .gmii_rxd(gmii_rxd),
    .gmii_tx_en(gmii_tx_en), .gmii_txd(gmii_txd), .status(olt_status)
  );

  for (genvar i = 0; i < NUM_ONU; i++) begin : g_onu
    onu #(.NUM_ONU(NUM_ONU), .BUF_AW(BUF_AW), .LEN_AW(LEN_AW), .QPKTS(QPKTS),
          .SLOT_BITS(SLOT_BITS), .MAX_BYTES(MAX_BYTES)) u_onu (
      .pon_clk(onu_pon_clk[i]), .mii_clk(mii_clk[i]), .ctrl_clk(ctrl_clk[i]),
      .rst_n(rst_n), .onu_id(8'(i + 1)),
      .ds_rx_word(onu_ds_rx_word[i]),
      .us_tx_word(onu_us_tx_word[i]), .us_tx_en(onu_us_tx_en[i]),
      .ctrl_tx(onu_ctrl_tx[i]), .ctrl_rx(onu_ctrl_rx[i]),
      .mii_rx_dv(mii_rx_dv[i]), .mii_rxd(mii_rxd[i]),
      .mii_tx_en(mii_tx_en[i]), .mii_txd(mii_txd[i]),
      .status(onu_status[i])
    );
  end

endmodule
