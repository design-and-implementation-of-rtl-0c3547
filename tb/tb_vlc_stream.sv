// tb_vlc_stream: a constant-rate video stream, as a media server sends one,
// carried by the full network at its default parameters. A stream of
// 8 Mb/s is sent as equal frames of FLEN bytes, one every FLEN microseconds,
// in both directions at once: into the OLT's GMII (received at every ONU's
// MII) and into the MII of ONU 2 (received at the OLT's GMII). For the stream
// to play smoothly every frame must arrive intact and with a short, steady
// delay, so besides the frame content the test measures each frame's delay
// from the end of its input to the end of its output and requires the
// largest delay to stay under MAX_DELAY_US and its spread under
// MAX_JITTER_US. Both ends store a whole frame before sending it on, so the
// downstream delay includes sending the frame on the 100 Mb/s MII
// (FLEN x 80 ns, about 109 us); upstream it includes the frame's slots and
// its time on the GMII. It also checks the offered rate and that nothing is
// dropped.
// The 8 Mb/s rate follows the evaluation of the design; the frame size (a
// typical UDP packet of seven 188-byte transport-stream cells plus headers),
// the frame count and the delay limits are this testbench's own.
module tb_vlc_stream;
  import dhpon_pkg::*;
  localparam int N = 4;
  localparam int NFR  = 40;       // frames each way
  localparam int FLEN = 1358;     // bytes per frame; at 8 Mb/s one per FLEN us
  localparam real MAX_DELAY_US  = 150.0;
  localparam real MAX_JITTER_US = 10.0;
  localparam int UO = 1;          // the ONU that sends upstream (ONU 2)
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic rst_n = 0;
  logic pclk = 0, gclk = 0, cclk = 0;
  always #6.43 pclk = ~pclk;
  always #4    gclk = ~gclk;
  always #4    cclk = ~cclk;
  logic mclk [N];
  initial for (int i = 0; i < N; i++) mclk[i] = 0;
  always #20    mclk[0] = ~mclk[0];
  always #20.01 mclk[1] = ~mclk[1];
  always #19.99 mclk[2] = ~mclk[2];
  always #20.02 mclk[3] = ~mclk[3];

  logic [15:0] ds_tx, us_rx = '0;
  logic g_dv = 0; logic [7:0] g_d = 0;
  logic g_txen; logic [7:0] g_txd;
  olt_status_t ost;
  logic onu_pclk [N], onu_cclk [N];
  logic [15:0] ds_rx [N], us_tx [N];
  logic us_en [N], c_tx [N], c_rx [N];
  logic m_dv [N]; logic [3:0] m_d [N];
  logic m_txen [N]; logic [3:0] m_txd [N];
  onu_status_t ust [N];
  always_comb for (int i = 0; i < N; i++) begin
    onu_pclk[i] = pclk; onu_cclk[i] = cclk;
  end

  dhpon_top dut (
    .rst_n(rst_n), .olt_pon_clk(pclk), .gmii_clk(gclk),
    .olt_ds_tx_word(ds_tx), .olt_us_rx_word(us_rx),
    .gmii_rx_dv(g_dv), .gmii_rxd(g_d), .gmii_tx_en(g_txen), .gmii_txd(g_txd),
    .olt_status(ost),
    .onu_pon_clk(onu_pclk), .mii_clk(mclk), .ctrl_clk(onu_cclk),
    .onu_ds_rx_word(ds_rx), .onu_us_tx_word(us_tx), .onu_us_tx_en(us_en),
    .onu_ctrl_tx(c_tx), .onu_ctrl_rx(c_rx),
    .mii_rx_dv(m_dv), .mii_rxd(m_d), .mii_tx_en(m_txen), .mii_txd(m_txd),
    .onu_status(ust));

  // optical path, as in tb_dhpon_top
  int dshift [N] = '{7, 2, 13, 0};
  int ushift [N] = '{10, 3, 6, 14};
  logic [15:0] ds_prev = IDLE_WORD;
  logic [15:0] us_prev [N];
  initial for (int i = 0; i < N; i++) us_prev[i] = '0;
  always @(posedge pclk) begin
    logic [15:0] acc;
    for (int i = 0; i < N; i++) ds_rx[i] <= 16'({ds_prev, ds_tx} >> dshift[i]);
    ds_prev = ds_tx;
    acc = '0;
    for (int i = 0; i < N; i++) begin
      logic [15:0] cur;
      cur = us_en[i] ? us_tx[i] : 16'h0;
      acc |= 16'({us_prev[i], cur} >> ushift[i]);
      us_prev[i] = cur;
    end
    us_rx <= acc;
  end
  logic [2:0] line_d = '0;
  always @(posedge cclk) line_d <= {line_d[1:0], c_tx[0] | c_tx[1] | c_tx[2] | c_tx[3]};
  always_comb for (int i = 0; i < N; i++) c_rx[i] = line_d[2];

  // frames: fixed size, random content drawn once, kept for the checkers
  int dlen [NFR], ulen [NFR];
  realtime d_in [NFR], u_in [NFR];
  logic [7:0] dbytes [NFR][$];
  logic [7:0] ubytes [NFR][$];
  initial begin
    void'($urandom(2024));
    for (int f = 0; f < NFR; f++) begin
      dlen[f] = FLEN;
      ulen[f] = FLEN;
      for (int k = 0; k < dlen[f]; k++) dbytes[f].push_back(8'($urandom));
      for (int k = 0; k < ulen[f]; k++) ubytes[f].push_back(8'($urandom));
    end
  end

  // generators
  initial begin
    @(posedge rst_n);
    repeat (50) @(negedge gclk);
    for (int f = 0; f < NFR; f++) begin
      for (int k = 0; k < dlen[f]; k++) begin @(negedge gclk); g_dv = 1; g_d = dbytes[f][k]; end
      @(negedge gclk); g_dv = 0; g_d = 0; d_in[f] = $realtime;
      // 8 Mb/s: one frame every FLEN us = 125 * FLEN GMII clocks
      repeat (125 * FLEN - dlen[f] - 1) @(negedge gclk);
    end
  end
  logic dv0 = 0; logic [3:0] d0 = 0;
  always_comb for (int i = 0; i < N; i++) begin
    m_dv[i] = (i == UO) ? dv0 : 1'b0;
    m_d[i]  = (i == UO) ? d0 : 4'h0;
  end
  initial begin
    @(posedge rst_n);
    repeat (30) @(negedge mclk[UO]);
    for (int f = 0; f < NFR; f++) begin
      for (int k = 0; k < ulen[f]; k++) begin
        @(negedge mclk[UO]); dv0 = 1; d0 = ubytes[f][k][3:0];
        @(negedge mclk[UO]); d0 = ubytes[f][k][7:4];
      end
      @(negedge mclk[UO]); dv0 = 0; d0 = 0; u_in[f] = $realtime;
      // one frame every FLEN us = 25 * FLEN MII clocks
      repeat (25 * FLEN - 2 * ulen[f] - 1) @(negedge mclk[UO]);
    end
  end

  // analysers
  int mii_ok [N], mii_bad [N];
  real dmax [N], dmin [N];
  real umax = 0.0, umin = 1.0e9;
  for (genvar gi = 0; gi < N; gi++) begin : g_mrx
    logic [7:0] bytes[$];
    logic [3:0] lo; bit half = 0; bit was = 0;
    always @(posedge mclk[gi]) if (rst_n) begin
      if (m_txen[gi]) begin
        if (!half) lo = m_txd[gi]; else bytes.push_back({m_txd[gi], lo});
        half = !half;
      end else if (was) begin
        int f; bit ok;
        f = mii_ok[gi] + mii_bad[gi];
        ok = f < NFR && bytes.size() == dlen[f] && !half;
        if (ok) foreach (bytes[k]) if (bytes[k] !== dbytes[f][k]) ok = 0;
        if (ok) begin
          real d;
          d = ($realtime - d_in[f]) / 1000.0;
          if (d > dmax[gi]) dmax[gi] = d;
          if (d < dmin[gi]) dmin[gi] = d;
          mii_ok[gi]++;
        end else mii_bad[gi]++;
        bytes.delete(); half = 0;
      end
      was = m_txen[gi];
    end
  end
  int g_ok = 0, g_bad = 0;
  realtime g_last;
  logic [7:0] gbytes[$]; bit g_was = 0;
  always @(posedge gclk) if (rst_n) begin
    if (g_txen) gbytes.push_back(g_txd);
    else if (g_was) begin
      int f; bit ok;
      f = g_ok + g_bad;
      ok = f < NFR && gbytes.size() == ulen[f];
      if (ok) foreach (gbytes[k]) if (gbytes[k] !== ubytes[f][k]) ok = 0;
      if (ok) begin
        real d;
        d = ($realtime - u_in[f]) / 1000.0;
        if (d > umax) umax = d;
        if (d < umin) umin = d;
        g_ok++;
      end else g_bad++;
      g_last = $realtime;
      gbytes.delete();
    end
    g_was = g_txen;
  end

  initial begin
    #80000000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int t;
    real ds_rate, us_rate;
    for (int i = 0; i < N; i++) begin mii_ok[i] = 0; mii_bad[i] = 0; dmax[i] = 0.0; dmin[i] = 1.0e9; end
    repeat (5) @(negedge pclk);
    rst_n = 1;
    t = 0;
    while (t < 700000 && !(g_ok + g_bad == NFR && mii_ok[0] + mii_bad[0] == NFR &&
           mii_ok[1] + mii_bad[1] == NFR && mii_ok[2] + mii_bad[2] == NFR &&
           mii_ok[3] + mii_bad[3] == NFR)) begin
      #100; t++;
    end
    #20000;
    // rate from the first to the last frame, in Mb/s
    ds_rate = real'((NFR - 1) * FLEN) * 8.0 / (d_in[NFR-1] - d_in[0]) * 1000.0;
    us_rate = real'((NFR - 1) * FLEN) * 8.0 / (u_in[NFR-1] - u_in[0]) * 1000.0;
    for (int i = 0; i < N; i++)
      check(mii_ok[i] == NFR && mii_bad[i] == 0, $sformatf("downstream: all %0d frames intact at ONU %0d", NFR, i + 1));
    check(g_ok == NFR && g_bad == 0, $sformatf("upstream: all %0d frames from ONU 2 intact at the OLT", NFR));
    check(ds_rate > 7.9 && ds_rate < 8.1 && us_rate > 7.9 && us_rate < 8.1, "offered streams are 8 Mb/s");
    for (int i = 0; i < N; i++)
      check(dmax[i] < MAX_DELAY_US && dmax[i] - dmin[i] < MAX_JITTER_US,
            $sformatf("downstream delay to ONU %0d short and steady", i + 1));
    check(umax < MAX_DELAY_US && umax - umin < MAX_JITTER_US, "upstream delay short and steady");
    check(ost.gmii_rx_drop == 0 && ust[UO].us_frames_drop == 0 && ust[UO].ds_frames_drop == 0 &&
          ost.us_frames_drop == 0, "no frame dropped anywhere");
    check(int'(ust[UO].grants) == int'(ust[UO].bursts) && ust[0].grants == 0 && ust[2].grants == 0 &&
          ust[3].grants == 0, "only ONU 2 granted, once per packet");
    $display("downstream: %0d of %0d frames, %0.2f Mb/s, delay %0.2f..%0.2f us at ONU 1",
             mii_ok[0], NFR, ds_rate, dmin[0], dmax[0]);
    $display("upstream:   %0d of %0d frames, %0.2f Mb/s, delay %0.2f..%0.2f us, %0d packets",
             g_ok, NFR, us_rate, umin, umax, ust[UO].bursts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
