// tb_smartbits_load: the throughput test of the network, as a traffic
// generator/analyser pair would run it, on the full network at its default
// parameters. One analyser port streams Ethernet frames of random size
// (64..1518 bytes) and random content into the OLT's GMII at 100 Mb/s line
// rate (each frame followed by 20 byte times of preamble and gap), the other
// streams such frames into the MII of ONU 1 at its full 100 Mb/s, both at the
// same time. The receiving ports compare every frame with the one sent and
// count it; at the end the test requires every frame to arrive intact and in
// order in both directions (downstream at every ONU, as it is a broadcast)
// and reports the efficiency and the measured rates. The frame count is kept
// small enough to simulate; the rates are the real ones.
// The 100 Mb/s rates and random sizes follow the evaluation of the design;
// the line models (as in tb_dhpon_top) and the frame count are this
// testbench's own.
module tb_smartbits_load;
  import dhpon_pkg::*;
  localparam int N = 4;
  localparam int NFR = 1000;    // frames each way
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

  // random frames: sizes and bytes drawn once, kept for the checkers
  int dlen [NFR], ulen [NFR];
  logic [7:0] dbytes [NFR][$];
  logic [7:0] ubytes [NFR][$];
  initial begin
    void'($urandom(12345));
    for (int f = 0; f < NFR; f++) begin
      dlen[f] = 64 + int'($urandom % 1455);
      ulen[f] = 64 + int'($urandom % 1455);
      for (int k = 0; k < dlen[f]; k++) dbytes[f].push_back(8'($urandom));
      for (int k = 0; k < ulen[f]; k++) ubytes[f].push_back(8'($urandom));
    end
  end

  // generators
  longint ds_bytes_sent = 0, us_bytes_sent = 0;
  realtime ds_t0, ds_t1, us_t0, us_t1;
  initial begin
    @(posedge rst_n);
    repeat (50) @(negedge gclk);
    ds_t0 = $realtime;
    for (int f = 0; f < NFR; f++) begin
      for (int k = 0; k < dlen[f]; k++) begin @(negedge gclk); g_dv = 1; g_d = dbytes[f][k]; end
      @(negedge gclk); g_dv = 0; g_d = 0;
      // 100 Mb/s: a byte every 80 ns, 20 bytes of preamble and gap per frame
      repeat (10 * (dlen[f] + 20) - dlen[f] - 1) @(negedge gclk);
      ds_bytes_sent += dlen[f];
    end
    ds_t1 = $realtime;
  end
  logic dv0 = 0; logic [3:0] d0 = 0;
  always_comb for (int i = 0; i < N; i++) begin
    m_dv[i] = (i == 0) ? dv0 : 1'b0;
    m_d[i]  = (i == 0) ? d0 : 4'h0;
  end
  initial begin
    @(posedge rst_n);
    repeat (30) @(negedge mclk[0]);
    us_t0 = $realtime;
    for (int f = 0; f < NFR; f++) begin
      for (int k = 0; k < ulen[f]; k++) begin
        @(negedge mclk[0]); dv0 = 1; d0 = ubytes[f][k][3:0];
        @(negedge mclk[0]); d0 = ubytes[f][k][7:4];
      end
      @(negedge mclk[0]); dv0 = 0; d0 = 0;
      repeat (39) @(negedge mclk[0]);   // 20 byte times between frames
      us_bytes_sent += ulen[f];
    end
    us_t1 = $realtime;
  end

  // analysers
  int mii_ok [N], mii_bad [N];
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
        if (ok) mii_ok[gi]++; else mii_bad[gi]++;
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
      if (ok) g_ok++; else g_bad++;
      g_last = $realtime;
      gbytes.delete();
    end
    g_was = g_txen;
  end

  initial begin
    #200000000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int t;
    real ds_rate, us_rate;
    for (int i = 0; i < N; i++) begin mii_ok[i] = 0; mii_bad[i] = 0; end
    repeat (5) @(negedge pclk);
    rst_n = 1;
    t = 0;
    while (t < 1500000 && !(g_ok + g_bad == NFR && mii_ok[0] + mii_bad[0] == NFR &&
           mii_ok[1] + mii_bad[1] == NFR && mii_ok[2] + mii_bad[2] == NFR &&
           mii_ok[3] + mii_bad[3] == NFR)) begin
      #100; t++;
    end
    #20000;
    ds_rate = real'(ds_bytes_sent) * 8.0 / (ds_t1 - ds_t0) * 1000.0;
    us_rate = real'(us_bytes_sent) * 8.0 / (us_t1 - us_t0) * 1000.0;
    for (int i = 0; i < N; i++)
      check(mii_ok[i] == NFR && mii_bad[i] == 0, $sformatf("downstream: all %0d frames intact at ONU %0d", NFR, i + 1));
    check(g_ok == NFR && g_bad == 0, $sformatf("upstream: all %0d frames from ONU 1 intact at the OLT", NFR));
    check(ds_rate > 75.0 && ds_rate < 100.0 && us_rate > 90.0 && us_rate <= 100.0,
          "offered loads are 100 Mb/s line rate");
    check(ost.gmii_rx_drop == 0 && ust[0].us_frames_drop == 0 && ust[0].ds_frames_drop == 0 &&
          ost.us_frames_drop == 0, "no frame dropped anywhere");
    check(int'(ust[0].grants) == int'(ust[0].bursts) && ust[1].grants == 0, "only ONU 1 granted, once per packet");
    $display("downstream: %0d of %0d frames (%0.2f %%), offered %0.1f Mb/s of frame data",
             mii_ok[0], NFR, 100.0 * mii_ok[0] / NFR, ds_rate);
    $display("upstream:   %0d of %0d frames (%0.2f %%), offered %0.1f Mb/s of frame data, %0d packets",
             g_ok, NFR, 100.0 * g_ok / NFR, us_rate, ust[0].bursts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
