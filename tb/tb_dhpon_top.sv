// tb_dhpon_top: end-to-end test of the whole network at its default size
// (one OLT, four ONUs, default buffers and slot), with the optical path
// modelled in the testbench:
//  - downstream: the OLT's word stream reaches every ONU, each delayed by its
//    own number of bits (0..15), as an unaligned SerDes would deliver it;
//  - upstream: the words of each ONU count only while its burst enable is
//    high (the laser is dark otherwise), each ONU's burst is delayed by its
//    own number of bits, and the coupler adds the light, modelled as the OR
//    of the gated, shifted words;
//  - control channel: the splitter returns the OR of all ONUs' control
//    outputs to every ONU after a 3-bit delay; all ONUs share one 125 MHz
//    control clock.
// Each ONU's MII clock runs at its own slightly different 25 MHz rate.
// Traffic: Ethernet frames into the OLT's GMII (broadcast to all ONUs) and,
// at the same time, frames of 46..1518 bytes into each ONU's MII.
// Checked, with a count of how often each mechanism was exercised:
//  downstream frames reach every MII intact; every ONU found its bit offset;
//  upstream frames from all ONUs reach the GMII intact and in order per ONU;
//  frames were split into several packets and rebuilt (EOFB); every ONU was
//  granted slots; bursts never overlapped on the fibre; every slot's
//  decision matched the rule (largest Q-size, lowest ONU-ID on a tie, nobody
//  if all are empty) and was the same in all ONUs; idle slots and ties
//  occurred; frames of different ONUs were interleaved on the GMII.
// The formats, rates and the decision rule follow the design; the line
// models, the tie and idle rules and the traffic are this design's own.
module tb_dhpon_top;
  import dhpon_pkg::*;
  localparam int N = 4;
  localparam int NDS = 8;   // downstream frames
  localparam int NUS = 6;   // upstream frames per ONU
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // clocks
  logic rst_n = 0;
  logic pclk = 0, gclk = 0, cclk = 0;
  always #6.43 pclk = ~pclk;    // 77.76 MHz SerDes word clock
  always #4    gclk = ~gclk;    // 125 MHz GMII
  always #4    cclk = ~cclk;    // 125 MHz control channel
  logic mclk [N];
  initial for (int i = 0; i < N; i++) mclk[i] = 0;
  always #20    mclk[0] = ~mclk[0];
  always #20.01 mclk[1] = ~mclk[1];
  always #19.99 mclk[2] = ~mclk[2];
  always #20.02 mclk[3] = ~mclk[3];

  // DUT
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
  always_comb for (int i = 0; i < N; i++) begin onu_pclk[i] = pclk; onu_cclk[i] = cclk; end

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

  // optical path
  int dshift [N] = '{3, 0, 9, 15};
  int ushift [N] = '{5, 12, 0, 7};
  logic [15:0] ds_prev = IDLE_WORD;
  logic [15:0] us_prev [N];
  int overlap = 0, bad_burst = 0, bursts_seen = 0;
  int run [N];
  initial for (int i = 0; i < N; i++) begin us_prev[i] = '0; run[i] = 0; end
  always @(posedge pclk) begin
    logic [15:0] acc;
    int on;
    for (int i = 0; i < N; i++) ds_rx[i] <= 16'({ds_prev, ds_tx} >> dshift[i]);
    ds_prev = ds_tx;
    acc = '0; on = 0;
    for (int i = 0; i < N; i++) begin
      logic [15:0] cur;
      cur = us_en[i] ? us_tx[i] : 16'h0;
      acc |= 16'({us_prev[i], cur} >> ushift[i]);
      us_prev[i] = cur;
      if (us_en[i]) begin on++; run[i]++; end
      else if (run[i] != 0) begin
        bursts_seen++;
        if (run[i] != US_PKT_WORDS) bad_burst++;
        run[i] = 0;
      end
    end
    if (on > 1) overlap++;
    us_rx <= acc;
  end
  logic [2:0] line_d = '0;
  always @(posedge cclk) line_d <= {line_d[1:0], c_tx[0] | c_tx[1] | c_tx[2] | c_tx[3]};
  always_comb for (int i = 0; i < N; i++) c_rx[i] = line_d[2];

  // byte patterns
  function automatic logic [7:0] ds_byte(input int f, input int k);
    if (k == 0) return 8'hD0;
    if (k == 1) return 8'(f);
    return 8'(f * 19 + k);
  endfunction
  function automatic logic [7:0] us_byte(input int i, input int f, input int k);
    if (k == 0) return 8'(8'hA1 + i);
    if (k == 1) return 8'(f);
    return 8'(i * 37 + f * 11 + k);
  endfunction
  int ds_len [NDS] = '{64, 100, 1518, 46, 700, 256, 999, 128};
  int us_len [NUS] = '{1518, 64, 300, 800, 46, 1200};
  function automatic int ulen(input int i, input int f);
    return us_len[(f + i) % NUS];
  endfunction

  // MII senders, one per ONU
  for (genvar gi = 0; gi < N; gi++) begin : g_mii
    logic dv = 0; logic [3:0] d = 0;
    assign m_dv[gi] = dv;
    assign m_d[gi]  = d;
    initial begin
      int n;
      @(posedge rst_n);
      repeat (20 + 7 * gi) @(posedge mclk[gi]);
      for (int f = 0; f < NUS; f++) begin
        n = ulen(gi, f);
        for (int k = 0; k < n; k++) begin
          logic [7:0] b;
          b = us_byte(gi, f, k);
          @(negedge mclk[gi]); dv = 1; d = b[3:0];
          @(negedge mclk[gi]); d = b[7:4];
        end
        @(negedge mclk[gi]); dv = 0; d = 0;
        repeat (24) @(negedge mclk[gi]);
      end
    end
  end

  // MII receivers: rebuild bytes (low nibble first) and check each frame
  int mii_ok [N], mii_bad [N];
  for (genvar gi = 0; gi < N; gi++) begin : g_mrx
    logic [7:0] bytes[$];
    logic [3:0] lo; bit half = 0; bit was = 0;
    always @(posedge mclk[gi]) begin
      if (!rst_n) ;
      else if (m_txen[gi]) begin
        if (!half) lo = m_txd[gi];
        else bytes.push_back({m_txd[gi], lo});
        half = !half;
      end else if (was) begin
        int f; bit ok;
        f = (bytes.size() > 1) ? int'(bytes[1]) : 0;
        ok = (f == mii_ok[gi] + mii_bad[gi]) && f < NDS && bytes.size() == ds_len[f] && !half;
        if (ok) foreach (bytes[k]) if (bytes[k] !== ds_byte(f, k)) ok = 0;
        if (ok) mii_ok[gi]++; else mii_bad[gi]++;
        bytes.delete(); half = 0;
      end
      was = m_txen[gi];
    end
  end

  // GMII sender (downstream), paced to the 100 Mb/s of the user ports
  initial begin
    @(posedge rst_n);
    repeat (50) @(posedge gclk);
    for (int f = 0; f < NDS; f++) begin
      for (int k = 0; k < ds_len[f]; k++) begin @(negedge gclk); g_dv = 1; g_d = ds_byte(f, k); end
      @(negedge gclk); g_dv = 0; g_d = 0;
      repeat (10 * ds_len[f] + 300) @(negedge gclk);
    end
  end

  // GMII receiver (upstream)
  int g_ok = 0, g_bad = 0, switches = 0, last_src = -1;
  int next_f [N], from [N], multi_seg_frames = 0;
  initial for (int i = 0; i < N; i++) begin next_f[i] = 0; from[i] = 0; end
  logic [7:0] gbytes[$]; bit g_was = 0;
  always @(posedge gclk) begin
    if (!rst_n) ;
    else if (g_txen) gbytes.push_back(g_txd);
    else if (g_was) begin
      int i, f; bit ok;
      i = (gbytes.size() > 0) ? int'(gbytes[0]) - 'hA1 : -1;
      f = (gbytes.size() > 1) ? int'(gbytes[1]) : -1;
      ok = i >= 0 && i < N && f == next_f[i] && f < NUS && gbytes.size() == ulen(i, f);
      if (ok) foreach (gbytes[k]) if (gbytes[k] !== us_byte(i, f, k)) ok = 0;
      if (ok) begin
        g_ok++; next_f[i]++; from[i]++;
        if (last_src >= 0 && last_src != i) switches++;
        last_src = i;
        if (ulen(i, f) > US_PAYLOAD_BYTES) multi_seg_frames++;
      end else g_bad++;
      gbytes.delete();
    end
    g_was = g_txen;
  end

  // slot decisions, seen through ONU 1's DBA processor and compared with all
  int slots = 0, idle_slots = 0, ties = 0, rule_bad = 0, disagree = 0;
  always @(posedge cclk) if (rst_n && dut.g_onu[0].u_onu.u_dba.decided) begin
    logic [15:0] best; int bid, nbest;
    best = 0; bid = 0; nbest = 0;
    for (int i = 0; i < N; i++) begin
      logic [15:0] q;
      q = dut.g_onu[0].u_onu.u_dba.table_q[i];
      if (q > best) begin best = q; bid = i + 1; nbest = 1; end
      else if (q == best && q != 0) nbest++;
    end
    slots++;
    if (bid == 0) idle_slots++;
    if (nbest > 1) ties++;
    if (int'(ust[0].winner_id) != bid) rule_bad++;
    if (ust[1].winner_id != ust[0].winner_id || ust[2].winner_id != ust[0].winner_id ||
        ust[3].winner_id != ust[0].winner_id) disagree++;
  end

  initial begin
    #3000000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int exp_pk, t, segs, grants, drops;
    bit all_granted, offs;
    for (int i = 0; i < N; i++) begin mii_ok[i] = 0; mii_bad[i] = 0; end
    repeat (5) @(negedge pclk);
    rst_n = 1;
    t = 0;
    while (t < 20000 && !(g_ok + g_bad == N * NUS &&
           mii_ok[0] + mii_bad[0] == NDS && mii_ok[1] + mii_bad[1] == NDS &&
           mii_ok[2] + mii_bad[2] == NDS && mii_ok[3] + mii_bad[3] == NDS)) begin
      #100; t++;
    end
    #20000;
    exp_pk = 0;
    for (int i = 0; i < N; i++) for (int f = 0; f < NUS; f++)
      exp_pk += (ulen(i, f) + US_PAYLOAD_BYTES - 1) / US_PAYLOAD_BYTES;
    for (int i = 0; i < N; i++)
      check(mii_ok[i] == NDS && mii_bad[i] == 0, $sformatf("downstream frames intact at ONU %0d", i + 1));
    offs = 1;
    for (int i = 0; i < N; i++) if (int'(ust[i].ds_bit_offset) != dshift[i]) offs = 0;
    check(offs, "every ONU found its downstream bit offset");
    check(g_ok == N * NUS && g_bad == 0, "upstream frames from all ONUs intact at the GMII");
    all_granted = 1; segs = 0; grants = 0; drops = 0;
    for (int i = 0; i < N; i++) begin
      if (ust[i].grants == 0 || from[i] != NUS) all_granted = 0;
      segs += int'(ust[i].segments); grants += int'(ust[i].bursts);
      drops += int'(ust[i].us_frames_drop) + int'(ust[i].ds_frames_drop);
    end
    check(all_granted, "every ONU granted and served");
    check(segs == exp_pk && grants == exp_pk && int'(ost.us_packets) == exp_pk,
          $sformatf("%0d packets framed, sent and received", exp_pk));
    check(int'(ost.us_frames) == N * NUS && multi_seg_frames > 0, "multi-packet frames rebuilt on EOFB");
    check(bursts_seen == exp_pk && bad_burst == 0, "every burst is one 280-byte packet");
    check(overlap == 0, "bursts never overlap on the fibre");
    check(rule_bad == 0 && disagree == 0, "every slot decided by the rule, same in all ONUs");
    check(idle_slots > 0 && ties > 0, "idle slots and ties occurred");
    check(switches > N, "frames of different ONUs interleaved on the GMII");
    check(drops == 0 && ost.gmii_rx_drop == 0 && ost.us_frames_drop == 0, "no frame dropped");
    check(ost.underruns == 0 && ust[0].underruns == 0 && ust[1].underruns == 0 &&
          ust[2].underruns == 0 && ust[3].underruns == 0, "no buffer underrun");
    $display("mechanisms: ds_realign=%0d us_packets=%0d multi_seg_frames=%0d slots=%0d idle=%0d ties=%0d grants=%0d/%0d/%0d/%0d switches=%0d overlaps=%0d",
             N - (dshift[1] == 0), exp_pk, multi_seg_frames, slots, idle_slots, ties,
             ust[0].grants, ust[1].grants, ust[2].grants, ust[3].grants, switches, overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
