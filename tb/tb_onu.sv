// tb_onu: checks one ONU (ONU-ID 1) in a two-ONU network where the
// testbench plays the OLT and ONU 2. Downstream: frames in the downstream
// format, delayed by 6 bits, must leave the MII transmit port intact.
// Upstream: frames enter the MII receive port. While the testbench's ONU 2
// reports a larger Q-size on the control channel the ONU must queue packets
// and stay dark; once ONU 2 reports 0 it must win the slots, send one
// 280-byte burst per won slot, and the bursts must carry the frames, split
// into packets with the right ONU-ID, EOFB and lengths.
// The formats and the largest-Q-size rule checked follow the design; a
// two-ONU network, ONU 2 played from the slot counter of the ONU under test,
// and the frame sizes are this testbench's own.
module tb_onu;
  import dhpon_pkg::*;
  int checks = 0, failures = 0;
  logic rst_n = 0, pclk = 0, mclk = 0, cclk = 0;
  always #6.43 pclk = ~pclk;
  always #20   mclk = ~mclk;
  always #4    cclk = ~cclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [15:0] ds_rx = IDLE_WORD, us_tx;
  logic us_en, c_tx, c_rx;
  logic m_dv = 0; logic [3:0] m_d = 0;
  logic m_txen; logic [3:0] m_txd;
  onu_status_t st;
  onu #(.NUM_ONU(2)) dut (
    .pon_clk(pclk), .mii_clk(mclk), .ctrl_clk(cclk), .rst_n(rst_n), .onu_id(8'd1),
    .ds_rx_word(ds_rx), .us_tx_word(us_tx), .us_tx_en(us_en), .ctrl_tx(c_tx), .ctrl_rx(c_rx),
    .mii_rx_dv(m_dv), .mii_rxd(m_d), .mii_tx_en(m_txen), .mii_txd(m_txd), .status(st));

  // control channel: ONU 2 played by the testbench, in its own sub-slot
  logic [15:0] q2 = 16'hFFFF;
  logic tb_tx = 0;
  logic [2:0] line_d = '0;
  always @(posedge cclk) begin
    int b;
    logic [63:0] m;
    b = int'(dut.u_dba.bitc) - CTRL_MSG_BITS;
    m = {{4{CTRL_PREAMBLE}}, DELIM, 8'd2, q2};
    tb_tx  <= (b >= 0 && b < CTRL_MSG_BITS) ? m[63 - b] : 1'b0;
    line_d <= {line_d[1:0], c_tx | tb_tx};
  end
  assign c_rx = line_d[2];

  function automatic logic [7:0] dsb(input int f, input int k);
    return (k == 0) ? 8'(f) : 8'(f * 9 + k);
  endfunction
  function automatic logic [7:0] usb(input int f, input int k);
    return (k == 0) ? 8'(f) : 8'(f * 13 + k * 7);
  endfunction
  int dlen [4] = '{64, 1518, 333, 46};
  int ulen [4] = '{1518, 60, 537, 268};

  // downstream channel
  logic [15:0] prev = IDLE_WORD;
  task automatic send_word(input logic [15:0] w);
    @(negedge pclk);
    ds_rx = 16'(({prev, w}) >> 6);
    prev = w;
  endtask

  // MII transmit capture
  int m_ok = 0, m_bad = 0;
  logic [7:0] mb[$]; logic [3:0] lo; bit half = 0, was = 0;
  always @(posedge mclk) if (rst_n) begin
    if (m_txen) begin
      if (!half) lo = m_txd; else mb.push_back({m_txd, lo});
      half = !half;
    end else if (was) begin
      int f; bit ok;
      f = int'(mb[0]);
      ok = f == m_ok + m_bad && f < 4 && mb.size() == dlen[f];
      if (ok) foreach (mb[k]) if (mb[k] !== dsb(f, k)) ok = 0;
      if (ok) m_ok++; else m_bad++;
      mb.delete(); half = 0;
    end
    was = m_txen;
  end

  // upstream burst capture: parse each burst as a DHPON packet
  int bursts = 0, bad_pkt = 0, up_ok = 0, up_bad = 0, bursts_early = 0;
  logic [15:0] bw[$]; bit en_was = 0;
  logic [7:0] fbytes[$];
  always @(posedge pclk) if (rst_n) begin
    if (us_en) bw.push_back(us_tx);
    else if (en_was) begin
      int seg;
      bursts++;
      if (q2 != 0) bursts_early++;
      if (bw.size() != US_PKT_WORDS || bw[0] != PREAMBLE_WORD || bw[3] != PREAMBLE_WORD ||
          bw[4] != {DELIM, 8'd1}) bad_pkt++;
      else begin
        seg = int'(bw[5][14:0]);
        for (int k = 0; k < seg; k++) fbytes.push_back(k[0] ? bw[6 + k / 2][7:0] : bw[6 + k / 2][15:8]);
        for (int k = (seg + 1) / 2; k < US_PAYLOAD_WORDS; k++) if (bw[6 + k] != PAD_WORD) bad_pkt++;
        if (bw[5][EOFB_BIT]) begin
          int f; bit ok;
          f = int'(fbytes[0]);
          ok = f == up_ok + up_bad && f < 4 && fbytes.size() == ulen[f];
          if (ok) foreach (fbytes[k]) if (fbytes[k] !== usb(f, k)) ok = 0;
          if (ok) up_ok++; else up_bad++;
          fbytes.delete();
        end
      end
      bw.delete();
    end
    en_was = us_en;
  end

  initial begin
    #1500000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int exp_pk;
    repeat (4) @(negedge pclk); rst_n = 1;
    fork
      begin
        repeat (10) send_word(IDLE_WORD);
        for (int f = 0; f < 4; f++) begin
          send_word(PSYNC_WORD); send_word({PSYNC_WORD[15:8], DELIM}); send_word(16'(dlen[f]));
          for (int k = 0; k < dlen[f]; k += 2)
            send_word({dsb(f, k), (k + 1 < dlen[f]) ? dsb(f, k + 1) : 8'h00});
          repeat (5) send_word(IDLE_WORD);
        end
        forever send_word(IDLE_WORD);
      end
      begin
        repeat (10) @(negedge mclk);
        for (int f = 0; f < 4; f++) begin
          for (int k = 0; k < ulen[f]; k++) begin
            logic [7:0] b;
            b = usb(f, k);
            @(negedge mclk); m_dv = 1; m_d = b[3:0];
            @(negedge mclk); m_d = b[7:4];
          end
          @(negedge mclk); m_dv = 0; m_d = 0;
          repeat (24) @(negedge mclk);
        end
      end
    join_any
    exp_pk = 0;
    for (int f = 0; f < 4; f++) exp_pk += (ulen[f] + US_PAYLOAD_BYTES - 1) / US_PAYLOAD_BYTES;
    #30000;
    check(bursts == 0 && int'(st.q_size) == exp_pk, "ONU stays dark and queues while ONU 2 has more");
    check(int'(st.winner_id) == 2, "ONU 2 wins while its Q-size is larger");
    q2 = 16'd0;
    #60000;
    check(m_ok == 4 && m_bad == 0, "downstream frames intact on MII");
    check(int'(st.ds_bit_offset) == 6, "downstream bit offset found");
    check(bursts == exp_pk && bad_pkt == 0 && bursts_early == 0, "one well-formed burst per packet after winning");
    check(up_ok == 4 && up_bad == 0, "upstream frames carried whole, segmented with EOFB");
    check(int'(st.grants) >= exp_pk && int'(st.bursts) == exp_pk && st.q_size == 0, "grants drain the queue");
    check(st.us_frames_drop == 0 && st.ds_frames_drop == 0 && st.underruns == 0, "no drops, no underruns");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
