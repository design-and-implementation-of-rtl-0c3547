// tb_olt: checks the OLT on its own. Downstream: Ethernet frames go into the
// GMII receive port; the testbench parses the SerDes word stream (idle 5555,
// header AAAA AAE2, length, payload) and compares every frame. Upstream:
// DHPON packets of four ONUs, split frames interleaved between ONUs, each
// packet with its own bit shift and dark line between them, go into the
// SerDes receive port; the frames leaving the GMII transmit port must be the
// original frames, whole, in order per ONU.
// The line formats checked follow the design; bit shifts, interleaving and
// frame sizes are this testbench's own.
module tb_olt;
  import dhpon_pkg::*;
  localparam int N = 4;
  int checks = 0, failures = 0;
  logic rst_n = 0, pclk = 0, gclk = 0;
  always #6.43 pclk = ~pclk;
  always #4    gclk = ~gclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [15:0] ds_tx, us_rx = '0;
  logic g_dv = 0; logic [7:0] g_d = 0;
  logic g_txen; logic [7:0] g_txd;
  olt_status_t st;
  olt #(.NUM_ONU(N)) dut (
    .pon_clk(pclk), .gmii_clk(gclk), .rst_n(rst_n), .ds_tx_word(ds_tx), .us_rx_word(us_rx),
    .gmii_rx_dv(g_dv), .gmii_rxd(g_d), .gmii_tx_en(g_txen), .gmii_txd(g_txd), .status(st));

  function automatic logic [7:0] dsb(input int f, input int k);
    return (k == 0) ? 8'(f) : 8'(f * 5 + k * 3);
  endfunction
  function automatic logic [7:0] usb(input int id, input int f, input int k);
    if (k == 0) return 8'(id);
    if (k == 1) return 8'(f);
    return 8'(id * 29 + f * 3 + k);
  endfunction
  int dlen [6] = '{60, 1518, 47, 200, 1000, 64};

  // downstream parser
  int ds_ok = 0, ds_bad = 0, idle_words = 0;
  int pst = 0, plen = 0, pidx = 0;
  logic [7:0] pb[$];
  always @(posedge pclk) if (rst_n) begin
    case (pst)
      0: if (ds_tx == PSYNC_WORD) pst = 1; else if (ds_tx == IDLE_WORD) idle_words++;
      1: pst = (ds_tx == {PSYNC_WORD[15:8], DELIM}) ? 2 : 0;
      2: begin plen = int'(ds_tx); pb.delete(); pst = 3; end
      default: begin
        pb.push_back(ds_tx[15:8]);
        if (pb.size() < plen) pb.push_back(ds_tx[7:0]);
        if (pb.size() >= plen) begin
          int f; bit ok;
          f = int'(pb[0]);
          ok = f == ds_ok + ds_bad && f < 6 && plen == dlen[f];
          if (ok) foreach (pb[k]) if (pb[k] !== dsb(f, k)) ok = 0;
          if (ok) ds_ok++; else ds_bad++;
          pst = 0;
        end
      end
    endcase
  end

  // upstream channel and packets
  logic [15:0] prev = '0; int shift = 0;
  task automatic send_word(input logic [15:0] w);
    @(negedge pclk);
    us_rx = 16'(({prev, w}) >> shift);
    prev = w;
  endtask
  task automatic send_packet(input int id, input int f, input int n, input int s, input int sh);
    int first, seg;
    first = s * US_PAYLOAD_BYTES;
    seg   = (n - first > US_PAYLOAD_BYTES) ? US_PAYLOAD_BYTES : n - first;
    shift = sh;
    repeat (4) send_word(16'h0);
    repeat (4) send_word(PREAMBLE_WORD);
    send_word({DELIM, 8'(id)});
    send_word({(first + seg == n), 15'(seg)});
    for (int k = 0; k < US_PAYLOAD_WORDS; k++) begin
      logic [7:0] a, b;
      a = (2 * k < seg) ? usb(id, f, first + 2 * k) : 8'h00;
      b = (2 * k + 1 < seg) ? usb(id, f, first + 2 * k + 1) : 8'h00;
      send_word({a, b});
    end
    repeat (2) send_word(16'h0);
  endtask

  // GMII transmit capture
  int g_ok = 0, g_bad = 0;
  int nextf [N+1];
  int ulen [N+1][2];
  logic [7:0] gb[$]; bit was = 0;
  always @(posedge gclk) if (rst_n) begin
    if (g_txen) gb.push_back(g_txd);
    else if (was) begin
      int id, f; bit ok;
      id = int'(gb[0]); f = (gb.size() > 1) ? int'(gb[1]) : 9;
      ok = id >= 1 && id <= N && f == nextf[id] && f < 2 && gb.size() == ulen[id][f];
      if (ok) foreach (gb[k]) if (gb[k] !== usb(id, f, k)) ok = 0;
      if (ok) begin g_ok++; nextf[id]++; end else g_bad++;
      gb.delete();
    end
    was = g_txen;
  end

  initial begin
    #2000000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i <= N; i++) nextf[i] = 0;
    ulen[1] = '{1518, 100}; ulen[2] = '{600, 46}; ulen[3] = '{269, 268}; ulen[4] = '{64, 1000};
    repeat (4) @(negedge pclk); rst_n = 1;
    fork
      begin
        repeat (20) @(negedge gclk);
        for (int f = 0; f < 6; f++) begin
          for (int k = 0; k < dlen[f]; k++) begin @(negedge gclk); g_dv = 1; g_d = dsb(f, k); end
          @(negedge gclk); g_dv = 0; g_d = 0;
          repeat (12) @(negedge gclk);
        end
      end
      begin
        // round-robin over the ONUs, each sending its frames packet by packet
        int seg_i [N+1], fr_i [N+1];
        bit more;
        for (int i = 0; i <= N; i++) begin seg_i[i] = 0; fr_i[i] = 0; end
        more = 1;
        while (more) begin
          more = 0;
          for (int id = 1; id <= N; id++) if (fr_i[id] < 2) begin
            send_packet(id, fr_i[id], ulen[id][fr_i[id]], seg_i[id], (id * 5 + seg_i[id] * 3) % 16);
            seg_i[id]++;
            if (seg_i[id] * US_PAYLOAD_BYTES >= ulen[id][fr_i[id]]) begin seg_i[id] = 0; fr_i[id]++; end
            more = 1;
          end
        end
      end
    join
    #40000;
    check(ds_ok == 6 && ds_bad == 0, "downstream frames framed intact and in order");
    check(idle_words > 0, "idle words between downstream frames");
    check(int'(st.ds_frames_sent) == 6 && int'(st.gmii_rx_frames) == 6, "downstream counters");
    check(g_ok == 2 * N && g_bad == 0, "upstream frames rebuilt and sent on GMII");
    check(int'(st.us_frames) == 2 * N && int'(st.gmii_tx_frames) == 2 * N, "upstream counters");
    check(st.us_frames_drop == 0 && st.gmii_rx_drop == 0 && st.underruns == 0, "no drops, no underruns");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
