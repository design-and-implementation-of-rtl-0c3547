// tb_eth_rx_mac: checks the receive MAC in its GMII (8-bit) and MII (4-bit)
// forms: every unit of a frame reaches the buffer in order, the byte length
// is written once the frame ends, a frame is dropped when the buffer lacks
// room, and an over-long frame is cut.
// The interface widths and clocks follow the design; frame sizes and the
// overflow cases are this testbench's own.
module tb_eth_rx_mac;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- GMII form ----
  logic g_dv = 0; logic [7:0] g_d = 0;
  logic g_wr, g_lwe; logic [7:0] g_wd; logic [15:0] g_len, g_ok, g_drop;
  logic [11:0] g_free = 12'd2048; logic g_lfull = 0;
  eth_rx_mac #(.DW(8), .AW(11), .MAX_BYTES(200)) dut8 (
    .clk(clk), .rst_n(rst_n), .rx_dv(g_dv), .rxd(g_d),
    .wr_en(g_wr), .wr_data(g_wd), .wr_len_we(g_lwe), .wr_len(g_len),
    .wr_free_words(g_free), .wr_len_full(g_lfull),
    .frames_ok(g_ok), .frames_dropped(g_drop));

  // ---- MII form ----
  logic m_dv = 0; logic [3:0] m_d = 0;
  logic m_wr, m_lwe; logic [3:0] m_wd; logic [15:0] m_len, m_ok, m_drop;
  logic [11:0] m_free = 12'd2048; logic m_lfull = 0;
  eth_rx_mac #(.DW(4), .AW(11), .MAX_BYTES(1526)) dut4 (
    .clk(clk), .rst_n(rst_n), .rx_dv(m_dv), .rxd(m_d),
    .wr_en(m_wr), .wr_data(m_wd), .wr_len_we(m_lwe), .wr_len(m_len),
    .wr_free_words(m_free), .wr_len_full(m_lfull),
    .frames_ok(m_ok), .frames_dropped(m_drop));

  logic [7:0] g_seen[$]; logic [3:0] m_seen[$];
  int g_lens[$], m_lens[$];
  always @(posedge clk) begin
    if (g_wr) g_seen.push_back(g_wd);
    if (g_lwe) g_lens.push_back(int'(g_len));
    if (m_wr) m_seen.push_back(m_wd);
    if (m_lwe) m_lens.push_back(int'(m_len));
    if (g_wr && g_lwe) begin failures++; $display("FAIL: data and length in one cycle"); end
  end

  task automatic gmii_frame(input int n, input int seed);
    for (int k = 0; k < n; k++) begin
      @(negedge clk); g_dv = 1; g_d = 8'(seed + k * 3);
    end
    @(negedge clk); g_dv = 0;
    repeat (12) @(negedge clk);
  endtask

  task automatic mii_frame(input int nbytes, input int seed);
    for (int k = 0; k < nbytes; k++) begin
      logic [7:0] b; b = 8'(seed + k * 5);
      @(negedge clk); m_dv = 1; m_d = b[3:0];
      @(negedge clk); m_d = b[7:4];
    end
    @(negedge clk); m_dv = 0;
    repeat (12) @(negedge clk);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n;
    repeat (3) @(negedge clk); rst_n = 1;
    // GMII: two frames, then one with no room, then one over MAX_BYTES
    gmii_frame(72, 1);
    check(g_lens.size() == 1 && g_lens[0] == 72, "GMII length 72");
    check(g_seen.size() == 72, "GMII 72 bytes stored");
    n = 0; foreach (g_seen[k]) if (g_seen[k] !== 8'(1 + k * 3)) n++;
    check(n == 0, "GMII bytes in order");
    g_seen.delete();
    gmii_frame(65, 9);
    check(g_lens.size() == 2 && g_lens[1] == 65, "GMII odd length 65");
    check(g_seen.size() == 65 && g_seen[64] == 8'(9 + 64 * 3), "GMII last byte");
    g_seen.delete();
    g_free = 12'd50;
    gmii_frame(40, 3);
    check(g_drop == 1 && g_lens.size() == 2 && g_seen.size() == 0, "GMII frame dropped when full");
    g_free = 12'd2048; g_lfull = 1;
    gmii_frame(40, 3);
    check(g_drop == 2 && g_seen.size() == 0, "GMII frame dropped when length memory full");
    g_lfull = 0;
    gmii_frame(230, 4);
    check(g_lens.size() == 3 && g_lens[2] == 200 && g_seen.size() == 200, "GMII frame cut at MAX_BYTES");
    check(g_ok == 3, "GMII frames_ok");
    // MII: nibbles, low first, and the byte count
    mii_frame(64, 2);
    check(m_lens.size() == 1 && m_lens[0] == 64, "MII length 64");
    check(m_seen.size() == 128, "MII 128 nibbles");
    n = 0;
    for (int k = 0; k < 64; k++) begin
      logic [7:0] b; b = 8'(2 + k * 5);
      if (m_seen[2*k] !== b[3:0] || m_seen[2*k+1] !== b[7:4]) n++;
    end
    check(n == 0, "MII nibbles in order, low nibble first");
    mii_frame(1526, 7);
    check(m_lens.size() == 2 && m_lens[1] == 1526, "MII maximum frame");
    check(m_ok == 2 && m_drop == 0, "MII counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
