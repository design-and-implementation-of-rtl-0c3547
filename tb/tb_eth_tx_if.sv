// tb_eth_tx_if: checks the GMII (8-bit) and MII (4-bit) transmitters: each
// stored packet leaves exactly as stored (MII low nibble first), tx_en is
// high for exactly the frame, and at least 12 byte times pass between frames.
// The interface widths follow the design; the 12-byte gap checked is this
// design's own choice.
module tb_eth_tx_if;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic glv, glp, gwv, gwp, gen; logic [15:0] gl, gw, gsent, gund; logic [7:0] gd;
  logic mlv, mlp, mwv, mwp, men; logic [15:0] ml, mw, msent, mund; logic [3:0] md;
  tb_pkt_source gsrc (.clk(clk), .rd_len_valid(glv), .rd_len(gl), .rd_len_pop(glp),
                      .rd_word_valid(gwv), .rd_word(gw), .rd_word_pop(gwp));
  tb_pkt_source msrc (.clk(clk), .rd_len_valid(mlv), .rd_len(ml), .rd_len_pop(mlp),
                      .rd_word_valid(mwv), .rd_word(mw), .rd_word_pop(mwp));
  eth_tx_if #(.DW(8)) dut8 (.clk(clk), .rst_n(rst_n), .rd_len_valid(glv), .rd_len(gl),
    .rd_len_pop(glp), .rd_word_valid(gwv), .rd_word(gw), .rd_word_pop(gwp),
    .tx_en(gen), .txd(gd), .frames_sent(gsent), .underruns(gund));
  eth_tx_if #(.DW(4)) dut4 (.clk(clk), .rst_n(rst_n), .rd_len_valid(mlv), .rd_len(ml),
    .rd_len_pop(mlp), .rd_word_valid(mwv), .rd_word(mw), .rd_word_pop(mwp),
    .tx_en(men), .txd(md), .frames_sent(msent), .underruns(mund));

  // capture frames as runs of tx_en, and the gaps between them
  logic [7:0] gf[$][$]; logic [3:0] mf[$][$];
  logic [7:0] gcur[$];  logic [3:0] mcur[$];
  int ggap = 0, mgap = 0, gmin = 1000, mmin = 1000;
  logic gen_q = 0, men_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (gen) begin gcur.push_back(gd); if (!gen_q && gf.size() > 0 && ggap < gmin) gmin = ggap; ggap = 0; end
    else begin ggap++; if (gen_q) begin gf.push_back(gcur); gcur.delete(); end end
    if (men) begin mcur.push_back(md); if (!men_q && mf.size() > 0 && mgap < mmin) mmin = mgap; mgap = 0; end
    else begin mgap++; if (men_q) begin mf.push_back(mcur); mcur.delete(); end end
    gen_q <= gen; men_q <= men;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int lens[3] = '{64, 1526, 71};
    repeat (3) @(negedge clk); rst_n = 1;
    foreach (lens[k]) begin gsrc.push_packet(lens[k]); msrc.push_packet(lens[k]); end
    repeat (8000) @(negedge clk);
    check(gf.size() == 3 && mf.size() == 3, "three frames on each interface");
    check(gsent == 3 && msent == 3 && gund == 0 && mund == 0, "counters");
    for (int p = 0; p < 3 && p < gf.size() && p < mf.size(); p++) begin
      int bad;
      bad = 0;
      check(gf[p].size() == lens[p], $sformatf("GMII frame %0d is %0d bytes", p, lens[p]));
      check(mf[p].size() == 2 * lens[p], $sformatf("MII frame %0d is %0d nibbles", p, 2 * lens[p]));
      for (int k = 0; k < lens[p] && k < gf[p].size(); k++) if (gf[p][k] !== gsrc.pat(p, k)) bad++;
      check(bad == 0, $sformatf("GMII frame %0d bytes", p));
      bad = 0;
      for (int k = 0; k < lens[p] && 2 * k + 1 < mf[p].size(); k++) begin
        logic [7:0] b; b = msrc.pat(p, k);
        if (mf[p][2*k] !== b[3:0] || mf[p][2*k+1] !== b[7:4]) bad++;
      end
      check(bad == 0, $sformatf("MII frame %0d nibbles, low first", p));
    end
    check(gmin >= 12, $sformatf("GMII gap %0d >= 12 bytes", gmin));
    check(mmin >= 24, $sformatf("MII gap %0d >= 24 nibbles", mmin));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
