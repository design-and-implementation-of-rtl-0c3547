// tb_ds_framer: checks the OLT downstream framer: idle 5555 between frames,
// header AAAA AAE2 LEN before each one, the payload words in order and at
// least two idle words between frames; one frame is an odd length.
// The header format checked follows the design; the idle value 5555 and the
// two-word minimum gap are this design's own.
module tb_ds_framer;
  import dhpon_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #6.43 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic lv, lp, wv, wp; logic [15:0] l, w, tx, sent, und;
  tb_pkt_source src (.clk(clk), .rd_len_valid(lv), .rd_len(l), .rd_len_pop(lp),
                     .rd_word_valid(wv), .rd_word(w), .rd_word_pop(wp));
  ds_framer dut (.clk(clk), .rst_n(rst_n), .rd_len_valid(lv), .rd_len(l), .rd_len_pop(lp),
                 .rd_word_valid(wv), .rd_word(w), .rd_word_pop(wp),
                 .tx_word(tx), .frames_sent(sent), .underruns(und));

  logic [15:0] stream[$];
  always @(posedge clk) if (rst_n) stream.push_back(tx);

  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int lens[3] = '{64, 1512, 65};
    int i, gaps, pkt;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (5) @(negedge clk);
    foreach (lens[k]) src.push_packet(lens[k]);
    repeat (1800) @(negedge clk);
    check(sent == 3 && und == 0, "three frames sent, no underrun");
    // parse the captured stream
    i = 0; pkt = 0;
    while (i < stream.size() && stream[i] == IDLE_WORD) i++;
    check(i >= 2, "idle before the first frame");
    for (pkt = 0; pkt < 3; pkt++) begin
      int bad;
      bad = 0;
      check(stream[i] == 16'hAAAA && stream[i+1] == 16'hAAE2, $sformatf("frame %0d PSYNC and delimiter", pkt));
      check(stream[i+2] == 16'(lens[pkt]), $sformatf("frame %0d length field", pkt));
      i += 3;
      for (int k = 0; k < lens[pkt]; k += 2) begin
        logic [15:0] exp;
        exp = {src.pat(pkt, k), (k + 1 < lens[pkt]) ? src.pat(pkt, k + 1) : 8'h00};
        if (stream[i] !== exp) bad++;
        i++;
      end
      check(bad == 0, $sformatf("frame %0d payload", pkt));
      gaps = 0;
      while (i < stream.size() && stream[i] == IDLE_WORD) begin gaps++; i++; end
      check(gaps >= 2, $sformatf("idle gap after frame %0d", pkt));
    end
    check(i == stream.size(), "nothing after the last frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
