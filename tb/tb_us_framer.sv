// tb_us_framer: checks the ONU upstream framer. Packets of 64, 268, 269,
// 1526 and 537 bytes must become 1, 1, 2, 6 and 3 DHPON packets of exactly 140
// words: preamble, {E2, ONU-ID}, {EOFB, length} with 010C on full payloads
// and EOFB only on the last, the payload in order and zero fill. While the
// queue reports no room nothing is written.
// The packet format checked (280 bytes, 268-byte payloads, EOFB) follows the
// design; the fill value 0000 and the frame sizes are this design's own.
module tb_us_framer;
  import dhpon_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #6.43 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic lv, lp, wv, wp, qwr; logic [15:0] l, w, qd, segs, und;
  logic room = 0;
  tb_pkt_source src (.clk(clk), .rd_len_valid(lv), .rd_len(l), .rd_len_pop(lp),
                     .rd_word_valid(wv), .rd_word(w), .rd_word_pop(wp));
  us_framer dut (.clk(clk), .rst_n(rst_n), .onu_id(8'd3),
    .rd_len_valid(lv), .rd_len(l), .rd_len_pop(lp),
    .rd_word_valid(wv), .rd_word(w), .rd_word_pop(wp),
    .q_wr(qwr), .q_wdata(qd), .q_room(room), .segments(segs), .underruns(und));

  logic [15:0] q[$];
  int run = 0, bad_runs = 0;
  always @(posedge clk) if (rst_n) begin
    if (qwr) begin q.push_back(qd); run++; end
    else if (run != 0) begin if (run % 140 != 0) bad_runs++; run = 0; end
  end

  initial begin
    repeat (8000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int lens[5] = '{64, 268, 269, 1526, 537};
    int nseg[5] = '{1, 1, 2, 6, 3};
    int i = 0, total = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    foreach (lens[k]) src.push_packet(lens[k]);
    repeat (50) @(negedge clk);
    check(q.size() == 0, "nothing written while the queue has no room");
    room = 1;
    repeat (2500) @(negedge clk);
    foreach (nseg[k]) total += nseg[k];
    check(q.size() == 140 * total, $sformatf("%0d DHPON packets of 140 words", total));
    check(bad_runs == 0, "packets written as whole 140-word runs");
    check(segs == 16'(total) && und == 0, "segment counter");
    for (int p = 0; p < 5; p++) begin
      int rem, off;
      rem = lens[p]; off = 0;
      for (int s = 0; s < nseg[p]; s++) begin
        int seg, bad;
        logic eofb;
        bad = 0;
        seg  = (rem > 268) ? 268 : rem;
        eofb = (s == nseg[p] - 1);
        for (int k = 0; k < 4; k++) if (q[i+k] !== 16'h5555) bad++;
        check(bad == 0, $sformatf("pkt %0d seg %0d preamble", p, s));
        check(q[i+4] == 16'hE203, $sformatf("pkt %0d seg %0d delimiter and ONU-ID", p, s));
        check(q[i+5] == {eofb, 15'(seg)}, $sformatf("pkt %0d seg %0d EOFB/length %h", p, s, q[i+5]));
        bad = 0;
        for (int k = 0; k < 134; k++) begin
          logic [15:0] exp;
          if (2 * k < seg)
            exp = {src.pat(p, off + 2*k), (2*k + 1 < seg) ? src.pat(p, off + 2*k + 1) : 8'h00};
          else
            exp = PAD_WORD;
          if (q[i+6+k] !== exp) bad++;
        end
        check(bad == 0, $sformatf("pkt %0d seg %0d payload and fill", p, s));
        i += 140; rem -= seg; off += seg;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
