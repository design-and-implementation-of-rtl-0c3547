// tb_queue_buffer: checks the ONU queue data buffer: Q-size counts whole
// DHPON packets only, its Gray form follows, `room` falls when QPKTS packets
// are held, a grant sends one packet of 140 words in 140 clocks with tx_en
// high starting three clocks after the grant, and a grant on an empty queue
// sends nothing.
// The 140-clock burst follows the design; the three-clock latency, the depth
// and the empty-grant behaviour checked are this design's own.
module tb_queue_buffer;
  import dhpon_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #6.43 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic wr = 0, grant = 0, room, txen; logic [15:0] wd = 0, qs, qg, tx, bursts, eg;
  queue_buffer #(.QPKTS(4)) dut (.clk(clk), .rst_n(rst_n), .wr(wr), .wdata(wd), .room(room),
    .q_size(qs), .q_size_gray(qg), .grant(grant), .tx_en(txen), .tx_word(tx),
    .bursts(bursts), .empty_grants(eg));

  task automatic write_pkt(input int p, input int words);
    for (int k = 0; k < words; k++) begin
      @(negedge clk); wr = 1; wd = 16'(p * 1000 + k);
    end
    @(negedge clk); wr = 0;
  endtask

  // grant, then capture the burst and the clocks until it starts
  task automatic grant_and_check(input int p);
    int lat, n, bad;
    n = 0; bad = 0;
    @(negedge clk); grant = 1; @(negedge clk); grant = 0;
    lat = 1;
    while (!txen && lat < 20) begin @(negedge clk); lat++; end
    check(lat == 3, $sformatf("packet %0d: burst starts 3 clocks after the grant (%0d)", p, lat));
    while (txen) begin
      if (tx !== 16'(p * 1000 + n)) bad++;
      n++; @(negedge clk);
    end
    check(n == 140, $sformatf("packet %0d: tx_en high for 140 clocks (%0d)", p, n));
    check(bad == 0, $sformatf("packet %0d: words in order", p));
    check(tx == IDLE_WORD, "idle after the burst");
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk);
    check(qs == 0 && room && !txen, "empty after reset");
    @(negedge clk); grant = 1; @(negedge clk); grant = 0;
    repeat (5) @(negedge clk);
    check(eg == 1 && bursts == 0 && !txen, "grant on empty queue sends nothing");
    write_pkt(0, 139);
    check(qs == 0, "Q-size stays 0 before the 140th word");
    @(negedge clk); wr = 1; wd = 16'(139); @(negedge clk); wr = 0;
    check(qs == 1, "Q-size 1 after a whole packet");
    for (int p = 1; p < 4; p++) write_pkt(p, 140);
    check(qs == 4 && !room, $sformatf("four packets held, no room (%0d %0d)", qs, room));
    @(negedge clk);
    check(qg == (16'd4 ^ 16'd2), "Gray-coded Q-size");
    for (int p = 0; p < 4; p++) begin
      grant_and_check(p);
      check(qs == 16'(3 - p), $sformatf("Q-size %0d after burst %0d", 3 - p, p));
      if (p == 0) check(room, "room again after one burst");
    end
    check(bursts == 4, "four bursts");
    // write while sending: packet 4 written, granted, a fifth written during the burst
    write_pkt(4, 140);
    fork
      grant_and_check(4);
      write_pkt(5, 140);
    join
    check(qs == 1, "packet written during a burst is counted");
    grant_and_check(5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
