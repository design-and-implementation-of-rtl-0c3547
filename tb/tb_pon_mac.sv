// tb_pon_mac: checks the ONU downstream receiver. A stream of idle words
// and downstream frames is bit-shifted (a different shift for each frame, as
// a SerDes without word alignment would deliver it) and fed in; the
// payload words and the length must reach the buffer, headers and idle must
// not, a false header inside a payload must be ignored, and a frame that does
// not fit is dropped and counted.
// The header format and the bit realignment follow the design; the drop
// rule checked is this design's own.
module tb_pon_mac;
  import dhpon_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #6.43 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [15:0] rx = IDLE_WORD;
  logic wr, lwe, locked; logic [15:0] wd, wl, ok_n, drop_n; logic [3:0] off;
  logic [11:0] free = 12'd2048; logic lfull = 0;
  pon_mac #(.AW(11), .MAX_BYTES(1526)) dut (
    .clk(clk), .rst_n(rst_n), .rx_word(rx), .wr_en(wr), .wr_data(wd), .wr_len_we(lwe),
    .wr_len(wl), .wr_free_words(free), .wr_len_full(lfull),
    .locked(locked), .bit_offset(off), .frames_ok(ok_n), .frames_dropped(drop_n));

  logic [15:0] got_w[$]; int got_l[$];
  always @(posedge clk) begin
    if (wr) got_w.push_back(wd);
    if (lwe) got_l.push_back(int'(wl));
  end

  // the channel: the original word stream delayed by `shift` bits
  logic [15:0] prev_word = IDLE_WORD;
  int shift = 0;
  task automatic send_word(input logic [15:0] w);
    @(negedge clk);
    rx = 16'(({prev_word, w}) >> shift);
    prev_word = w;
  endtask

  function automatic logic [15:0] pw(input int p, input int k, input int n);
    logic [7:0] a, b;
    a = 8'(p * 13 + k * 2);
    b = (k * 2 + 1 < n) ? 8'(p * 13 + k * 2 + 1) : 8'h00;
    if (p == 1 && k == 4) return 16'hAAAA;   // a false header inside frame 1
    if (p == 1 && k == 5) return 16'hAAE2;
    return {a, b};
  endfunction

  task automatic send_frame(input int p, input int n);
    send_word(16'hAAAA); send_word(16'hAAE2); send_word(16'(n));
    for (int k = 0; k < (n + 1) / 2; k++) send_word(pw(p, k, n));
    repeat (3) send_word(IDLE_WORD);
  endtask

  initial begin
    repeat (4000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int lens[4] = '{64, 300, 1001, 80};
    int shifts[4] = '{0, 5, 11, 15};
    int base = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int p = 0; p < 4; p++) begin
      int bad;
      bad = 0;
      shift = shifts[p];
      repeat (4) send_word(IDLE_WORD);
      send_frame(p, lens[p]);
      repeat (4) @(negedge clk);
      check(got_l.size() == p + 1 && got_l[p] == lens[p], $sformatf("frame %0d length", p));
      check(off == 4'(shifts[p]), $sformatf("frame %0d bit offset %0d found", p, shifts[p]));
      check(got_w.size() == base + (lens[p] + 1) / 2, $sformatf("frame %0d word count", p));
      for (int k = 0; k < (lens[p] + 1) / 2; k++)
        if (got_w[base + k] !== pw(p, k, lens[p])) bad++;
      check(bad == 0, $sformatf("frame %0d payload words", p));
      base += (lens[p] + 1) / 2;
    end
    check(ok_n == 4 && drop_n == 0, "four frames stored");
    // no room: dropped
    free = 12'd20;
    send_frame(5, 100);
    repeat (4) @(negedge clk);
    check(drop_n == 1 && got_l.size() == 4 && got_w.size() == base, "frame dropped when buffer full");
    free = 12'd2048;
    send_frame(6, 46);
    repeat (4) @(negedge clk);
    check(ok_n == 5 && got_l.size() == 5 && got_l[4] == 46, "receives again after a drop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
