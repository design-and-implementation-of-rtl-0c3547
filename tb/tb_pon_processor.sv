// tb_pon_processor: checks the OLT upstream receiver. Upstream bursts from
// several ONUs are built as 280-byte DHPON packets (preamble, delimiter and
// ONU-ID, EOFB and length, 134 payload words), each shifted by its own bit
// offset, as the bursts of different ONUs arrive with unrelated phase. The
// line between bursts alternates between dark (0000) and an idle pattern of
// 5555, which must not be taken for a packet start. Frames are split into up to six packets and
// the packets of different ONUs are interleaved. The checker rebuilds each
// ONU's expected words and frame lengths and compares them with what the
// receiver writes into that ONU's buffer. Also checked: a packet with an
// unknown ONU-ID is ignored, and a frame that finds its buffer without room
// is dropped as a whole and counted.
// The packet format, sorting by ONU-ID and closing on EOFB follow the
// design; the drop and false-sync rules checked are this design's own.
module tb_pon_processor;
  import dhpon_pkg::*;
  localparam int N = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #6.43 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [15:0] rx = 16'h0;
  logic [N-1:0] wr, lwe; logic [15:0] wd, wl;
  logic [11:0] free [N];
  logic [N-1:0] lfull = '0;
  logic [7:0] last_id; logic [15:0] last_len, pk_n, ok_n, drop_n;
  pon_processor #(.NUM_ONU(N), .AW(11), .MAX_BYTES(1526)) dut (
    .clk(clk), .rst_n(rst_n), .rx_word(rx), .wr_en(wr), .wr_data(wd),
    .wr_len_we(lwe), .wr_len(wl), .wr_free_words(free), .wr_len_full(lfull),
    .last_onu_id(last_id), .last_length(last_len), .packets_ok(pk_n),
    .frames_ok(ok_n), .frames_dropped(drop_n));

  logic [15:0] got_w [N][$];
  int          got_l [N][$];
  logic [15:0] exp_w [N][$];
  int          exp_l [N][$];
  int          multi_wr = 0;
  always @(posedge clk) begin
    if ($countones(wr) > 1 || $countones(lwe) > 1) multi_wr++;
    for (int i = 0; i < N; i++) begin
      if (wr[i])  got_w[i].push_back(wd);
      if (lwe[i]) got_l[i].push_back(int'(wl));
    end
  end

  // the channel: each burst delayed by its own number of bits; between bursts
  // the line is idle_w, 0000 (dark) or 5555, swapped after every packet
  logic [15:0] prev_word = 16'h0;
  logic [15:0] idle_w = 16'h0;
  int shift = 0;
  task automatic send_word(input logic [15:0] w);
    @(negedge clk);
    rx = 16'(({prev_word, w}) >> shift);
    prev_word = w;
  endtask

  function automatic logic [7:0] fb(input int id, input int f, input int k);
    return 8'(id * 31 + f * 7 + k);
  endfunction

  // one upstream packet: segment s of frame f (n bytes) of ONU `id`
  task automatic send_packet(input int id, input int f, input int n, input int s,
                             input int sh);
    int first, seg;
    logic eofb;
    first = s * US_PAYLOAD_BYTES;
    seg   = (n - first > US_PAYLOAD_BYTES) ? US_PAYLOAD_BYTES : n - first;
    eofb  = (first + seg == n);
    shift = sh;
    repeat (3) send_word(idle_w);
    repeat (4) send_word(PREAMBLE_WORD);
    send_word({DELIM, 8'(id)});
    send_word({eofb, 15'(seg)});
    for (int k = 0; k < US_PAYLOAD_WORDS; k++) begin
      logic [7:0] a, b;
      a = (2 * k < seg) ? fb(id, f, first + 2 * k) : 8'h00;
      b = (2 * k + 1 < seg) ? fb(id, f, first + 2 * k + 1) : 8'h00;
      send_word({a, b});
    end
    repeat (3) send_word(idle_w);
    idle_w = (idle_w == 16'h0) ? 16'h5555 : 16'h0;
  endtask

  function automatic int nseg(input int n);
    return (n + US_PAYLOAD_BYTES - 1) / US_PAYLOAD_BYTES;
  endfunction

  task automatic expect_frame(input int id, input int f, input int n);
    for (int s = 0; s < nseg(n); s++) begin
      int first, seg;
      first = s * US_PAYLOAD_BYTES;
      seg   = (n - first > US_PAYLOAD_BYTES) ? US_PAYLOAD_BYTES : n - first;
      for (int k = 0; 2 * k < seg; k++) begin
        logic [7:0] b;
        b = (2 * k + 1 < seg) ? fb(id, f, first + 2 * k + 1) : 8'h00;
        exp_w[id-1].push_back({fb(id, f, first + 2 * k), b});
      end
    end
    exp_l[id-1].push_back(n);
  endtask

  function automatic bit same(input int i);
    if (got_w[i].size() != exp_w[i].size() || got_l[i].size() != exp_l[i].size()) return 0;
    foreach (exp_w[i][k]) if (got_w[i][k] !== exp_w[i][k]) return 0;
    foreach (exp_l[i][k]) if (got_l[i][k] != exp_l[i][k]) return 0;
    return 1;
  endfunction

  initial begin
    repeat (12000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) free[i] = 12'd2048;
    repeat (3) @(negedge clk); rst_n = 1;
    // ONU 1: a 1518-byte frame (6 packets) interleaved with short frames of
    // ONUs 2, 3 and 4 and a 600-byte frame of ONU 2 (3 packets)
    send_packet(1, 0, 1518, 0, 3);
    send_packet(2, 0, 46, 0, 12);
    send_packet(1, 0, 1518, 1, 0);
    send_packet(3, 0, 268, 0, 15);
    send_packet(2, 1, 600, 0, 7);
    send_packet(1, 0, 1518, 2, 9);
    send_packet(4, 0, 64, 0, 1);
    send_packet(2, 1, 600, 1, 4);
    send_packet(1, 0, 1518, 3, 14);
    send_packet(1, 0, 1518, 4, 2);
    send_packet(2, 1, 600, 2, 6);
    send_packet(1, 0, 1518, 5, 11);
    send_packet(3, 1, 269, 0, 8);
    send_packet(3, 1, 269, 1, 5);
    repeat (4) @(negedge clk);
    expect_frame(1, 0, 1518);
    expect_frame(2, 0, 46);  expect_frame(2, 1, 600);
    expect_frame(3, 0, 268); expect_frame(3, 1, 269);
    expect_frame(4, 0, 64);
    for (int i = 0; i < N; i++) check(same(i), $sformatf("ONU %0d frames rebuilt", i + 1));
    check(pk_n == 14 && ok_n == 6 && drop_n == 0, "packet and frame counts");
    check(last_id == 3 && last_len == 16'h8001, "last ONU-ID and EOFB/length");
    check(multi_wr == 0, "one buffer written at a time");
    // unknown ONU-ID: ignored
    send_packet(6, 0, 100, 0, 5);
    repeat (4) @(negedge clk);
    check(pk_n == 14 && got_w[0].size() == exp_w[0].size(), "unknown ONU-ID ignored");
    // ONU 2's buffer without room at the start of a frame: whole frame dropped
    free[1] = 12'd100;
    send_packet(2, 2, 400, 0, 10);
    free[1] = 12'd2048;
    send_packet(2, 2, 400, 1, 10);
    send_packet(4, 1, 90, 0, 13);
    repeat (4) @(negedge clk);
    expect_frame(4, 1, 90);
    check(drop_n == 1 && ok_n == 7, "frame dropped when buffer has no room");
    check(same(1) && same(3), "drop leaves other frames intact");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
