// tb_buffer_mux: checks the OLT upstream multiplexer. Four model buffers
// (tb_pkt_source) hold frames; a model transmitter reads frames through the
// multiplexer the way the GMII transmitter does (one word per clock, length
// popped with the last word). Checked: every frame arrives whole and
// unmixed, from the right buffer, in round-robin order starting after the
// buffer served last, and buffers without frames are skipped.
// The byte patterns and frame sizes are this testbench's own; the expected
// order is the round-robin rule, which is this design's own choice.
module tb_buffer_mux;
  localparam int N = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [N-1:0] lv, lp, wv, wp;
  logic [15:0] bl [N], bw [N], fr [N];
  logic rlv, rwv; logic [15:0] rl, rw;
  logic rlp = 0, rwp = 0;
  for (genvar i = 0; i < N; i++) begin : g_src
    tb_pkt_source src (.clk(clk), .rd_len_valid(lv[i]), .rd_len(bl[i]), .rd_len_pop(lp[i]),
                       .rd_word_valid(wv[i]), .rd_word(bw[i]), .rd_word_pop(wp[i]));
  end
  buffer_mux #(.NUM_ONU(N)) dut (
    .clk(clk), .rst_n(rst_n), .b_len_valid(lv), .b_len(bl), .b_len_pop(lp),
    .b_word_valid(wv), .b_word(bw), .b_word_pop(wp),
    .rd_len_valid(rlv), .rd_len(rl), .rd_len_pop(rlp), .rd_word_valid(rwv), .rd_word(rw),
    .rd_word_pop(rwp), .frames(fr));

  task automatic push(input int i, input int n);
    case (i)
      0: g_src[0].src.push_packet(n);
      1: g_src[1].src.push_packet(n);
      2: g_src[2].src.push_packet(n);
      default: g_src[3].src.push_packet(n);
    endcase
  endtask

  function automatic logic [7:0] pat(input int p, input int k);
    return 8'((p * 7 + k) & 8'hFF);
  endfunction

  // model transmitter; records the source of each frame and checks its words
  int order[$];
  int served [N];
  int bad_words = 0, bad_len = 0;
  int plen [N][$];
  bit reading = 0;
  int cur_src, cur_len, widx;
  always @(negedge clk) begin
    rlp <= 0; rwp <= 0;
    if (!reading && rlv) begin
      reading = 1; cur_src = int'(dut.sel); cur_len = int'(rl); widx = 0;
      if (plen[cur_src].size() == 0 || plen[cur_src][0] != cur_len) bad_len++;
      else void'(plen[cur_src].pop_front());
    end
    if (reading && rwv) begin
      logic [7:0] b;
      b = (2 * widx + 1 < cur_len) ? pat(served[cur_src], 2 * widx + 1) : 8'h00;
      if (rw !== {pat(served[cur_src], 2 * widx), b}) bad_words++;
      rwp <= 1;
      widx++;
      if (2 * widx >= cur_len) begin
        rlp <= 1; reading = 0; order.push_back(cur_src); served[cur_src]++;
      end
    end
  end

  task automatic add(input int i, input int n);
    plen[i].push_back(n);
    push(i, n);
  endtask

  task automatic wait_done(input int total);
    int t;
    t = 0;
    while (order.size() < total && t < 5000) begin @(posedge clk); t++; end
    repeat (4) @(posedge clk);
  endtask

  initial begin
    repeat (8000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int exp1[8] = '{0, 1, 2, 3, 0, 1, 2, 3};
    bit ok;
    for (int i = 0; i < N; i++) served[i] = 0;
    repeat (3) @(negedge clk);
    // two frames in every buffer before the multiplexer starts
    for (int r = 0; r < 2; r++) for (int i = 0; i < N; i++) add(i, 40 + 10 * i + r);
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait_done(8);
    ok = order.size() == 8;
    for (int k = 0; k < 8 && ok; k++) if (order[k] != exp1[k]) ok = 0;
    check(ok, "round-robin over four full buffers");
    // only buffer 2 has frames: served back to back
    add(2, 61); add(2, 1);
    wait_done(10);
    check(order.size() == 10 && order[8] == 2 && order[9] == 2, "single busy buffer served alone");
    // buffers 1 and 3 after buffer 2 was last: 3 comes first, then 1
    add(1, 100); add(3, 7);
    wait_done(12);
    check(order.size() == 12 && order[10] == 3 && order[11] == 1, "round-robin starts after last served");
    check(bad_words == 0, "frame words intact");
    check(bad_len == 0, "frame lengths from the right buffer");
    check(fr[0] == 2 && fr[1] == 3 && fr[2] == 4 && fr[3] == 3, "per-buffer frame counters");
    check(!rlv && !rwv, "nothing offered when all buffers are empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
