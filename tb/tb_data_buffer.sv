// tb_data_buffer: checks the packet store in its MII form (4 bits in at
// 25 MHz) and GMII form (8 bits in at 125 MHz), both read 16 bits wide at
// 77.76 MHz: word packing (first byte high, MII low nibble first), zero fill
// of an odd last byte, lengths in order, and the free-space count.
// The 4/8/16-bit write widths and the clock rates follow the design; the
// patterns and packet sizes are this testbench's own.
module tb_data_buffer;
  int checks = 0, failures = 0;
  logic wclk4 = 0, wclk8 = 0, rclk = 0, rst_n = 0;
  always #20 wclk4 = ~wclk4;
  always #4  wclk8 = ~wclk8;
  always #6.43  rclk  = ~rclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic w4_en = 0, w4_lwe = 0; logic [3:0] w4_d = 0; logic [15:0] w4_len = 0;
  logic w8_en = 0, w8_lwe = 0; logic [7:0] w8_d = 0; logic [15:0] w8_len = 0;
  logic [8:0] free4, free8; logic lf4, lf8;
  logic lv4, lv8, wv4, wv8; logic [15:0] l4, l8, d4, d8;
  logic lp4 = 0, lp8 = 0, wp4 = 0, wp8 = 0;

  data_buffer #(.WR_W(4), .AW(8), .LAW(3)) dut4 (
    .wclk(wclk4), .wrst_n(rst_n), .wr_en(w4_en), .wr_data(w4_d), .wr_len_we(w4_lwe),
    .wr_len(w4_len), .wr_free_words(free4), .wr_len_full(lf4),
    .rclk(rclk), .rrst_n(rst_n), .rd_len_valid(lv4), .rd_len(l4), .rd_len_pop(lp4),
    .rd_word_valid(wv4), .rd_word(d4), .rd_word_pop(wp4));
  data_buffer #(.WR_W(8), .AW(8), .LAW(3)) dut8 (
    .wclk(wclk8), .wrst_n(rst_n), .wr_en(w8_en), .wr_data(w8_d), .wr_len_we(w8_lwe),
    .wr_len(w8_len), .wr_free_words(free8), .wr_len_full(lf8),
    .rclk(rclk), .rrst_n(rst_n), .rd_len_valid(lv8), .rd_len(l8), .rd_len_pop(lp8),
    .rd_word_valid(wv8), .rd_word(d8), .rd_word_pop(wp8));

  function automatic logic [7:0] pat(input int p, input int k);
    return 8'(p * 11 + k * 3 + 1);
  endfunction

  task automatic write4(input int p, input int n);
    for (int k = 0; k < n; k++) begin
      @(negedge wclk4); w4_en = 1; w4_d = pat(p, k) & 4'hF;
      @(negedge wclk4); w4_d = pat(p, k) >> 4;
    end
    @(negedge wclk4); w4_en = 0; w4_lwe = 1; w4_len = 16'(n);
    @(negedge wclk4); w4_lwe = 0;
  endtask

  task automatic write8(input int p, input int n);
    for (int k = 0; k < n; k++) begin
      @(negedge wclk8); w8_en = 1; w8_d = pat(p, k);
    end
    @(negedge wclk8); w8_en = 0; w8_lwe = 1; w8_len = 16'(n);
    @(negedge wclk8); w8_lwe = 0;
  endtask

  // read one packet from a form (sel 0: MII form, 1: GMII form)
  task automatic read_pkt(input int sel, input int p, input int n);
    int bad = 0, tmo = 0;
    @(negedge rclk);
    while (!(sel ? lv8 : lv4) && tmo < 2000) begin @(negedge rclk); tmo++; end
    check(sel ? lv8 : lv4, $sformatf("form %0d packet %0d present", sel, p));
    check((sel ? l8 : l4) == 16'(n), $sformatf("form %0d packet %0d length %0d", sel, p, n));
    for (int k = 0; k < n; k += 2) begin
      logic [15:0] exp, got;
      exp = {pat(p, k), (k + 1 < n) ? pat(p, k + 1) : 8'h00};
      got = sel ? d8 : d4;
      if (!(sel ? wv8 : wv4) || got !== exp) begin
        bad++;
        if (bad < 6) $display("form %0d pkt %0d word %0d got %h exp %h", sel, p, k/2, got, exp);
      end
      if (sel) wp8 = 1; else wp4 = 1;
      @(negedge rclk); wp8 = 0; wp4 = 0;
    end
    if (sel) lp8 = 1; else lp4 = 1;
    @(negedge rclk); lp8 = 0; lp4 = 0;
    check(bad == 0, $sformatf("form %0d packet %0d words", sel, p));
  endtask

  initial begin
    repeat (4000) @(posedge wclk4);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge wclk4); rst_n = 1;
    @(negedge wclk4);
    check(free4 == 9'd256 && free8 == 9'd256, "empty buffers report all words free");
    check(!lv4 && !lv8, "no packet after reset");
    fork
      begin write4(0, 64); write4(1, 47); write4(2, 3); end
      begin write8(0, 64); write8(1, 47); write8(2, 3); end
    join
    repeat (2) @(negedge wclk4);
    check(free4 == 9'd256 - 9'd32 - 9'd24 - 9'd2, "MII form free words after three packets");
    check(free8 == free4, "GMII form free words after three packets");
    for (int p = 0; p < 3; p++) begin
      read_pkt(0, p, p == 0 ? 64 : p == 1 ? 47 : 3);
      read_pkt(1, p, p == 0 ? 64 : p == 1 ? 47 : 3);
    end
    repeat (4) @(negedge rclk);
    check(!lv4 && !lv8 && !wv4 && !wv8, "buffers empty after reading");
    repeat (3) @(negedge wclk4);
    check(free4 == 9'd256 && free8 == 9'd256, "space returned after reading");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
