// tb_dba_processor: four DBA processors (ONU-IDs 1..4) share a control
// channel: the splitter is modelled as the OR of their outputs, returned to
// all after a 3-bit delay. For a series of slots the testbench sets each
// ONU's Q-size and checks, at the end of that slot, that all four chose the
// same ONU, the one with the largest Q-size (lowest ONU-ID on a tie, none if
// all are zero), that only that ONU flipped its grant, that slots are
// SLOT_BITS long and that the messages on the line have the right format.
// The Q-sizes of the first two slots are those of the design's worked example
// (2, 6, 0, 1 then 7, 5, 2, 3); the others, the tie cases and the 3-bit line
// delay are this testbench's own.
module tb_dba_processor;
  int checks = 0, failures = 0;
  localparam int SLOT = 264;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [15:0] qg [4];
  logic tx [4]; logic tgl [4]; logic dec [4]; logic [7:0] win [4];
  logic [15:0] grants [4]; logic [15:0] msgs [4];
  logic [2:0] line_d;   // 3-bit delay of the shared line
  logic line;

  for (genvar i = 0; i < 4; i++) begin : g
    dba_processor #(.NUM_ONU(4), .SLOT_BITS(SLOT)) dut (
      .clk(clk), .rst_n(rst_n), .onu_id(8'(i + 1)), .q_size_gray(qg[i]),
      .ctrl_tx(tx[i]), .ctrl_rx(line), .grant_toggle(tgl[i]), .decided(dec[i]),
      .winner_id(win[i]), .grants(grants[i]), .messages_rx(msgs[i]));
  end

  always_ff @(posedge clk) line_d <= {line_d[1:0], tx[0] | tx[1] | tx[2] | tx[3]};
  assign line = line_d[2];

  // record the line of one slot to check the message of ONU 2
  logic rec [SLOT]; int t = 0, last_dec = -1, slot_len_bad = 0;
  always @(posedge clk) if (rst_n) begin
    t++;
    if (dec[0]) begin
      if (last_dec >= 0 && t - last_dec != SLOT) slot_len_bad++;
      last_dec = t;
    end
  end

  function automatic logic [15:0] gray(input int v);
    return 16'(v) ^ (16'(v) >> 1);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int qv [8][4] = '{'{2, 6, 0, 1}, '{7, 5, 2, 3}, '{0, 0, 0, 0}, '{3, 3, 1, 0},
                     '{0, 0, 0, 9}, '{1, 2, 3, 4}, '{0, 300, 299, 0}, '{5, 0, 5, 5}};
  int expw [8] = '{2, 1, 0, 1, 4, 4, 2, 1};

  initial begin
    logic tg_before [4];
    foreach (qg[i]) qg[i] = 0;
    line_d = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    @(posedge dec[0]); @(negedge clk);
    for (int s = 0; s < 8; s++) begin
      for (int i = 0; i < 4; i++) begin qg[i] = gray(qv[s][i]); tg_before[i] = tgl[i]; end
      // record the line during this slot; message of ONU 2 occupies bits 64..127
      for (int b = 0; b < SLOT - 1; b++) begin rec[b] = line; @(negedge clk); end
      @(posedge dec[0]); @(negedge clk);
      for (int i = 0; i < 4; i++) begin
        check(win[i] == 8'(expw[s]), $sformatf("slot %0d: ONU %0d chose %0d, expected %0d", s, i + 1, win[i], expw[s]));
        check(tgl[i] != tg_before[i] == (expw[s] == i + 1), $sformatf("slot %0d: grant of ONU %0d", s, i + 1));
      end
      if (s == 1) begin
        logic [63:0] m; m = '0;
        // rec[] starts at the falling edge after the decision; the output
        // register, the 3-bit line delay and that start put bit 0 of a
        // message at rec[sub-slot start + 4]
        for (int b = 0; b < 64; b++) m = {m[62:0], rec[64 + b + 4]};
        check(m == {32'h55555555, 8'hE2, 8'd2, 16'd5}, $sformatf("message of ONU 2 on the line: %h", m));
      end
    end
    check(slot_len_bad == 0, "slots are SLOT_BITS clocks long");
    check(msgs[0] >= 32 && msgs[0] == msgs[3], "every ONU hears every message");
    check(grants[0] == 3 && grants[1] == 2 && grants[2] == 0 && grants[3] == 2, "grant counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
