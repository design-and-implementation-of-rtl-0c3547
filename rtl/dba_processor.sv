// dba_processor: distributed-control DBA processor of one ONU.
//
// Time is divided into slots of SLOT_BITS clocks of the 125 Mb/s control
// channel. In slot sub-slot (onu_id-1) this ONU sends its control message,
// MSB first on ctrl_tx:
//   55 55 55 55 | E2 | ONU-ID | Q-size (16 bits)
// Q-size is the number of DHPON packets waiting in its queue data buffer,
// taken Gray-coded from the SerDes clock domain and sampled when the Q-size
// field starts. The splitter returns every ONU's message to all ONUs; ctrl_rx
// is that shared line (low when no ONU sends). A 64-bit shift register finds
// each message by its preamble and delimiter and stores its Q-size under its
// ONU-ID. In the last clock of the slot all ONUs, holding the same table,
// choose the ONU with the largest Q-size (lowest ONU-ID on a tie, none if all
// are zero). The chosen ONU flips grant_toggle, so that its queue sends one
// DHPON packet in the next slot; so at most one ONU sends per slot.
// The message format, the four sub-slots in a slot and the largest-Q-size rule
// follow the design. The slot length, the tie rule, the preamble value and
// the common slot timing (all ONUs leave reset together) are this design's own.
module dba_processor
  import dhpon_pkg::*;
#(
  parameter int unsigned NUM_ONU   = 4,
  parameter int unsigned SLOT_BITS = 264
) (
  input  logic        clk,           // 125 MHz control-channel bit clock
  input  logic        rst_n,
  input  logic [7:0]  onu_id,        // 1 .. NUM_ONU
  input  logic [15:0] q_size_gray,   // from the queue data buffer, other clock
  output logic        ctrl_tx,
  input  logic        ctrl_rx,
  output logic        grant_toggle,
  // decision of the last slot, the same in every ONU
  output logic        decided,       // one-clock pulse at the end of a slot
  output logic [7:0]  winner_id,     // 0 when no ONU has anything to send
  output logic [15:0] grants,
  output logic [15:0] messages_rx
);

  localparam int unsigned MSG = CTRL_MSG_BITS;
  localparam int unsigned CW  = $clog2(SLOT_BITS);

  // ---------------- Q-size from the SerDes clock domain ----------------
  logic [15:0] qg1, qg2, q_bin;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qg1 <= '0; qg2 <= '0;
    end else begin
      qg1 <= q_size_gray; qg2 <= qg1;
    end
  end
  // Gray to binary: bit i is the XOR of Gray bits 15 down to i
  always_comb begin
    for (int i = 0; i < 16; i++) q_bin[i] = ^(qg2 >> i);
  end

  // ---------------- slot timing and transmit ----------------
  logic [CW-1:0] bitc;
  logic [15:0]   q_tx;
  logic [63:0]   msg;
  int unsigned   my_start;
  logic          in_mine;
  logic [5:0]    pos;

  assign my_start = (int'(onu_id) >= 1) ? (int'(onu_id) - 1) * MSG : 0;
  assign in_mine  = (int'(bitc) >= my_start) && (int'(bitc) < my_start + MSG) &&
                    (onu_id >= 8'd1) && (int'(onu_id) <= int'(NUM_ONU));
  assign pos      = 6'(int'(bitc) - my_start);
  assign msg      = {{4{CTRL_PREAMBLE}}, DELIM, onu_id, q_tx};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bitc    <= '0;
      q_tx    <= '0;
      ctrl_tx <= 1'b0;
    end else begin
      bitc <= (int'(bitc) == int'(SLOT_BITS) - 1) ? '0 : bitc + 1'b1;
      if (in_mine && pos == 6'd47) q_tx <= q_bin;
      // registered output: bit `pos` leaves one clock later
      ctrl_tx <= in_mine ? msg[6'd63 - pos] : 1'b0;
    end
  end

  // ---------------- receive ----------------
  logic [63:0] sr;
  logic [15:0] table_q [NUM_ONU];
  logic        hit;
  logic [7:0]  rx_id;

  assign hit   = (sr[63:24] == {{4{CTRL_PREAMBLE}}, DELIM});
  assign rx_id = sr[23:16];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr          <= '0;
      messages_rx <= '0;
      for (int i = 0; i < int'(NUM_ONU); i++) table_q[i] <= '0;
    end else begin
      sr <= hit ? {63'd0, ctrl_rx} : {sr[62:0], ctrl_rx};
      if (hit && rx_id >= 8'd1 && int'(rx_id) <= int'(NUM_ONU)) begin
        table_q[int'(rx_id) - 1] <= sr[15:0];
        messages_rx <= messages_rx + 1'b1;
      end
    end
  end

  // ---------------- decision ----------------
  logic [7:0]  best_id;
  logic [15:0] best_q;
  always_comb begin
    best_id = 8'd0;
    best_q  = 16'd0;
    for (int i = 0; i < int'(NUM_ONU); i++) begin
      if (table_q[i] > best_q) begin
        best_q  = table_q[i];
        best_id = 8'(i + 1);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      decided      <= 1'b0;
      winner_id    <= '0;
      grant_toggle <= 1'b0;
      grants       <= '0;
    end else begin
      decided <= 1'b0;
      if (int'(bitc) == int'(SLOT_BITS) - 1) begin
        decided   <= 1'b1;
        winner_id <= best_id;
        if (best_id == onu_id && best_id != 8'd0) begin
          grant_toggle <= ~grant_toggle;
          grants       <= grants + 1'b1;
        end
      end
    end
  end

endmodule
