// data_buffer: packet store made of a payload memory and a payload-length
// memory, both dual-port and dual-clock.
//
// Port A (wclk) is write-only and WR_W bits wide (8 for GMII at 125 MHz, 4 for
// MII at 25 MHz, 16 for the 77.76 MHz SerDes side). Units are packed into
// 16-bit words, first byte in bits 15:8. On MII a byte arrives low nibble
// first, so nibbles 0..3 of a word land in bits 11:8, 15:12, 3:0, 7:4.
// Writing the packet's byte length (wr_len_we) closes the packet: a partly
// filled last word is written with zero fill, then the length is queued.
// Port B (rclk) is read-only and 16 bits wide: the reader sees the oldest
// length (rd_len_valid/rd_len), pops words with rd_word_pop and then the
// length with rd_len_pop. Both memories are first-word-fall-through FIFOs.
// The split into two memories and the 8/4/16-to-16 width change follow the
// design; depths, the zero fill and the FIFO discipline are this design's own.
module data_buffer #(
  parameter int unsigned WR_W = 8,    // 4, 8 or 16
  parameter int unsigned AW   = 11,   // payload memory: 2**AW 16-bit words
  parameter int unsigned LAW  = 4     // length memory: 2**LAW entries
) (
  input  logic            wclk,
  input  logic            wrst_n,
  input  logic            wr_en,
  input  logic [WR_W-1:0] wr_data,
  input  logic            wr_len_we,
  input  logic [15:0]     wr_len,
  output logic [AW:0]     wr_free_words,
  output logic            wr_len_full,

  input  logic            rclk,
  input  logic            rrst_n,
  output logic            rd_len_valid,
  output logic [15:0]     rd_len,
  input  logic            rd_len_pop,
  output logic            rd_word_valid,
  output logic [15:0]     rd_word,
  input  logic            rd_word_pop
);

  localparam int unsigned UNITS = 16 / WR_W;
  localparam int unsigned UW    = (UNITS > 1) ? $clog2(UNITS) : 1;

  logic [15:0]   acc, acc_next;
  logic [UW-1:0] cnt;
  logic          pay_wr, pay_full, len_empty, pay_empty;
  logic [15:0]   pay_wdata;
  logic [AW:0]   pay_count;

  // Bit position of unit `i` inside the word.
  function automatic int unsigned unit_lsb(input int unsigned i);
    if (WR_W == 4) return (i == 0) ? 8 : (i == 1) ? 12 : (i == 2) ? 0 : 4;
    else           return 16 - WR_W * (i + 1);
  endfunction

  always_comb begin
    acc_next = acc;
    for (int unsigned i = 0; i < UNITS; i++)
      if (int'(cnt) == int'(i)) acc_next[unit_lsb(i) +: WR_W] = wr_data;
  end

  always_comb begin
    pay_wr    = 1'b0;
    pay_wdata = acc_next;
    if (wr_en && int'(cnt) == int'(UNITS) - 1) begin
      pay_wr = 1'b1;
    end else if (wr_len_we && cnt != '0) begin
      pay_wr    = 1'b1;
      pay_wdata = acc;
    end
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      acc <= '0;
      cnt <= '0;
    end else if (wr_len_we) begin
      acc <= '0;
      cnt <= '0;
    end else if (wr_en) begin
      if (int'(cnt) == int'(UNITS) - 1) begin
        acc <= '0;
        cnt <= '0;
      end else begin
        acc <= acc_next;
        cnt <= cnt + 1'b1;
      end
    end
  end

  async_fifo #(.W(16), .AW(AW)) u_payload (
    .wclk(wclk), .wrst_n(wrst_n), .wr(pay_wr), .wdata(pay_wdata),
    .full(pay_full), .wcount(pay_count),
    .rclk(rclk), .rrst_n(rrst_n), .rd(rd_word_pop), .rdata(rd_word),
    .empty(pay_empty)
  );

  logic [LAW:0] len_count_unused;
  async_fifo #(.W(16), .AW(LAW)) u_length (
    .wclk(wclk), .wrst_n(wrst_n), .wr(wr_len_we), .wdata(wr_len),
    .full(wr_len_full), .wcount(len_count_unused),
    .rclk(rclk), .rrst_n(rrst_n), .rd(rd_len_pop), .rdata(rd_len),
    .empty(len_empty)
  );

  assign wr_free_words = (AW+1)'(2**AW) - pay_count;
  assign rd_len_valid  = !len_empty;
  assign rd_word_valid = !pay_empty;

endmodule
