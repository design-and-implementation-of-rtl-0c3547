// queue_buffer: ONU queue data buffer.
//
// Holds up to QPKTS DHPON packets of 140 words, written one word per clock by
// the framer. A packet counts once all 140 words are in. q_size is the number
// of complete packets not yet granted; it is reported to the DBA processor
// (also Gray-coded, q_size_gray, for use in another clock domain).
// A one-clock `grant` takes one packet: the read port is enabled for 140
// clocks and the 280 bytes leave on tx_word with tx_en high (the burst
// enable of the transmitter), then tx_en drops. Outside a burst tx_word is
// idle (5555). The first word leaves three clocks after the grant. A grant that
// finds the queue empty is counted in empty_grants and sends nothing; a grant
// during a burst waits for it to end.
// Counting packets for the DBA and sending one packet in 140 clocks per grant
// follow the design; the depth and the Gray-coded count are this design's own.
module queue_buffer
  import dhpon_pkg::*;
#(
  parameter int unsigned QPKTS = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr,
  input  logic [15:0] wdata,
  output logic        room,
  output logic [15:0] q_size,
  output logic [15:0] q_size_gray,
  input  logic        grant,
  output logic        tx_en,
  output logic [15:0] tx_word,
  output logic [15:0] bursts,
  output logic [15:0] empty_grants
);

  localparam int unsigned WORDS = QPKTS * US_PKT_WORDS;
  localparam int unsigned AW    = $clog2(WORDS);
  localparam int unsigned PW    = $clog2(QPKTS + 1);

  logic [15:0]  mem [WORDS];
  logic [AW-1:0] waddr, raddr;
  logic [7:0]   wword, rword;
  logic [PW-1:0] stored;     // complete packets not yet granted
  logic [PW-1:0] held;       // packets occupying memory, incl. the one in flight
  logic         sending, pend, rd_q;
  logic [15:0]  mem_q;

  logic wr_done, take, accept;
  // a packet is accepted whole once its first word finds room
  assign accept  = wr && (wword != 8'd0 || room);
  assign wr_done = accept && (wword == 8'(US_PKT_WORDS - 1));
  assign take    = (grant || pend) && !sending && stored != '0;

  // room for one more packet beyond those held or being written
  assign room = (held < PW'(QPKTS));

  always_ff @(posedge clk) begin
    if (accept) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      waddr <= '0; wword <= '0; raddr <= '0; rword <= '0;
      stored <= '0; held <= '0; sending <= 1'b0; pend <= 1'b0; rd_q <= 1'b0;
      tx_en <= 1'b0; tx_word <= IDLE_WORD;
      bursts <= '0; empty_grants <= '0;
    end else begin
      if (accept) begin
        waddr <= (waddr == AW'(WORDS - 1)) ? '0 : waddr + 1'b1;
        wword <= wr_done ? '0 : wword + 1'b1;
      end

      if (grant && !sending && stored == '0 && !pend) empty_grants <= empty_grants + 1'b1;
      if (grant && sending) pend <= 1'b1;
      else if (take || (pend && !sending && stored == '0)) pend <= 1'b0;

      stored <= stored + PW'(wr_done) - PW'(take);

      if (take) begin
        sending <= 1'b1;
        rword   <= '0;
        bursts  <= bursts + 1'b1;
      end else if (sending) begin
        raddr <= (raddr == AW'(WORDS - 1)) ? '0 : raddr + 1'b1;
        rword <= rword + 1'b1;
        if (rword == 8'(US_PKT_WORDS - 1)) sending <= 1'b0;
      end

      // a packet's memory is released when its last word has been read
      held <= held + PW'(accept && wword == 8'd0)
                   - PW'(sending && rword == 8'(US_PKT_WORDS - 1));

      rd_q    <= sending;
      tx_en   <= rd_q;
      tx_word <= rd_q ? mem_q : IDLE_WORD;
    end
  end

  always_ff @(posedge clk) mem_q <= mem[raddr];

  assign q_size = 16'(stored);

  // registered, so that the count changes one bit at a time at this output
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q_size_gray <= '0;
    else        q_size_gray <= q_size ^ (q_size >> 1);
  end

endmodule
