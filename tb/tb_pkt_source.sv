// tb_pkt_source: testbench model of a data buffer's read port.
//
// Packets are queued with push_packet(bytes): the words are made from a byte
// pattern (byte k of packet p is p*7 + k, truncated to 8 bits) so a checker
// can rebuild them with the same formula. Behaves like data_buffer's read
// side: first-word-fall-through, rd_len_valid once a whole packet is queued;
// the outputs follow pushes and pops at the next clock edge.
// A testbench model only, not part of the design.
module tb_pkt_source (
  input  logic        clk,
  output logic        rd_len_valid,
  output logic [15:0] rd_len,
  input  logic        rd_len_pop,
  output logic        rd_word_valid,
  output logic [15:0] rd_word,
  input  logic        rd_word_pop
);
  logic [15:0] lq[$];
  logic [15:0] wq[$];
  int unsigned pushed = 0;
  int unsigned word_pops = 0, len_pops = 0;

  function automatic logic [7:0] pat(input int unsigned p, input int unsigned k);
    return 8'((p * 7 + k) & 8'hFF);
  endfunction

  task automatic push_packet(input int unsigned nbytes);
    for (int unsigned k = 0; k < nbytes; k += 2) begin
      logic [7:0] lo;
      lo = (k + 1 < nbytes) ? pat(pushed, k + 1) : 8'h00;
      wq.push_back({pat(pushed, k), lo});
    end
    lq.push_back(16'(nbytes));
    pushed++;
  endtask

  initial begin
    rd_len_valid = 0; rd_len = 0; rd_word_valid = 0; rd_word = 0;
  end

  // The outputs change only just after a clock edge, as a register would.
  always @(posedge clk) begin
    if (rd_word_pop && wq.size() > 0) begin void'(wq.pop_front()); word_pops++; end
    if (rd_len_pop && lq.size() > 0) begin void'(lq.pop_front()); len_pops++; end
    rd_len_valid  <= lq.size() > 0;
    rd_len        <= (lq.size() > 0) ? lq[0] : 16'h0;
    rd_word_valid <= wq.size() > 0;
    rd_word       <= (wq.size() > 0) ? wq[0] : 16'h0;
  end
endmodule
