// buffer_mux: OLT upstream multiplexer.
//
// NUM_ONU ONU buffers each hold complete Ethernet frames rebuilt from DHPON
// packets. The multiplexer gives the single GMII transmitter the read port of
// one buffer at a time: when idle it picks, round-robin from the buffer after
// the last one served, a buffer with a complete frame, and holds that choice
// until the transmitter pops the frame's length, which ends the frame.
// The choice takes one clock; the read port signals are combinational.
// Combining an ONU's payloads into a frame and sending it to GMII follow the
// design; round-robin service of the buffers is this design's own choice.
module buffer_mux #(
  parameter int unsigned NUM_ONU = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  // ONU buffers, read side
  input  logic [NUM_ONU-1:0] b_len_valid,
  input  logic [15:0]        b_len  [NUM_ONU],
  output logic [NUM_ONU-1:0] b_len_pop,
  input  logic [NUM_ONU-1:0] b_word_valid,
  input  logic [15:0]        b_word [NUM_ONU],
  output logic [NUM_ONU-1:0] b_word_pop,
  // towards the GMII transmitter, same meaning as a data buffer's read port
  output logic               rd_len_valid,
  output logic [15:0]        rd_len,
  input  logic               rd_len_pop,
  output logic               rd_word_valid,
  output logic [15:0]        rd_word,
  input  logic               rd_word_pop,
  output logic [15:0]        frames [NUM_ONU]
);

  localparam int unsigned IW = (NUM_ONU > 1) ? $clog2(NUM_ONU) : 1;

  logic          busy;
  logic [IW-1:0] sel, last;

  logic          pick_any;
  logic [IW-1:0] pick;
  always_comb begin
    pick_any = 1'b0;
    pick     = '0;
    for (int k = int'(NUM_ONU); k >= 1; k--) begin
      int unsigned j;
      j = (int'(last) + k) % NUM_ONU;
      if (b_len_valid[j]) begin
        pick_any = 1'b1;
        pick     = IW'(j);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      sel  <= '0;
      last <= IW'(NUM_ONU - 1);
      for (int i = 0; i < int'(NUM_ONU); i++) frames[i] <= '0;
    end else if (!busy) begin
      if (pick_any) begin
        busy <= 1'b1;
        sel  <= pick;
      end
    end else if (rd_len_pop) begin
      busy        <= 1'b0;
      last        <= sel;
      frames[sel] <= frames[sel] + 1'b1;
    end
  end

  assign rd_len_valid  = busy && b_len_valid[sel];
  assign rd_len        = b_len[sel];
  assign rd_word_valid = busy && b_word_valid[sel];
  assign rd_word       = b_word[sel];

  always_comb begin
    b_len_pop  = '0;
    b_word_pop = '0;
    b_len_pop[sel]  = busy && rd_len_pop;
    b_word_pop[sel] = busy && rd_word_pop;
  end

endmodule
