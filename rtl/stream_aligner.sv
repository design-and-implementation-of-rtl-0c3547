// stream_aligner: word and bit alignment of the 16-bit SerDes receive stream.
//
// The words out of the SerDes may be shifted by any number of bits. The last
// three received words are held in registers r2 (oldest), r1 and r0; for each
// of the 16 offsets k the candidate aligned words are
//   cur_k  = {r1, r0} bits (31-k) downto (16-k)
//   prev_k = {r2, r1} bits (31-k) downto (16-k).
// While `search` is high, the lowest k with prev_k == PREV and
// (cur_k & CUR_MASK) == CUR_VAL raises `found` (combinational) and shows
// cur_k on found_word; the owner then drops `search` and the offset is
// locked. From the next clock on, dout is the stream re-aligned with that
// offset, one word per clock, two clocks behind din.
// Shifting through two 16-bit registers to find the delimiter follows the
// design; the third register, which lets the two-word marker be matched in
// one step, is this design's own.
module stream_aligner #(
  parameter logic [15:0] PREV     = 16'hAAAA,
  parameter logic [15:0] CUR_VAL  = 16'hAAE2,
  parameter logic [15:0] CUR_MASK = 16'hFFFF
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] din,
  input  logic        search,
  output logic        found,
  output logic [15:0] found_word,
  output logic [3:0]  offset,
  output logic [15:0] dout
);

  logic [15:0] r0, r1, r2;
  logic [31:0] w_cur, w_prev;

  assign w_cur  = {r1, r0};
  assign w_prev = {r2, r1};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r0 <= '0; r1 <= '0; r2 <= '0;
    end else begin
      r0 <= din; r1 <= r0; r2 <= r1;
    end
  end

  logic [3:0] hit_k;
  always_comb begin
    found      = 1'b0;
    hit_k      = '0;
    found_word = '0;
    for (int k = 15; k >= 0; k--) begin
      if (search && w_prev[31-k -: 16] == PREV &&
          (w_cur[31-k -: 16] & CUR_MASK) == CUR_VAL) begin
        found      = 1'b1;
        hit_k      = 4'(k);
        found_word = w_cur[31-k -: 16];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     offset <= '0;
    else if (found) offset <= hit_k;
  end

  assign dout = w_cur[31-offset -: 16];

endmodule
