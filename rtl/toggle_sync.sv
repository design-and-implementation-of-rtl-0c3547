// toggle_sync: moves single events from one clock domain to another.
//
// The source side flips `tgl_in` once per event. The destination registers it
// through two flip-flops and a third for edge detection, and raises `pulse`
// for one dst_clk cycle per flip, two to three dst_clk edges after it.
// Events must be further apart than three dst_clk periods.
// Not described by the design: its grant is a control signal from the DBA
// processor to the queue buffer; carrying it between the two clocks this way
// is this design's own choice.
module toggle_sync (
  input  logic dst_clk,
  input  logic dst_rst_n,
  input  logic tgl_in,
  output logic pulse
);
  logic s1, s2, s3;
  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) begin
      s1 <= 1'b0; s2 <= 1'b0; s3 <= 1'b0;
    end else begin
      s1 <= tgl_in; s2 <= s1; s3 <= s2;
    end
  end
  assign pulse = s2 ^ s3;
endmodule
