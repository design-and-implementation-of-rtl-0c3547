// async_fifo: dual-clock FIFO on a dual-port memory.
//
// Port A (wclk) only writes, port B (rclk) only reads, as the dual-port block
// memories of the data buffers are used. The write and read pointers cross
// between the clocks Gray-coded through two-flop synchronisers, so `full`
// and `empty` are conservative: a freshly written word becomes visible to the
// reader two to three rclk edges later.
// Read side is first-word-fall-through: rdata shows the oldest word while
// `empty` is low; `rd` pops it at the next rclk edge.
// Depth is 2**AW words. Writing when full or reading when empty is ignored
// (and flagged by an assertion).
// The dual-port memory with a write-only and a read-only port follows the
// design; the Gray-pointer FIFO around it is this design's own, so that the
// two clocks need no relation. rst_n is used as asynchronous reset and in the
// `disable iff` of the assertions, which Verilator's lint reports as
// SYNCASYNCNET; the assertions are simulation-only and the warning stands.
module async_fifo #(
  parameter int unsigned W  = 16,
  parameter int unsigned AW = 11
) (
  input  logic         wclk,
  input  logic         wrst_n,
  input  logic         wr,
  input  logic [W-1:0] wdata,
  output logic         full,
  output logic [AW:0]  wcount,    // words held, as seen from the write side

  input  logic         rclk,
  input  logic         rrst_n,
  input  logic         rd,
  output logic [W-1:0] rdata,
  output logic         empty
);

  logic [W-1:0] mem [2**AW];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer in the write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer in the read domain

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write side ----------------
  logic do_wr;
  assign do_wr = wr && !full;

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (do_wr) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  always_ff @(posedge wclk) begin
    if (do_wr) mem[wbin[AW-1:0]] <= wdata;
  end

  assign full   = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign wcount = wbin - gray2bin(rgray_w2);

  // ---------------- read side ----------------
  logic do_rd;
  assign do_rd = rd && !empty;

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (do_rd) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

  assign empty = (rgray == wgray_r2);
  assign rdata = mem[rbin[AW-1:0]];

`ifndef SYNTHESIS
  a_no_overflow:  assert property (@(posedge wclk) disable iff (!wrst_n) !(wr && full));
  a_no_underflow: assert property (@(posedge rclk) disable iff (!rrst_n) !(rd && empty));
`endif

endmodule
