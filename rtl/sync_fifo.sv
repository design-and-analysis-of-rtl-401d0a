// sync_fifo: single-clock first-word-fall-through FIFO, used as the per-VC
// flit buffer of the virtual-channel router, where credit flow control needs
// a buffer slot to be free in the same clock it is read. dout shows the head
// word whenever empty is low; rd pops it, wr pushes din. A write while full
// is taken only if the head is popped in the same clock, so a credit sent
// back in the cycle of the read can be used at once; otherwise it is ignored.
// Same pointer scheme as the dual-clock FIFO: an extra MSB separates full
// from empty. DEPTH must be a power of two.
module sync_fifo #(
  parameter int unsigned W     = 10,
  parameter int unsigned DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         wr,
  input  logic [W-1:0] din,
  input  logic         rd,
  output logic [W-1:0] dout,
  output logic         empty,
  output logic         full
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wp_q, rp_q;
  logic         do_wr;

  assign do_wr = wr && (!full || rd);

  assign empty = (wp_q == rp_q);
  assign full  = (wp_q == {~rp_q[AW], rp_q[AW-1:0]});
  assign dout  = mem[rp_q[AW-1:0]];

  always_ff @(posedge clk) begin
    if (rst) begin
      wp_q <= '0;
      rp_q <= '0;
    end else begin
      if (do_wr)        wp_q <= wp_q + 1'b1;
      if (rd && !empty) rp_q <= rp_q + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp_q[AW-1:0]] <= din;
  end
endmodule
