// async_fifo: dual-clock FIFO used both as the NI clock-domain crossing and
// as the input buffer of the routers.
//
// Write and read pointers are (log2(DEPTH)+1)-bit counters kept in both binary
// (to address the memory) and Gray code (to cross clock domains, one bit
// changes per increment). The extra MSB tells a full FIFO from an empty one:
// empty when the read pointer equals the synchronised write pointer, full when
// the two Gray pointers differ only in their two top bits (the binary pointers
// differ only in the wrap MSB). Each Gray pointer crosses through a two-flop
// synchronizer, so the flags are conservative: empty clears two read clocks
// after a write and full clears two write clocks after a read.
//
// Read is first-word-fall-through: data_out always shows the word at the read
// pointer and rd_en pops it. clear_in resets both pointers asynchronously
// (empty high). A write while full and a read while empty are ignored; this is
// this design's choice, where the source text lets a write to a full FIFO
// overwrite unread data. Defaults are 10-bit data and 16 words; DEPTH must
// be a power of two and at least 4.
module async_fifo #(
  parameter int unsigned DATA_W = 10,
  parameter int unsigned DEPTH  = 16
) (
  input  logic              wclk,
  input  logic              rclk,
  input  logic              clear_in,
  input  logic              wr_en,
  input  logic [DATA_W-1:0] data_in,
  output logic              fifo_full,
  input  logic              rd_en,
  output logic [DATA_W-1:0] data_out,
  output logic              fifo_empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [DATA_W-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer seen in write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer seen in read domain
  logic [AW:0] wbin_nxt, rbin_nxt;
  logic        do_wr, do_rd;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  assign do_wr    = wr_en && !fifo_full;
  assign do_rd    = rd_en && !fifo_empty;
  assign wbin_nxt = wbin + (AW+1)'(do_wr);
  assign rbin_nxt = rbin + (AW+1)'(do_rd);

  // write domain
  always_ff @(posedge wclk or posedge clear_in) begin
    if (clear_in) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_nxt;
      wgray    <= bin2gray(wbin_nxt);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  always_ff @(posedge wclk) begin
    if (do_wr) mem[wbin[AW-1:0]] <= data_in;
  end

  assign fifo_full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  // read domain
  always_ff @(posedge rclk or posedge clear_in) begin
    if (clear_in) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_nxt;
      rgray    <= bin2gray(rbin_nxt);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

  assign fifo_empty = (rgray == wgray_r2);
  assign data_out   = mem[rbin[AW-1:0]];

endmodule
