// wb_fifo: Wishbone-compatible front end of the network interface.
//
// A Wishbone master (the processing element) writes words of 8, 16, 32 or 64
// bits, point to point, into this slave. On a strobe the slave latches dat_i
// into a 64-bit register, then moves the word one byte per clk_i into an
// 8-bit async_fifo, most significant valid byte first, inserting wait states
// (ack_o low) while bytes remain or the FIFO is full. ack_o is raised for one
// cycle once the last byte is stored; the master then drops stb_i or presents
// the next word. The packing module reads the bytes on its own clock (rclk).
//
// sel_i gives the master's width: 0 = 8, 1 = 16, 2 = 32, 3..7 = 64 bits
// (the 3-bit select and the 64-bit latch follow the source text; the encoding
// is this design's choice). rst_i clears the latch (synchronously) and the
// FIFO (through its asynchronous clear_in, so both clock domains start empty).
module wb_fifo #(
  parameter int unsigned DEPTH = 16
) (
  input  logic        clk_i,
  input  logic        rst_i,
  input  logic        stb_i,
  input  logic [2:0]  sel_i,
  input  logic [63:0] dat_i,
  output logic        ack_o,
  input  logic        rclk,
  input  logic        rd_en,
  output logic [7:0]  dout,
  output logic        empty
);
  logic [63:0] latch_q;
  logic [3:0]  left_q;     // bytes still to store
  logic        busy_q;
  logic        full;
  logic        wr;
  logic [3:0]  nbytes;

  always_comb begin
    unique case (sel_i)
      3'd0:    nbytes = 4'd1;
      3'd1:    nbytes = 4'd2;
      3'd2:    nbytes = 4'd4;
      default: nbytes = 4'd8;
    endcase
  end

  assign wr = busy_q && !full;

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      latch_q <= '0;
      left_q  <= '0;
      busy_q  <= 1'b0;
      ack_o   <= 1'b0;
    end else begin
      ack_o <= 1'b0;
      if (!busy_q) begin
        // latch a new word; a strobe still high in the cycle of ack_o is the
        // end of the previous transfer and is not latched again
        if (stb_i && !ack_o) begin
          latch_q <= dat_i << (8 * (8 - nbytes));  // valid bytes to the top
          left_q  <= nbytes;
          busy_q  <= 1'b1;
        end
      end else if (wr) begin
        latch_q <= latch_q << 8;
        left_q  <= left_q - 4'd1;
        if (left_q == 4'd1) begin
          busy_q <= 1'b0;
          ack_o  <= 1'b1;
        end
      end
    end
  end

  async_fifo #(.DATA_W(8), .DEPTH(DEPTH)) u_fifo (
    .wclk      (clk_i),
    .rclk      (rclk),
    .clear_in  (rst_i),
    .wr_en     (wr),
    .data_in   (latch_q[63:56]),
    .fifo_full (full),
    .rd_en     (rd_en),
    .data_out  (dout),
    .fifo_empty(empty)
  );

endmodule
