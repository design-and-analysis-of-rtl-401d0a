// ni_unpacker: unpacking module of the network interface.
//
// Takes 34-bit flits (type in [33:32]) with a valid/ready handshake.
// A head flit (2'b11) is a header extraction: source address, destination
// address and packet size are kept on src_addr/dst_addr/pkt_size. A body
// (2'b10) or tail (2'b01) flit is a data extraction: its four payload bytes
// leave on data_out, top byte first, one per clock with byte_valid, so a data
// flit takes four clocks. The tail marks the end of the packet (pkt_done
// pulses with its last byte). Invalid flits (2'b00) are taken and dropped.
//
// Every byte is also shifted into a 64-bit register. When it holds as many
// bytes as the processing element's width selects (sel_i: 0 = 8, 1 = 16,
// 2 = 32, 3..7 = 64 bits) the word is offered on dat_o (right aligned, first
// byte on top) and ack_o = stb_i acknowledges the Wishbone read in that cycle.
// Until the PE strobes, byte output stalls; the byte of the cycle in which a
// word is taken already starts the next word. ready is high when no payload byte
// is left over, so flits can follow each other every four clocks.
module ni_unpacker
  import noc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [33:0] flit,
  input  logic        valid,
  output logic        ready,
  output logic [7:0]  data_out,
  output logic        byte_valid,
  output logic [7:0]  src_addr,
  output logic [7:0]  dst_addr,
  output logic [7:0]  pkt_size,
  input  logic [2:0]  sel_i,
  input  logic        stb_i,
  output logic [63:0] dat_o,
  output logic        ack_o,
  output logic        pkt_done
);
  logic [31:0] pay_q;
  logic [2:0]  left_q;     // payload bytes still to send
  logic        tail_q;     // the flit being sent is a tail
  logic [63:0] word_q;
  logic [3:0]  wcnt_q;
  logic [3:0]  nbytes;
  logic        word_full;
  flit_type_e  ftype;

  always_comb begin
    unique case (sel_i)
      3'd0:    nbytes = 4'd1;
      3'd1:    nbytes = 4'd2;
      3'd2:    nbytes = 4'd4;
      default: nbytes = 4'd8;
    endcase
  end

  assign ftype      = flit_type(flit[33:32]);
  assign word_full  = (wcnt_q >= nbytes);
  assign byte_valid = (left_q != 3'd0) && (!word_full || ack_o);
  assign data_out   = pay_q[31:24];
  assign ready      = (left_q == 3'd0) || (left_q == 3'd1 && byte_valid);
  assign ack_o      = stb_i && word_full;
  assign dat_o      = word_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      pay_q    <= '0;
      left_q   <= '0;
      tail_q   <= 1'b0;
      word_q   <= '0;
      wcnt_q   <= '0;
      src_addr <= '0;
      dst_addr <= '0;
      pkt_size <= '0;
      pkt_done <= 1'b0;
    end else begin
      pkt_done <= 1'b0;
      if (byte_valid) begin
        pay_q  <= pay_q << 8;
        left_q <= left_q - 3'd1;
        if (left_q == 3'd1 && tail_q) pkt_done <= 1'b1;
      end
      // a word taken by the PE makes room for the byte of the same cycle
      if (ack_o) begin
        wcnt_q <= byte_valid ? 4'd1 : 4'd0;
        word_q <= byte_valid ? {56'd0, pay_q[31:24]} : '0;
      end else if (byte_valid) begin
        word_q <= {word_q[55:0], pay_q[31:24]};
        wcnt_q <= wcnt_q + 4'd1;
      end
      if (valid && ready) begin
        unique case (ftype)
          FLIT_HEAD: begin
            src_addr <= flit[31:24];
            dst_addr <= flit[23:16];
            pkt_size <= flit[15:8];
          end
          FLIT_BODY, FLIT_TAIL: begin
            pay_q  <= flit[31:0];
            left_q <= 3'd4;
            tail_q <= (ftype == FLIT_TAIL);
          end
          default: ;
        endcase
      end
    end
  end

endmodule
