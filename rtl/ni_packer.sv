// ni_packer: packing module of the network interface.
//
// Reads the byte stream written by the processing element (through wb_fifo)
// and cuts it into 34-bit flits: the flit type in bits [33:32] and four
// bytes of payload in [31:0], the first byte read in the top byte. Four bytes,
// hence four clocks, make one flit when the FIFO keeps up.
//
// The state machine follows the packing flow chart: IDLE until the FIFO is not
// empty, HEADER (payload {SA, DA, PS, reserved}), then BODY flits while the
// packet-size count is above one, then the TAIL flit, then IDLE. The command
// input is sampled when the header is complete: cmd = 1 (write) sends body
// flits, cmd = 0 (read) goes straight to the tail, so a read packet is a head
// and a tail. Whenever the FIFO runs empty in the middle of a flit the machine
// sits in WAIT and resumes the flit it was building. Packet size PS counts the
// flits after the head (PS-1 bodies and the tail); PS of 0 or 1 gives no body.
// These counting and byte-order details are this design's choice.
//
// Output: flit with valid high for exactly one clock per flit. There is no
// back-pressure input: the receiving FIFO must have room (the NI of the source
// text has none either).
module ni_packer
  import noc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        fifo_empty,
  output logic        fifo_rd,
  input  logic [7:0]  fifo_data,
  input  logic        cmd,
  output logic [33:0] flit,
  output logic        valid
);
  typedef enum logic [2:0] {S_IDLE, S_HEADER, S_BODY, S_TAIL, S_WAIT} state_e;

  state_e      state_q, ret_q;
  logic [23:0] acc_q;       // first three bytes of the flit being built
  logic [1:0]  cnt_q;       // bytes already in acc_q
  logic [7:0]  ps_q;        // remaining packet-size count
  state_e      cur;         // flit kind being built (HEADER/BODY/TAIL)
  logic [31:0] payload;

  assign cur     = (state_q == S_WAIT) ? ret_q : state_q;
  assign fifo_rd = (state_q != S_IDLE) && !fifo_empty;
  assign payload = {acc_q, fifo_data};

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= S_IDLE;
      ret_q   <= S_IDLE;
      acc_q   <= '0;
      cnt_q   <= '0;
      ps_q    <= '0;
      flit    <= '0;
      valid   <= 1'b0;
    end else begin
      valid <= 1'b0;
      unique case (state_q)
        S_IDLE: if (!fifo_empty) state_q <= S_HEADER;
        default: begin
          if (fifo_empty) begin
            if (state_q != S_WAIT) begin
              ret_q   <= state_q;
              state_q <= S_WAIT;
            end
          end else begin
            if (cnt_q != 2'd3) begin
              acc_q   <= {acc_q[15:0], fifo_data};
              cnt_q   <= cnt_q + 2'd1;
              state_q <= cur;
            end else begin
              cnt_q <= '0;
              valid <= 1'b1;
              unique case (cur)
                S_HEADER: begin
                  flit <= {FLIT_HEAD, payload};
                  ps_q <= payload[15:8];
                  state_q <= (cmd && payload[15:8] > 8'd1) ? S_BODY : S_TAIL;
                end
                S_BODY: begin
                  flit <= {FLIT_BODY, payload};
                  ps_q <= ps_q - 8'd1;
                  state_q <= (ps_q - 8'd1 > 8'd1) ? S_BODY : S_TAIL;
                end
                default: begin
                  flit <= {FLIT_TAIL, payload};
                  state_q <= S_IDLE;
                end
              endcase
            end
          end
        end
      endcase
    end
  end

endmodule
