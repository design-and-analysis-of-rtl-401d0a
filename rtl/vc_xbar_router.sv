// vc_xbar_router: 5-port router with a separate buffer per (input, output)
// pair, "virtual channel router with full crossbar".
//
// A packet never leaves by the port it entered, so each input keeps four
// async_fifo buffers, one for each of the other outputs (twenty in all). The
// input sorts flits as they arrive: a head flit's port address selects the
// buffer and the body and tail flits of that packet follow it into the same
// buffer. rdy[i][o] tells the upstream router that the buffer at input i for
// output o has room (four flow-control signals per input instead of one); the
// upstream must not send a flit for output o while it is low, and this router
// does not re-route. A head whose address is unknown or points back to its own
// port is dropped with its packet.
//
// Each output has a 4:1 multiplexer over the four buffers that feed it and a
// packet arbiter that holds the selection from head to tail. A packet blocked
// at one output therefore never holds up packets at the same input bound for
// another output: no head-of-line blocking. Handshake on the output side as
// in the wormhole router (out_valid / out_rdy).
// rst is the synchronous reset of the arbiters and state and, at the same
// time, the asynchronous clear_in of the input FIFOs.
module vc_xbar_router
  import noc_pkg::*;
#(
  parameter int unsigned W     = 10,
  parameter int unsigned DEPTH = 16
) (
  input  logic                              clk,
  input  logic                              rst,
  input  logic [NPORTS-1:0][W-1:0]          in_flit,
  input  logic [NPORTS-1:0]                 in_valid,
  output logic [NPORTS-1:0][NPORTS-1:0]     rdy,       // [input][output]
  output logic [NPORTS-1:0][W-1:0]          out_flit,
  output logic [NPORTS-1:0]                 out_valid,
  input  logic [NPORTS-1:0]                 out_rdy
);
  localparam int unsigned NB = NPORTS - 1;   // buffers per input

  // buffer [i][k] holds packets from input i for output other_port(i, k)
  logic [NPORTS-1:0][NB-1:0][W-1:0] bhead;
  logic [NPORTS-1:0][NB-1:0]        bempty, bfull, bpop, bwr;
  logic [NPORTS-1:0][NB-1:0]        cur_q;     // buffer of the current packet
  logic [NPORTS-1:0][NPORTS-1:0]    route;

  for (genvar i = 0; i < int'(NPORTS); i++) begin : g_in
    route_compute #(.W(W)) u_rc (.flit(in_flit[i]), .out_port(route[i]));

    // buffer selected by this flit
    logic [NB-1:0] tgt;
    always_comb begin
      tgt = '0;
      if (flit_type(in_flit[i][W-1:W-2]) == FLIT_HEAD) begin
        for (int k = 0; k < int'(NB); k++) tgt[k] = route[i][other_port(i, k)];
      end else if (flit_type(in_flit[i][W-1:W-2]) != FLIT_INVALID) begin
        tgt = cur_q[i];
      end
    end
    assign bwr[i] = in_valid[i] ? tgt : '0;

    always_ff @(posedge clk) begin
      if (rst) cur_q[i] <= '0;
      else if (in_valid[i] && flit_type(in_flit[i][W-1:W-2]) == FLIT_HEAD) cur_q[i] <= tgt;
      else if (in_valid[i] && flit_type(in_flit[i][W-1:W-2]) == FLIT_TAIL) cur_q[i] <= '0;
    end

    for (genvar k = 0; k < int'(NB); k++) begin : g_buf
      logic [W-1:0] dout;
      async_fifo #(.DATA_W(W), .DEPTH(DEPTH)) u_fifo (
        .wclk      (clk),
        .rclk      (clk),
        .clear_in  (rst),
        .wr_en     (bwr[i][k]),
        .data_in   (in_flit[i]),
        .fifo_full (bfull[i][k]),
        .rd_en     (bpop[i][k]),
        .data_out  (dout),
        .fifo_empty(bempty[i][k])
      );
      assign bhead[i][k]                = bempty[i][k] ? '0 : dout;
      assign rdy[i][other_port(i, k)]   = !bfull[i][k];
    end
    assign rdy[i][i] = 1'b0;
  end

  // output side: one packet arbiter and one 4:1 multiplexer per output
  for (genvar o = 0; o < int'(NPORTS); o++) begin : g_out
    logic [NB-1:0]        oreq, ogrant;
    logic [NB-1:0][W-1:0] cand;
    logic                 obusy, orel;
    for (genvar k = 0; k < int'(NB); k++) begin : g_k
      // k-th input feeding output o, and its buffer index for o
      localparam int unsigned IP = other_port(o, k);
      localparam int unsigned BI = other_idx(IP, o);
      assign cand[k] = bhead[IP][BI];
      assign oreq[k] = flit_type(cand[k][W-1:W-2]) == FLIT_HEAD;
      assign bpop[IP][BI] = ogrant[k] && !bempty[IP][BI] && out_rdy[o];
    end
    pkt_arbiter #(.N(NB)) u_arb (
      .clk(clk), .rst(rst), .req(oreq), .release_i(orel), .grant(ogrant), .busy(obusy)
    );
    always_comb begin
      out_flit[o] = '0;
      for (int k = 0; k < int'(NB); k++) if (ogrant[k]) out_flit[o] |= cand[k];
    end
    assign out_valid[o] = flit_type(out_flit[o][W-1:W-2]) != FLIT_INVALID;
    assign orel = out_valid[o] && out_rdy[o] && flit_type(out_flit[o][W-1:W-2]) == FLIT_TAIL;
  end

endmodule
