// wormhole_router: 5-port input-buffered wormhole router.
//
// Each input port writes arriving flits into its own async_fifo (used here
// with one clock on both sides); rdy[i] (FIFO not full) tells the upstream
// router it may send. The flit at the head of each FIFO is examined: a head
// flit goes through route compute (port address) and requests its output.
// The switch arbiter (one 4x1 packet arbiter per output) grants one input per
// output and holds that crossbar connection until the tail flit has left, so
// all flits of a packet follow the head (switching at packet level, flow
// control at flit level). A flit leaves when the granted output's out_rdy is
// high; out_valid marks a flit on out_flit. A packet whose output is busy
// waits in its FIFO and blocks everything behind it (head-of-line blocking),
// which is the known weakness of this organisation. Invalid flits are not
// stored. Head latency: a flit written at clock edge t is visible at the FIFO
// head three edges later (two-flop pointer synchronizer) and leaves in that
// cycle if its output is free.
// rst is the synchronous reset of the arbiters and state and, at the same
// time, the asynchronous clear_in of the input FIFOs.
module wormhole_router
  import noc_pkg::*;
#(
  parameter int unsigned W     = 10,
  parameter int unsigned DEPTH = 16
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic [NPORTS-1:0][W-1:0]  in_flit,
  input  logic [NPORTS-1:0]         in_valid,
  output logic [NPORTS-1:0]         rdy,
  output logic [NPORTS-1:0][W-1:0]  out_flit,
  output logic [NPORTS-1:0]         out_valid,
  input  logic [NPORTS-1:0]         out_rdy
);
  logic [NPORTS-1:0][W-1:0]      head;
  logic [NPORTS-1:0]             empty, full, pop;
  logic [NPORTS-1:0][NPORTS-1:0] req, gnt, route;
  logic [NPORTS-1:0]             release_o, busy;

  for (genvar i = 0; i < int'(NPORTS); i++) begin : g_in
    logic [W-1:0] fifo_dout;
    async_fifo #(.DATA_W(W), .DEPTH(DEPTH)) u_fifo (
      .wclk      (clk),
      .rclk      (clk),
      .clear_in  (rst),
      .wr_en     (in_valid[i] && in_flit[i][W-1:W-2] != FLIT_INVALID),
      .data_in   (in_flit[i]),
      .fifo_full (full[i]),
      .rd_en     (pop[i]),
      .data_out  (fifo_dout),
      .fifo_empty(empty[i])
    );
    assign head[i] = empty[i] ? '0 : fifo_dout;
    assign rdy[i]  = !full[i];
    route_compute #(.W(W)) u_rc (.flit(head[i]), .out_port(route[i]));
    assign req[i] = route[i];
  end

  switch_arbiter #(.NP(NPORTS)) u_sa (
    .clk(clk), .rst(rst), .req(req), .release_o(release_o), .gnt(gnt), .busy(busy)
  );

  crossbar #(.NP(NPORTS), .W(W)) u_xbar (.in_flit(head), .sel(gnt), .out_flit(out_flit));

  always_comb begin
    pop = '0;
    for (int o = 0; o < int'(NPORTS); o++) begin
      out_valid[o] = 1'b0;
      for (int i = 0; i < int'(NPORTS); i++)
        if (gnt[o][i] && !empty[i]) out_valid[o] = 1'b1;
      release_o[o] = out_valid[o] && out_rdy[o]
                     && flit_type(out_flit[o][W-1:W-2]) == FLIT_TAIL;
      for (int i = 0; i < int'(NPORTS); i++)
        if (gnt[o][i] && !empty[i] && out_rdy[o]) pop[i] = 1'b1;
    end
  end

endmodule
