// bufferless_router: 5-port router without flit buffers, dropping flow
// control.
//
// Every input flit is either switched to its output in the same clock or
// dropped. A head flit asks for the output named by its port address; the
// output's packet arbiter (one 4x1 round-robin arbiter per output) connects
// it if the output is free, and the connection stays until the tail flit has
// passed. A head that loses the arbitration, or finds its output held by
// another packet, is dropped together with the rest of its packet (the body
// and tail flits that follow on that input); the source must retransmit.
// drop[i] flags each dropped flit. Idle links carry the invalid flit 2'b00.
// Output flits are combinational from the inputs; the only state is the
// per-input connected flag and the arbiters (an input that is not connected
// drops body and tail flits). Reset idles every output.
module bufferless_router
  import noc_pkg::*;
#(
  parameter int unsigned W = 10
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic [NPORTS-1:0][W-1:0]  in_flit,
  output logic [NPORTS-1:0][W-1:0]  out_flit,
  output logic [NPORTS-1:0]         drop
);
  logic [NPORTS-1:0][NPORTS-1:0] req, gnt;
  logic [NPORTS-1:0]             release_o, busy;
  logic [NPORTS-1:0]             conn_q;
  logic [NPORTS-1:0][NPORTS-1:0] route;
  flit_type_e                    ft [NPORTS];
  logic [NPORTS-1:0]             granted;

  for (genvar i = 0; i < int'(NPORTS); i++) begin : g_in
    route_compute #(.W(W)) u_rc (.flit(in_flit[i]), .out_port(route[i]));
    assign ft[i]  = flit_type(in_flit[i][W-1:W-2]);
    assign req[i] = !conn_q[i] ? route[i] : '0;
  end

  switch_arbiter #(.NP(NPORTS)) u_sa (
    .clk(clk), .rst(rst), .req(req), .release_o(release_o), .gnt(gnt), .busy(busy)
  );

  crossbar #(.NP(NPORTS), .W(W)) u_xbar (.in_flit(in_flit), .sel(gnt), .out_flit(out_flit));

  always_comb begin
    for (int o = 0; o < int'(NPORTS); o++) begin
      release_o[o] = 1'b0;
      for (int i = 0; i < int'(NPORTS); i++)
        if (gnt[o][i] && conn_q[i] && ft[i] == FLIT_TAIL) release_o[o] = 1'b1;
    end
    for (int i = 0; i < int'(NPORTS); i++) begin
      granted[i] = 1'b0;
      for (int o = 0; o < int'(NPORTS); o++) granted[i] |= gnt[o][i];
      unique case (ft[i])
        FLIT_HEAD:            drop[i] = !conn_q[i] && !granted[i];
        FLIT_BODY, FLIT_TAIL: drop[i] = !conn_q[i];
        default:              drop[i] = 1'b0;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      conn_q     <= '0;
    end else begin
      for (int i = 0; i < int'(NPORTS); i++) begin
        if (ft[i] == FLIT_HEAD && !conn_q[i]) begin
          conn_q[i]     <= granted[i];
        end else if (ft[i] == FLIT_TAIL) begin
          conn_q[i]     <= 1'b0;
        end
      end
    end
  end
endmodule
