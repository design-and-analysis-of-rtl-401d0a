// vc_switch_allocator: separable switch allocator of the virtual-channel
// router, arbitrating flit by flit.
//
// Stage 1: each input port has a V:1 round-robin arbiter that picks one of its
// VCs ready to send (req). Stage 2: each output port has an NP:1 round-robin
// arbiter over the input ports whose stage-1 winner wants that output. gnt
// marks the input VCs that send a flit this cycle (at most one per input
// port and one per output port); xsel[o][p] is the crossbar select. Since the
// arbiters move on every grant, VCs of different packets share a physical
// channel in turn, cycle by cycle. Combinational grants; pointers move on the
// clock edge. Input VC index r = port * V + vc.
module vc_switch_allocator #(
  parameter int unsigned NP = 5,
  parameter int unsigned V  = 4
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic [NP*V-1:0]           req,
  input  logic [NP*V-1:0][NP-1:0]   req_port,
  output logic [NP*V-1:0]           gnt,
  output logic [NP-1:0][NP-1:0]     xsel        // [output][input]
);
  logic [NP-1:0][V-1:0]  s1;
  logic [NP-1:0][NP-1:0] preq;      // [input][output]
  logic [NP-1:0]         pgnt;      // input port won an output

  for (genvar p = 0; p < int'(NP); p++) begin : g_in
    rr_arb #(.N(V)) u_arb (
      .clk(clk), .rst(rst), .req(req[p*V +: V]), .adv(pgnt[p]), .gnt(s1[p])
    );
    always_comb begin
      preq[p] = '0;
      for (int v = 0; v < int'(V); v++) if (s1[p][v]) preq[p] |= req_port[p*V+v];
    end
  end

  for (genvar o = 0; o < int'(NP); o++) begin : g_out
    logic [NP-1:0] r2;
    for (genvar p = 0; p < int'(NP); p++) begin : g_p
      assign r2[p] = preq[p][o];
    end
    rr_arb #(.N(NP)) u_arb (.clk(clk), .rst(rst), .req(r2), .adv(1'b1), .gnt(xsel[o]));
  end

  always_comb begin
    for (int p = 0; p < int'(NP); p++) begin
      pgnt[p] = 1'b0;
      for (int o = 0; o < int'(NP); o++) pgnt[p] |= xsel[o][p];
      for (int v = 0; v < int'(V); v++) gnt[p*V+v] = pgnt[p] && s1[p][v];
    end
  end

endmodule
