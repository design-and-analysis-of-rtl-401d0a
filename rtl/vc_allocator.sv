// vc_allocator: virtual-channel allocator for a routing function that returns
// a physical output port and leaves the choice of its VC open (R -> p).
//
// Separable, two stages. Stage 1: each of the NP*V input VCs that requests an
// output port picks one of that port's free output VCs with its own V:1
// round-robin arbiter. Stage 2: each of the NP*V output VCs has an (NP*V):1
// round-robin arbiter over the input VCs whose stage-1 choice is that VC, and
// grants one. An input VC that loses retries in the next cycle. Combinational
// grant (gnt, one-hot gnt_vc) in the cycle of the request; the arbiters'
// pointers move on the clock edge. The caller marks a granted output VC busy
// (vc_free low) from the next cycle until its packet's tail has left.
// Input VC index r = port * V + vc.
module vc_allocator #(
  parameter int unsigned NP = 5,
  parameter int unsigned V  = 4
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic [NP*V-1:0]               req,
  input  logic [NP*V-1:0][NP-1:0]       req_port,
  input  logic [NP-1:0][V-1:0]          vc_free,
  output logic [NP*V-1:0]               gnt,
  output logic [NP*V-1:0][V-1:0]        gnt_vc
);
  localparam int unsigned NIV = NP * V;

  logic [NIV-1:0][V-1:0]        s1;
  logic [NP-1:0][V-1:0][NIV-1:0] g2;

  for (genvar r = 0; r < int'(NIV); r++) begin : g_s1
    logic [V-1:0] cand;
    always_comb begin
      cand = '0;
      for (int o = 0; o < int'(NP); o++) if (req_port[r][o]) cand |= vc_free[o];
      if (!req[r]) cand = '0;
    end
    rr_arb #(.N(V)) u_arb (.clk(clk), .rst(rst), .req(cand), .adv(gnt[r]), .gnt(s1[r]));
  end

  for (genvar o = 0; o < int'(NP); o++) begin : g_o
    for (genvar w = 0; w < int'(V); w++) begin : g_w
      logic [NIV-1:0] r2;
      for (genvar r = 0; r < int'(NIV); r++) begin : g_r
        assign r2[r] = req[r] && req_port[r][o] && s1[r][w];
      end
      rr_arb #(.N(NIV)) u_arb (.clk(clk), .rst(rst), .req(r2), .adv(1'b1), .gnt(g2[o][w]));
    end
  end

  always_comb begin
    for (int r = 0; r < int'(NIV); r++) begin
      gnt[r] = 1'b0;
      for (int o = 0; o < int'(NP); o++)
        for (int w = 0; w < int'(V); w++) gnt[r] |= g2[o][w][r];
      gnt_vc[r] = gnt[r] ? s1[r] : '0;
    end
  end

endmodule
