// vc_router: 5-port virtual-channel router with V virtual channels per
// physical channel and credit-based flow control.
//
// Every input port has V flit buffers (sync_fifo, VC_DEPTH flits each); the
// arriving flit is stored in the buffer named by its virtual-channel
// identifier in_vc. For each input VC:
//   1. route compute: a head flit at the buffer head names its output port;
//   2. VC allocation (vc_allocator): the head obtains a free VC of that output
//      port; the input VC keeps the output port and output VC until its tail
//      flit has left, then the output VC is free again;
//   3. switch allocation (vc_switch_allocator): each cycle an allocated input
//      VC with a flit and at least one credit for its output VC competes, V:1
//      per input port then NP:1 per output port;
//   4. switch traversal through an NP x NP crossbar carrying the flit and its
//      new VC identifier (out_vc); out_valid marks a flit.
// Credits: the router keeps, per output VC, the free buffer count of the
// downstream router (VC_DEPTH after reset), spends one per flit sent and gets
// one back per credit_in pulse. credit_out[p][v] pulses when a flit leaves
// input buffer (p, v), telling the upstream router a slot is free; upstream
// routers must honour the credits (a flit into a full buffer is lost).
// Latency: a head written at edge t is allocated a VC in cycle t+1 and crosses
// the switch in cycle t+2; body flits then stream one per cycle. Flits of
// packets in different VCs share an output cycle by cycle.
// The stage order and the credit exchange follow the source text; buffer depth,
// credit counters and the in_vc side band are this design's choices.
module vc_router
  import noc_pkg::*;
#(
  parameter int unsigned W        = 10,
  parameter int unsigned V        = 4,
  parameter int unsigned VC_DEPTH = 4
) (
  input  logic                             clk,
  input  logic                             rst,
  input  logic [NPORTS-1:0][W-1:0]         in_flit,
  input  logic [NPORTS-1:0][$clog2(V)-1:0] in_vc,
  input  logic [NPORTS-1:0]                in_valid,
  output logic [NPORTS-1:0][V-1:0]         credit_out,
  output logic [NPORTS-1:0][W-1:0]         out_flit,
  output logic [NPORTS-1:0][$clog2(V)-1:0] out_vc,
  output logic [NPORTS-1:0]                out_valid,
  input  logic [NPORTS-1:0][V-1:0]         credit_in
);
  localparam int unsigned NP  = NPORTS;
  localparam int unsigned NIV = NP * V;
  localparam int unsigned VW  = $clog2(V);
  localparam int unsigned CW  = $clog2(VC_DEPTH + 1);

  logic [NIV-1:0][W-1:0]  head;
  logic [NIV-1:0]         empty, pop;
  logic [NIV-1:0][NP-1:0] route;
  logic [NIV-1:0]         active_q;
  logic [NIV-1:0][NP-1:0] oport_q;
  logic [NIV-1:0][V-1:0]  ovc_q;

  logic [NIV-1:0]         va_req, va_gnt, sa_req, sa_gnt;
  logic [NIV-1:0][V-1:0]  va_vc;
  logic [NP-1:0][V-1:0]   vc_free_q, vc_free_d;
  logic [NP-1:0][V-1:0][CW-1:0] credit_q;
  logic [NP-1:0][NP-1:0]  xsel;

  logic [NP-1:0][W+VW-1:0] xin, xout;

  // input buffers, one per (port, VC)
  for (genvar p = 0; p < int'(NP); p++) begin : g_p
    for (genvar v = 0; v < int'(V); v++) begin : g_v
      localparam int unsigned R = p * V + v;
      logic [W-1:0] dout;
      sync_fifo #(.W(W), .DEPTH(VC_DEPTH)) u_buf (
        .clk  (clk),
        .rst  (rst),
        .wr   (in_valid[p] && in_vc[p] == VW'(v)
               && flit_type(in_flit[p][W-1:W-2]) != FLIT_INVALID),
        .din  (in_flit[p]),
        .rd   (pop[R]),
        .dout (dout),
        .empty(empty[R]),
        .full ()
      );
      assign head[R] = empty[R] ? '0 : dout;
      route_compute #(.W(W)) u_rc (.flit(head[R]), .out_port(route[R]));
      assign credit_out[p][v] = pop[R];
    end
  end

  // credit available for the output VC an input VC holds
  function automatic logic has_credit(input logic [NP-1:0] op, input logic [V-1:0] ov,
                                      input logic [NP-1:0][V-1:0][CW-1:0] cr);
    logic c;
    c = 1'b0;
    for (int o = 0; o < int'(NP); o++)
      for (int w = 0; w < int'(V); w++)
        if (op[o] && ov[w] && cr[o][w] != '0) c = 1'b1;
    return c;
  endfunction

  always_comb begin
    for (int r = 0; r < int'(NIV); r++) begin
      va_req[r] = !active_q[r] && route[r] != '0;
      sa_req[r] = active_q[r] && !empty[r] && has_credit(oport_q[r], ovc_q[r], credit_q);
    end
  end

  vc_allocator #(.NP(NP), .V(V)) u_va (
    .clk(clk), .rst(rst), .req(va_req), .req_port(route), .vc_free(vc_free_q),
    .gnt(va_gnt), .gnt_vc(va_vc)
  );

  vc_switch_allocator #(.NP(NP), .V(V)) u_sa (
    .clk(clk), .rst(rst), .req(sa_req), .req_port(oport_q), .gnt(sa_gnt), .xsel(xsel)
  );

  assign pop = sa_gnt;

  // crossbar input p: the flit of the VC of port p that won, with its new VC id
  always_comb begin
    for (int p = 0; p < int'(NP); p++) begin
      xin[p] = '0;
      for (int v = 0; v < int'(V); v++) begin
        if (sa_gnt[p*V+v]) begin
          xin[p][W-1:0] = head[p*V+v];
          for (int w = 0; w < int'(V); w++)
            if (ovc_q[p*V+v][w]) xin[p][W+VW-1:W] = VW'(w);
        end
      end
    end
  end

  crossbar #(.NP(NP), .W(W + VW)) u_xbar (.in_flit(xin), .sel(xsel), .out_flit(xout));

  always_comb begin
    for (int o = 0; o < int'(NP); o++) begin
      out_valid[o] = xsel[o] != '0;
      out_flit[o]  = xout[o][W-1:0];
      out_vc[o]    = xout[o][W+VW-1:W];
    end
  end

  // output VCs released by tails leaving this cycle, taken by new grants
  always_comb begin
    vc_free_d = vc_free_q;
    for (int r = 0; r < int'(NIV); r++)
      if (sa_gnt[r] && flit_type(head[r][W-1:W-2]) == FLIT_TAIL)
        for (int o = 0; o < int'(NP); o++) if (oport_q[r][o]) vc_free_d[o] |= ovc_q[r];
    for (int r = 0; r < int'(NIV); r++)
      if (va_gnt[r])
        for (int o = 0; o < int'(NP); o++) if (route[r][o]) vc_free_d[o] &= ~va_vc[r];
  end

  // VC state, output-VC ownership and credits
  always_ff @(posedge clk) begin
    if (rst) begin
      active_q  <= '0;
      oport_q   <= '0;
      ovc_q     <= '0;
      vc_free_q <= '1;
      for (int o = 0; o < int'(NP); o++)
        for (int w = 0; w < int'(V); w++) credit_q[o][w] <= CW'(VC_DEPTH);
    end else begin
      for (int r = 0; r < int'(NIV); r++) begin
        if (va_gnt[r]) begin
          active_q[r] <= 1'b1;
          oport_q[r]  <= route[r];
          ovc_q[r]    <= va_vc[r];
        end
        if (sa_gnt[r] && flit_type(head[r][W-1:W-2]) == FLIT_TAIL) active_q[r] <= 1'b0;
      end
      vc_free_q <= vc_free_d;
      for (int o = 0; o < int'(NP); o++)
        for (int w = 0; w < int'(V); w++) begin
          logic spend;
          spend = out_valid[o] && out_vc[o] == VW'(w);
          credit_q[o][w] <= credit_q[o][w] - CW'(spend) + CW'(credit_in[o][w]);
        end
    end
  end

endmodule
