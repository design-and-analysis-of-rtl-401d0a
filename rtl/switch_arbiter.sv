// switch_arbiter: arbitration for a 5-port wormhole switch.
//
// One pkt_arbiter per output port, each choosing among the four input ports
// other than itself (a packet never leaves by the port it came in on), so five
// 4x1 arbiters in all. req[i][o] says that the packet at input i asks for
// output o; gnt[o][i] is the resulting one-hot crossbar select of output o
// (gnt[o][o] is always 0). A grant is held from the head flit until
// release_o[o] reports the tail of that packet leaving output o.
module switch_arbiter
  import noc_pkg::*;
#(
  parameter int unsigned NP = 5
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [NP-1:0][NP-1:0]  req,        // [input][output]
  input  logic [NP-1:0]          release_o,
  output logic [NP-1:0][NP-1:0]  gnt,        // [output][input]
  output logic [NP-1:0]          busy
);
  for (genvar o = 0; o < int'(NP); o++) begin : g_out
    logic [NP-2:0] sub_req, sub_gnt;
    for (genvar k = 0; k < int'(NP) - 1; k++) begin : g_k
      assign sub_req[k] = req[other_port(o, k)][o];
    end
    pkt_arbiter #(.N(NP - 1)) u_arb (
      .clk      (clk),
      .rst      (rst),
      .req      (sub_req),
      .release_i(release_o[o]),
      .grant    (sub_gnt),
      .busy     (busy[o])
    );
    for (genvar i = 0; i < int'(NP); i++) begin : g_i
      if (i == o) begin : g_self
        assign gnt[o][i] = 1'b0;
      end else begin : g_other
        assign gnt[o][i] = sub_gnt[other_idx(o, i)];
      end
    end
  end
endmodule
