// pkt_arbiter: packet-level round-robin arbiter for one router output port.
//
// Same structure as the bus arbiter (one-hot priority register enabling one of
// N rotated priority encoders), but for wormhole switching the priority moves
// per packet, not per clock. While the output is free the grant is the
// combinational encoder result, so a head flit can cross in the cycle it
// requests; the winner is then locked and its grant held (busy high) until
// release_i reports that the tail flit of the packet has passed. Release frees
// the output at the clock edge and rotates the priority one step, so the
// output is free again in the next cycle. Reset frees the output and gives
// req[N-1] the highest priority.
module pkt_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] req,
  input  logic         release_i,
  output logic [N-1:0] grant,
  output logic         busy
);
  logic [N-1:0] sr_q;
  logic [N-1:0] lock_q;
  logic [N-1:0] enc_o [N];
  logic [N-1:0] free_gnt;

  for (genvar k = 0; k < int'(N); k++) begin : g_enc
    logic [N-1:0] rot_req;
    for (genvar j = 0; j < int'(N); j++) begin : g_rot
      assign rot_req[j] = req[(k - j + N) % N];
    end
    logic [N-1:0] o;
    prio_encoder #(.N(N)) u_pe (.en(sr_q[k]), .i(rot_req), .o(o));
    for (genvar j = 0; j < int'(N); j++) begin : g_back
      assign enc_o[k][(k - j + N) % N] = o[j];
    end
  end

  always_comb begin
    free_gnt = '0;
    for (int k = 0; k < int'(N); k++) free_gnt |= enc_o[k];
  end

  assign grant = busy ? lock_q : free_gnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      sr_q   <= N'(1) << (N - 1);
      lock_q <= '0;
      busy   <= 1'b0;
    end else if (busy) begin
      if (release_i) begin
        busy   <= 1'b0;
        lock_q <= '0;
        sr_q   <= {sr_q[0], sr_q[N-1:1]};
      end
    end else if (free_gnt != '0) begin
      busy   <= 1'b1;
      lock_q <= free_gnt;
    end
  end

`ifndef SYNTHESIS
  a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot0(grant));
  a_hold:   assert property (@(posedge clk) disable iff (rst)
                             busy && !release_i |=> grant == $past(grant));
`endif

endmodule
