// rr_bus_arbiter: 4x4 round-robin bus arbiter, priority changed every clock.
//
// A cyclic right-shift register, reset to 4'b1000, enables one of four
// priority encoders per clock. Encoder k sees the requests rotated so that
// req[k] has the highest priority, then req[k-1], req[k-2], req[k-3] (modulo
// N); the OR of the encoder outputs is the one-hot grant, registered on the
// clock edge. So after reset the first grant favours req[3], the next req[2],
// and so on, as in the described arbiter waveform (the arbitration chapter
// also lists the rotation in the opposite direction; the shift register form
// is followed here). At most one request is granted per clock. Reset clears
// the grant and ignores requests. Grant appears one clock after the request.
module rr_bus_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] req,
  output logic [N-1:0] grant
);
  logic [N-1:0] sr_q;
  logic [N-1:0] enc_o [N];
  logic [N-1:0] grant_d;

  for (genvar k = 0; k < int'(N); k++) begin : g_enc
    logic [N-1:0] rot_req;
    // rot_req[j] = req[(k - j) mod N]
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
    grant_d = '0;
    for (int k = 0; k < int'(N); k++) grant_d |= enc_o[k];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sr_q  <= N'(1) << (N - 1);
      grant <= '0;
    end else begin
      sr_q  <= {sr_q[0], sr_q[N-1:1]};
      grant <= grant_d;
    end
  end

`ifndef SYNTHESIS
  a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot0(grant));
  a_sr:     assert property (@(posedge clk) disable iff (rst) $onehot(sr_q));
`endif

endmodule
