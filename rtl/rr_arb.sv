// rr_arb: combinational round-robin arbiter with a rotating priority pointer.
// gnt is one-hot on the first active request at or after the pointer (cyclic
// order). When adv is high and a request is granted, the pointer moves to the
// position after the winner, so the winner has lowest priority next time.
// Used for the virtual-channel allocator and switch allocator stages.
module rr_arb #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] req,
  input  logic         adv,
  output logic [N-1:0] gnt
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;
  logic [IW-1:0] ptr_q;
  logic [IW-1:0] win;
  logic          any;

  always_comb begin
    gnt = '0;
    win = '0;
    any = 1'b0;
    for (int k = 0; k < int'(N); k++) begin
      int unsigned idx;
      idx = (int'(ptr_q) + k) % N;
      if (!any && req[idx]) begin
        any      = 1'b1;
        win      = IW'(idx);
        gnt[idx] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) ptr_q <= '0;
    else if (adv && any) ptr_q <= (win == IW'(N - 1)) ? '0 : win + IW'(1);
  end
endmodule
