// prio_encoder: priority encoder with enable, the building block of the
// round-robin arbiters. With en high, the output is one-hot on the
// lowest-numbered active input (i[0] has the highest priority); with en low,
// or no input active, the output is all zero. Purely combinational.
// Follows the characteristic table and equations of the source text
// (O[k] = EN & ~I[0] & ... & ~I[k-1] & I[k]); N = 4 by default.
module prio_encoder #(
  parameter int unsigned N = 4
) (
  input  logic         en,
  input  logic [N-1:0] i,
  output logic [N-1:0] o
);
  always_comb begin
    logic seen;
    seen = 1'b0;
    o    = '0;
    for (int k = 0; k < int'(N); k++) begin
      o[k] = en && i[k] && !seen;
      seen = seen || i[k];
    end
  end
endmodule
