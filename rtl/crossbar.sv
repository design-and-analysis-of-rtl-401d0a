// crossbar: NP x NP crossbar switch built from one NP:1 multiplexer per output.
// sel[o] is a one-hot input select for output o (from the switch arbiter);
// an output with no input selected carries all zeros, which is an invalid
// (idle) flit. Strictly non-blocking: any free input can reach any free
// output. Purely combinational; defaults 5 ports of 10-bit flits.
module crossbar #(
  parameter int unsigned NP = 5,
  parameter int unsigned W  = 10
) (
  input  logic [NP-1:0][W-1:0]  in_flit,
  input  logic [NP-1:0][NP-1:0] sel,       // [output][input]
  output logic [NP-1:0][W-1:0]  out_flit
);
  always_comb begin
    for (int o = 0; o < int'(NP); o++) begin
      out_flit[o] = '0;
      for (int i = 0; i < int'(NP); i++) begin
        if (sel[o][i]) out_flit[o] |= in_flit[i];
      end
    end
  end
endmodule
