// route_compute: routing computation for the 5-port routers.
// A head flit (type 2'b11 in the top two bits) carries a 4-bit output-port
// address in bits [W-3:W-6] (bits [7:4] of a 10-bit flit). The address is
// decoded with the router port-address table (LOCAL 0011, EAST 0001, WEST
// 0010, NORTH 0100, SOUTH 1000) into a one-hot port vector (0 local, 1 east,
// 2 west, 3 north, 4 south). Any other flit, or an unknown address, gives 0.
// The field position is this design's reading of the waveforms; combinational.
module route_compute
  import noc_pkg::*;
#(
  parameter int unsigned W = 10
) (
  input  logic [W-1:0]      flit,
  output logic [NPORTS-1:0] out_port
);
  assign out_port = (flit_type(flit[W-1:W-2]) == FLIT_HEAD)
                    ? addr_to_port(flit[W-3:W-6]) : '0;
endmodule
