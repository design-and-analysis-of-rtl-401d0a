// noc_pkg: types and constants shared by the NoC network interface and routers.
//
// Flit type is carried in the two most significant bits of every flit:
// 2'b11 head, 2'b10 body, 2'b01 tail, 2'b00 invalid (an idle link).
// Router flits are 10 bits wide; in a head flit bits [7:4] hold the 4-bit
// output-port address of Table "router port addresses" (LOCAL 0011, EAST 0001,
// WEST 0010, NORTH 0100, SOUTH 1000). NI flits are 34 bits: type plus a
// 32-bit payload; a head payload is {SA, DA, PS, reserved/VCI}, one byte each.
// Port indices used for every 5-port vector: 0 local, 1 east, 2 west,
// 3 north, 4 south.
package noc_pkg;

  typedef enum logic [1:0] {
    FLIT_INVALID = 2'b00,
    FLIT_TAIL    = 2'b01,
    FLIT_BODY    = 2'b10,
    FLIT_HEAD    = 2'b11
  } flit_type_e;

  localparam int unsigned NPORTS = 5;
  localparam int unsigned ROUTER_FLIT_W = 10;
  localparam int unsigned NI_FLIT_W = 34;

  localparam int unsigned PORT_LOCAL = 0;
  localparam int unsigned PORT_EAST  = 1;
  localparam int unsigned PORT_WEST  = 2;
  localparam int unsigned PORT_NORTH = 3;
  localparam int unsigned PORT_SOUTH = 4;

  localparam logic [3:0] ADDR_LOCAL = 4'b0011;
  localparam logic [3:0] ADDR_EAST  = 4'b0001;
  localparam logic [3:0] ADDR_WEST  = 4'b0010;
  localparam logic [3:0] ADDR_NORTH = 4'b0100;
  localparam logic [3:0] ADDR_SOUTH = 4'b1000;

  // Type field of a flit of any width.
  function automatic flit_type_e flit_type(input logic [1:0] msb2);
    return flit_type_e'(msb2);
  endfunction

  // Port address (Table 5-5) to one-hot output port; 0 for an unknown address.
  function automatic logic [NPORTS-1:0] addr_to_port(input logic [3:0] addr);
    logic [NPORTS-1:0] p;
    p = '0;
    unique case (addr)
      ADDR_LOCAL: p[PORT_LOCAL] = 1'b1;
      ADDR_EAST:  p[PORT_EAST]  = 1'b1;
      ADDR_WEST:  p[PORT_WEST]  = 1'b1;
      ADDR_NORTH: p[PORT_NORTH] = 1'b1;
      ADDR_SOUTH: p[PORT_SOUTH] = 1'b1;
      default:    p = '0;
    endcase
    return p;
  endfunction

  // Map an output port o and an input port i != o to the index 0..3 of i
  // among the four inputs that may use output o (inputs never U-turn).
  function automatic int unsigned other_idx(input int unsigned o, input int unsigned i);
    return (i < o) ? i : i - 1;
  endfunction

  // Inverse of other_idx: the k-th (0..3) input port other than o.
  function automatic int unsigned other_port(input int unsigned o, input int unsigned k);
    return (k < o) ? k : k + 1;
  endfunction

endpackage
