// noc_top: the network-on-chip components side by side.
//
// Network interface: the transmit side takes Wishbone writes from a
// processing element on clk_pe (wb_fifo), crosses them to clk_noc through the
// dual-clock FIFO and packs them into 34-bit flits (ni_packer), offered on
// tx_flit/tx_valid. The receive side takes 34-bit flits on clk_noc
// (rx_flit/rx_valid, rx_full), crosses them back to clk_pe through a second
// dual-clock FIFO and unpacks them into bytes and Wishbone words (ni_unpacker).
// The PE reads with pe_rd_stb and gets pe_rd_dat/pe_rd_ack.
//
// Routers: the four 5-port router organisations, each with its own flit ports
// on clk_noc (10-bit flits): bufferless (drops on contention), wormhole
// (input FIFO, packet-held crossbar), full-crossbar (a buffer per input and
// output pair) and virtual-channel (4 VCs, credits). The NI flits are wider
// than the router flits, so the NI and the routers are not wired together
// here; each is reached from the top's ports.
//
// Bus arbiter: the round-robin arbiter for four masters sharing one bus
// (ba_req/ba_grant on clk_noc), the building block the router arbiters are
// derived from, also stands on its own here. rst resets everything: it is a
// synchronous reset for the state machines and arbiters and the asynchronous
// clear of the dual-clock FIFOs, which must empty even without a clock.
module noc_top
  import noc_pkg::*;
#(
  parameter int unsigned W        = ROUTER_FLIT_W,
  parameter int unsigned DEPTH    = 16,
  parameter int unsigned V        = 4,
  parameter int unsigned VC_DEPTH = 4
) (
  input  logic                              clk_pe,
  input  logic                              clk_noc,
  input  logic                              rst,
  // NI, Wishbone side (clk_pe)
  input  logic                              pe_wr_stb,
  input  logic [2:0]                        pe_sel,
  input  logic [63:0]                       pe_wr_dat,
  output logic                              pe_wr_ack,
  input  logic                              pe_cmd,
  input  logic                              pe_rd_stb,
  output logic [63:0]                       pe_rd_dat,
  output logic                              pe_rd_ack,
  output logic [7:0]                        rx_byte,
  output logic                              rx_byte_valid,
  output logic [7:0]                        rx_src_addr,
  output logic [7:0]                        rx_dst_addr,
  output logic [7:0]                        rx_pkt_size,
  output logic                              rx_pkt_done,
  // NI, network side (clk_noc)
  output logic [NI_FLIT_W-1:0]              tx_flit,
  output logic                              tx_valid,
  input  logic [NI_FLIT_W-1:0]              rx_flit,
  input  logic                              rx_valid,
  output logic                              rx_full,
  // bufferless router
  input  logic [NPORTS-1:0][W-1:0]          bl_in_flit,
  output logic [NPORTS-1:0][W-1:0]          bl_out_flit,
  output logic [NPORTS-1:0]                 bl_drop,
  // wormhole router
  input  logic [NPORTS-1:0][W-1:0]          wh_in_flit,
  input  logic [NPORTS-1:0]                 wh_in_valid,
  output logic [NPORTS-1:0]                 wh_rdy,
  output logic [NPORTS-1:0][W-1:0]          wh_out_flit,
  output logic [NPORTS-1:0]                 wh_out_valid,
  input  logic [NPORTS-1:0]                 wh_out_rdy,
  // full-crossbar router
  input  logic [NPORTS-1:0][W-1:0]          fx_in_flit,
  input  logic [NPORTS-1:0]                 fx_in_valid,
  output logic [NPORTS-1:0][NPORTS-1:0]     fx_rdy,
  output logic [NPORTS-1:0][W-1:0]          fx_out_flit,
  output logic [NPORTS-1:0]                 fx_out_valid,
  input  logic [NPORTS-1:0]                 fx_out_rdy,
  // virtual-channel router
  input  logic [NPORTS-1:0][W-1:0]          vc_in_flit,
  input  logic [NPORTS-1:0][$clog2(V)-1:0]  vc_in_vc,
  input  logic [NPORTS-1:0]                 vc_in_valid,
  output logic [NPORTS-1:0][V-1:0]          vc_credit_out,
  output logic [NPORTS-1:0][W-1:0]          vc_out_flit,
  output logic [NPORTS-1:0][$clog2(V)-1:0]  vc_out_vc,
  output logic [NPORTS-1:0]                 vc_out_valid,
  input  logic [NPORTS-1:0][V-1:0]          vc_credit_in,
  // bus arbiter (4 masters)
  input  logic [3:0]                        ba_req,
  output logic [3:0]                        ba_grant
);
  // ---------------- network interface, transmit ----------------
  logic       tx_empty, tx_rd;
  logic [7:0] tx_byte;

  wb_fifo #(.DEPTH(DEPTH)) u_wb_fifo (
    .clk_i(clk_pe), .rst_i(rst), .stb_i(pe_wr_stb), .sel_i(pe_sel), .dat_i(pe_wr_dat),
    .ack_o(pe_wr_ack), .rclk(clk_noc), .rd_en(tx_rd), .dout(tx_byte), .empty(tx_empty)
  );

  ni_packer u_packer (
    .clk(clk_noc), .rst(rst), .fifo_empty(tx_empty), .fifo_rd(tx_rd), .fifo_data(tx_byte),
    .cmd(pe_cmd), .flit(tx_flit), .valid(tx_valid)
  );

  // ---------------- network interface, receive ----------------
  logic                 rxf_empty, rxf_rd;
  logic [NI_FLIT_W-1:0] rxf_data;

  async_fifo #(.DATA_W(NI_FLIT_W), .DEPTH(DEPTH)) u_rx_fifo (
    .wclk(clk_noc), .rclk(clk_pe), .clear_in(rst), .wr_en(rx_valid), .data_in(rx_flit),
    .fifo_full(rx_full), .rd_en(rxf_rd), .data_out(rxf_data), .fifo_empty(rxf_empty)
  );

  logic unp_ready;
  assign rxf_rd = unp_ready && !rxf_empty;

  ni_unpacker u_unpacker (
    .clk(clk_pe), .rst(rst), .flit(rxf_data), .valid(!rxf_empty), .ready(unp_ready),
    .data_out(rx_byte), .byte_valid(rx_byte_valid), .src_addr(rx_src_addr),
    .dst_addr(rx_dst_addr), .pkt_size(rx_pkt_size), .sel_i(pe_sel), .stb_i(pe_rd_stb),
    .dat_o(pe_rd_dat), .ack_o(pe_rd_ack), .pkt_done(rx_pkt_done)
  );

  // ---------------- routers ----------------
  bufferless_router #(.W(W)) u_bufferless (
    .clk(clk_noc), .rst(rst), .in_flit(bl_in_flit), .out_flit(bl_out_flit), .drop(bl_drop)
  );

  wormhole_router #(.W(W), .DEPTH(DEPTH)) u_wormhole (
    .clk(clk_noc), .rst(rst), .in_flit(wh_in_flit), .in_valid(wh_in_valid), .rdy(wh_rdy),
    .out_flit(wh_out_flit), .out_valid(wh_out_valid), .out_rdy(wh_out_rdy)
  );

  vc_xbar_router #(.W(W), .DEPTH(DEPTH)) u_fullxbar (
    .clk(clk_noc), .rst(rst), .in_flit(fx_in_flit), .in_valid(fx_in_valid), .rdy(fx_rdy),
    .out_flit(fx_out_flit), .out_valid(fx_out_valid), .out_rdy(fx_out_rdy)
  );

  vc_router #(.W(W), .V(V), .VC_DEPTH(VC_DEPTH)) u_vc (
    .clk(clk_noc), .rst(rst), .in_flit(vc_in_flit), .in_vc(vc_in_vc), .in_valid(vc_in_valid),
    .credit_out(vc_credit_out), .out_flit(vc_out_flit), .out_vc(vc_out_vc),
    .out_valid(vc_out_valid), .credit_in(vc_credit_in)
  );

  // ---------------- bus arbiter ----------------
  rr_bus_arbiter #(.N(4)) u_bus_arb (
    .clk(clk_noc), .rst(rst), .req(ba_req), .grant(ba_grant)
  );

endmodule
