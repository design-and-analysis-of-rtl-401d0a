// tb_noc_top: end-to-end run of the whole top at its default parameters.
//
// Network interface: a Wishbone master on clk_pe (10 ns) writes a write
// packet (32-bit header word {SA, DA, PS, 0} then PS data words) and a read
// packet (header and one word) into the transmit side; the 34-bit flits
// leaving the packer on clk_noc (7 ns) are looped back into the receive side,
// and the PE reads the words back. Checked: every flit (type and payload),
// the header fields and every data word received; counted: Wishbone wait
// states, packer waiting on an empty FIFO, read packet without bodies.
// Routers: the same four packets (inputs 0 and 1 each send a long packet to
// output 2, then one packet to outputs 3 and 4) go into each router.
// Bufferless: one of the two long packets is dropped. Wormhole: all arrive,
// the losing input's second packet waits (head-of-line blocking). Full
// crossbar: all arrive and that packet overtakes (no blocking). VC router
// (each packet on its own VC, slow credits): all arrive, the two packets for
// output 2 interleave and credits run out. Bus arbiter: random requests
// against a rotating-priority reference; counted: a grant that moved away
// from a master still requesting (fair rotation). Each mechanism must occur.
module tb_noc_top;
  localparam int W = 10, NP = 5, V = 4;
  logic clk_pe = 0, clk_noc = 0, rst = 1;
  logic pe_wr_stb = 0, pe_wr_ack, pe_cmd = 1, pe_rd_stb = 1, pe_rd_ack;
  logic [2:0] pe_sel = 3'd2;
  logic [63:0] pe_wr_dat = '0, pe_rd_dat;
  logic [7:0] rx_byte, rx_src_addr, rx_dst_addr, rx_pkt_size;
  logic rx_byte_valid, rx_pkt_done, tx_valid, rx_full;
  logic [33:0] tx_flit;
  logic [NP-1:0][W-1:0] bl_in_flit = '0, bl_out_flit;
  logic [NP-1:0] bl_drop;
  logic [NP-1:0][W-1:0] wh_in_flit = '0, wh_out_flit;
  logic [NP-1:0] wh_in_valid = '0, wh_rdy, wh_out_valid, wh_out_rdy = '1;
  logic [NP-1:0][W-1:0] fx_in_flit = '0, fx_out_flit;
  logic [NP-1:0] fx_in_valid = '0, fx_out_valid, fx_out_rdy = '1;
  logic [NP-1:0][NP-1:0] fx_rdy;
  logic [NP-1:0][W-1:0] vc_in_flit = '0, vc_out_flit;
  logic [NP-1:0][1:0] vc_in_vc = '0, vc_out_vc;
  logic [NP-1:0] vc_in_valid = '0, vc_out_valid;
  logic [NP-1:0][V-1:0] vc_credit_out, vc_credit_in = '0;
  logic [33:0] rx_flit;
  logic rx_valid;
  logic [3:0] ba_req = '0, ba_grant;

  assign rx_flit  = tx_flit;
  assign rx_valid = tx_valid;

  noc_top dut (.*);

  always #5 clk_pe  = ~clk_pe;
  always #3.5 clk_noc = ~clk_noc;

  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ------------------------------------------------------------ NI
  logic [33:0] exp_flits[$];
  logic [31:0] exp_words[$];
  int n_wait_states = 0, n_packer_wait = 0, n_read_pkts = 0, n_words = 0, n_flits = 0;

  task automatic wb_write32(input logic [31:0] w);
    int lat;
    @(negedge clk_pe);
    pe_wr_stb = 1; pe_wr_dat = {32'h0, w};
    lat = 0;
    do begin @(posedge clk_pe); lat++; #1; end while (!pe_wr_ack);
    if (lat > 1) n_wait_states += lat - 1;
    @(negedge clk_pe) pe_wr_stb = 0;
    repeat (2) @(negedge clk_pe);     // a slow PE: the packer has to wait
  endtask

  always @(posedge clk_noc) if (!rst) begin
    if (dut.u_packer.state_q == 3'd4) n_packer_wait++;
    if (tx_valid) begin
      logic [33:0] e;
      e = exp_flits.pop_front();
      chk(tx_flit == e, $sformatf("NI flit %h exp %h", tx_flit, e));
      n_flits++;
    end
  end

  always @(posedge clk_pe) if (!rst && pe_rd_ack) begin
    logic [31:0] e;
    e = exp_words.pop_front();
    chk(pe_rd_dat[31:0] == e, $sformatf("PE read %h exp %h", pe_rd_dat[31:0], e));
    n_words++;
  end

  task automatic ni_packet(input bit wr, input logic [7:0] ps, input int ndata);
    logic [31:0] h, d;
    pe_cmd = wr;
    h = {8'h12, 8'h34, ps, 8'h00};
    exp_flits.push_back({2'b11, h});
    wb_write32(h);
    for (int k = 0; k < ndata; k++) begin
      d = $urandom;
      exp_flits.push_back({(k == ndata - 1) ? 2'b01 : 2'b10, d});
      exp_words.push_back(d);
      wb_write32(d);
    end
    if (!wr) n_read_pkts++;
  endtask

  // ------------------------------------------------------------ bus arbiter
  int ba_top = 3, n_ba_rotate = 0, n_ba_cycles = 0;
  logic [3:0] ba_exp = '0, ba_prev = '0;
  always @(posedge clk_noc) begin
    if (rst) begin
      ba_top = 3; ba_exp = '0;
    end else begin
      ba_exp = '0;
      for (int j = 0; j < 4; j++)
        if (ba_exp == 0 && ba_req[(ba_top - j + 4) % 4]) ba_exp[(ba_top - j + 4) % 4] = 1'b1;
      ba_top = (ba_top + 3) % 4;
    end
  end
  always @(negedge clk_noc) if (!rst) begin
    chk(ba_grant == ba_exp, $sformatf("bus arbiter grant %b exp %b", ba_grant, ba_exp));
    if (ba_prev != 0 && ba_grant != 0 && ba_grant != ba_prev && (ba_prev & ba_req) != 0) n_ba_rotate++;
    ba_prev = ba_grant;
  end
  task automatic run_bus_arbiter();
    for (int c = 0; c < 200; c++) begin
      @(negedge clk_noc);
      #0.1 ba_req = (c % 8 == 0) ? 4'hF : 4'($urandom);
      n_ba_cycles++;
    end
    @(negedge clk_noc) ba_req = '0;
  endtask

  // ------------------------------------------------------------ routers
  function automatic logic [3:0] paddr(input int p);
    case (p)
      0: return 4'b0011; 1: return 4'b0001; 2: return 4'b0010; 3: return 4'b0100;
      default: return 4'b1000;
    endcase
  endfunction

  // the four packets of the router scenario, per input
  logic [W-1:0] scen [NP][$];
  int           scen_dst [NP][$];
  int           scen_vc [NP][$];
  task automatic build_scenario();
    for (int i = 0; i < NP; i++) begin scen[i] = {}; scen_dst[i] = {}; scen_vc[i] = {}; end
    for (int s = 0; s < 2; s++) begin
      // long packet to output 2 (id s), then a short one to 3 + s (id 2 + s)
      scen[s].push_back({2'b11, paddr(2), 4'(s)});
      for (int k = 0; k < 8; k++) scen[s].push_back({2'b10, 8'(16 * s + k)});
      scen[s].push_back({2'b01, 8'(s)});
      scen[s].push_back({2'b11, paddr(3 + s), 4'(2 + s)});
      for (int k = 0; k < 2; k++) scen[s].push_back({2'b10, 8'(64 + 16 * s + k)});
      scen[s].push_back({2'b01, 8'(2 + s)});
      for (int k = 0; k < 10; k++) begin scen_dst[s].push_back(2); scen_vc[s].push_back(s); end
      for (int k = 0; k < 4; k++)  begin scen_dst[s].push_back(3 + s); scen_vc[s].push_back(2 + s); end
    end
  endtask

  // monitor used by the three buffered routers: head/tail time per packet id
  longint t_head [4], t_tail [4];
  int     flits_rx [4];
  task automatic mon_clear();
    for (int k = 0; k < 4; k++) begin t_head[k] = 0; t_tail[k] = 0; flits_rx[k] = 0; end
  endtask
  task automatic mon_flit(input int o, input logic [W-1:0] f, input int cur_id);
    int id;
    id = (f[W-1:W-2] == 2'b11) ? int'(f[3:0]) : cur_id;
    if (id < 0 || id > 3) begin chk(0, "flit of no packet"); return; end
    flits_rx[id]++;
    if (f[W-1:W-2] == 2'b11) begin
      t_head[id] = $time;
      chk(o == ((id < 2) ? 2 : id + 1), $sformatf("packet %0d at output %0d", id, o));
    end
    if (f[W-1:W-2] == 2'b01) begin
      t_tail[id] = $time;
      chk(f[7:0] == 8'(id), "tail id");
    end
  endtask

  int n_drop = 0, n_bl_delivered = 0, n_hol = 0, n_hol_avoided = 0;
  int n_interleave = 0, n_credit_stall = 0, n_stall = 0;

  // per-output current packet for the buffered routers
  int cur_wh [NP], cur_fx [NP], cur_vc [NP][V];
  int vc_last [NP];
  int vc_pending [NP][V][$];
  bit slow_credit = 0;

  always @(posedge clk_noc) if (!rst) begin
    for (int o = 0; o < NP; o++) begin
      if (bl_drop[o]) n_drop++;
      if (bl_out_flit[o][W-1:W-2] == 2'b01) n_bl_delivered++;
      if (wh_out_valid[o] && wh_out_rdy[o]) begin
        if (wh_out_flit[o][W-1:W-2] == 2'b11) cur_wh[o] = wh_out_flit[o][3:0];
        mon_flit(o, wh_out_flit[o], cur_wh[o]);
      end
      if (fx_out_valid[o] && fx_out_rdy[o]) begin
        if (fx_out_flit[o][W-1:W-2] == 2'b11) cur_fx[o] = fx_out_flit[o][3:0];
        mon_flit(o, fx_out_flit[o], cur_fx[o]);
      end
      if (vc_out_valid[o]) begin
        int w;
        w = vc_out_vc[o];
        if (vc_out_flit[o][W-1:W-2] == 2'b11) cur_vc[o][w] = vc_out_flit[o][3:0];
        if (vc_last[o] >= 0 && vc_last[o] != w) n_interleave++;
        vc_last[o] = w;
        mon_flit(o, vc_out_flit[o], cur_vc[o][w]);
        vc_pending[o][w].push_back(slow_credit ? 6 : 1);
      end
    end
    for (int r = 0; r < NP * V; r++)
      if (dut.u_vc.active_q[r] && !dut.u_vc.empty[r] && !dut.u_vc.sa_req[r]) n_credit_stall++;
    for (int i = 0; i < NP; i++)
      if (dut.u_wormhole.req[i] != '0 && !dut.u_wormhole.pop[i]) n_stall++;
  end

  // credit return for the VC router
  always @(negedge clk_noc) begin
    vc_credit_in = '0;
    for (int o = 0; o < NP; o++)
      for (int w = 0; w < V; w++)
        if (vc_pending[o][w].size() > 0) begin
          vc_pending[o][w][0]--;
          if (vc_pending[o][w][0] <= 0) begin
            void'(vc_pending[o][w].pop_front());
            vc_credit_in[o][w] = 1;
          end
        end
  end

  task automatic run_bufferless();
    build_scenario();
    while (scen[0].size() + scen[1].size() > 0) begin
      @(negedge clk_noc);
      for (int s = 0; s < 2; s++) begin
        bl_in_flit[s] = (scen[s].size() > 0) ? scen[s].pop_front() : '0;
      end
    end
    @(negedge clk_noc) bl_in_flit = '0;
  endtask

  task automatic run_buffered(input int which);     // 0 wormhole, 1 full crossbar
    build_scenario();
    mon_clear();
    while (scen[0].size() + scen[1].size() > 0) begin
      @(negedge clk_noc);
      for (int s = 0; s < 2; s++) begin
        bit ok;
        ok = (scen[s].size() > 0) &&
             ((which == 0) ? wh_rdy[s] : fx_rdy[s][scen_dst[s][0]]);
        if (which == 0) begin
          wh_in_valid[s] = ok; wh_in_flit[s] = ok ? scen[s][0] : '0;
        end else begin
          fx_in_valid[s] = ok; fx_in_flit[s] = ok ? scen[s][0] : '0;
        end
        if (ok) begin void'(scen[s].pop_front()); void'(scen_dst[s].pop_front()); end
      end
    end
    @(negedge clk_noc);
    wh_in_valid = '0; fx_in_valid = '0;
    fork
      wait (t_tail[0] != 0 && t_tail[1] != 0 && t_tail[2] != 0 && t_tail[3] != 0);
      repeat (200) @(posedge clk_noc);
    join_any
    disable fork;
    for (int k = 0; k < 4; k++)
      chk(flits_rx[k] == ((k < 2) ? 10 : 4), $sformatf("router %0d packet %0d: %0d flits", which, k, flits_rx[k]));
  endtask

  task automatic run_vc();
    int cred [2][V];
    build_scenario();
    mon_clear();
    for (int s = 0; s < 2; s++) for (int v = 0; v < V; v++) cred[s][v] = 4;
    slow_credit = 1;
    while (scen[0].size() + scen[1].size() > 0) begin
      @(negedge clk_noc);
      for (int s = 0; s < 2; s++) begin
        for (int v = 0; v < V; v++) if (vc_credit_out[s][v]) cred[s][v]++;
        vc_in_valid[s] = 0; vc_in_flit[s] = '0;
        if (scen[s].size() > 0 && cred[s][scen_vc[s][0]] > 0) begin
          vc_in_valid[s] = 1; vc_in_vc[s] = 2'(scen_vc[s][0]); vc_in_flit[s] = scen[s].pop_front();
          cred[s][scen_vc[s][0]]--;
          void'(scen_vc[s].pop_front());
        end
      end
    end
    @(negedge clk_noc) vc_in_valid = '0;
    fork
      wait (t_tail[0] != 0 && t_tail[1] != 0 && t_tail[2] != 0 && t_tail[3] != 0);
      repeat (300) @(posedge clk_noc);
    join_any
    disable fork;
    for (int k = 0; k < 4; k++)
      chk(flits_rx[k] == ((k < 2) ? 10 : 4), $sformatf("VC router packet %0d: %0d flits", k, flits_rx[k]));
  endtask

  initial begin
    for (int o = 0; o < NP; o++) begin
      cur_wh[o] = -1; cur_fx[o] = -1; vc_last[o] = -1;
      for (int w = 0; w < V; w++) cur_vc[o][w] = -1;
    end
    repeat (4) @(posedge clk_pe);
    @(negedge clk_pe) rst = 0;
    fork
      begin   // network interface
        ni_packet(1, 8'd3, 3);
        ni_packet(0, 8'd0, 1);
        ni_packet(1, 8'd2, 2);
        fork
          wait (exp_flits.size() == 0 && exp_words.size() == 0);
          repeat (400) @(posedge clk_pe);
        join_any
        disable fork;
        chk(exp_flits.size() == 0, $sformatf("%0d NI flits missing", exp_flits.size()));
        chk(exp_words.size() == 0, $sformatf("%0d PE words missing", exp_words.size()));
        chk(rx_src_addr == 8'h12 && rx_dst_addr == 8'h34 && rx_pkt_size == 8'd2, "received header fields");
      end
      run_bus_arbiter();
      begin   // routers
        run_bufferless();
        chk(n_drop == 10 && n_bl_delivered == 3, $sformatf("bufferless: %0d flits dropped, %0d tails out", n_drop, n_bl_delivered));
        run_buffered(0);
        begin
          int l, l2;
          l = (t_head[0] < t_head[1]) ? 1 : 0;
          l2 = 2 + l;
          if (t_head[l2] > t_tail[l]) n_hol++;
        end
        run_buffered(1);
        begin
          int l, l2;
          l = (t_head[0] < t_head[1]) ? 1 : 0;
          l2 = 2 + l;
          if (t_head[l2] < t_tail[l]) n_hol_avoided++;
        end
        run_vc();
      end
    join
    chk(n_wait_states > 0, "Wishbone wait states");
    chk(n_packer_wait > 0, "packer waited on an empty FIFO");
    chk(n_read_pkts > 0, "read packet");
    chk(n_drop > 0, "bufferless drop");
    chk(n_stall > 0, "wormhole contention stall");
    chk(n_hol > 0, "wormhole head-of-line blocking");
    chk(n_hol_avoided > 0, "full crossbar overtaking");
    chk(n_interleave > 0, "VC interleaving");
    chk(n_credit_stall > 0, "VC credit stall");
    chk(n_ba_rotate > 0, "bus arbiter rotation");
    $display("NI: %0d flits, %0d words, %0d wait states, %0d packer waits, %0d read packets",
             n_flits, n_words, n_wait_states, n_packer_wait, n_read_pkts);
    $display("routers: drops %0d, wormhole stalls %0d, HoL %0d, HoL avoided %0d, VC interleave %0d, credit stalls %0d",
             n_drop, n_stall, n_hol, n_hol_avoided, n_interleave, n_credit_stall);
    $display("bus arbiter: %0d cycles, %0d rotations away from a waiting master", n_ba_cycles, n_ba_rotate);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
