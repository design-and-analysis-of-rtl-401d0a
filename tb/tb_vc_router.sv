// tb_vc_router: upstream models give every input port V virtual channels
// with credit counters (VC_DEPTH each, refilled by credit_out); downstream
// models hold the flits of each output VC and return a credit after a random
// delay (1..6 clocks), checking that no output VC is ever sent more flits than
// it has room for. Packets: head {11, port address, id[3:0]}, bodies
// {10, id + k}, tail {01, id}. Each output VC must receive whole packets at
// the right port, every packet must arrive, and the per-hop head latency with
// an idle router is checked (written at edge t, crosses in cycle t+2). Counted
// mechanisms: two packets of different VCs interleaved on one output, a flit
// held for want of credit, two heads asking for the same output at once.
module tb_vc_router;
  localparam int W = 10, NP = 5, V = 4, D = 4;
  logic clk = 0, rst = 1;
  logic [NP-1:0][W-1:0] in_flit = '0, out_flit;
  logic [NP-1:0][1:0] in_vc = '0, out_vc;
  logic [NP-1:0] in_valid = '0, out_valid;
  logic [NP-1:0][V-1:0] credit_out, credit_in = '0;
  int checks = 0, failures = 0;

  vc_router #(.W(W), .V(V), .VC_DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic logic [3:0] paddr(input int p);
    case (p)
      0: return 4'b0011; 1: return 4'b0001; 2: return 4'b0010; 3: return 4'b0100;
      default: return 4'b1000;
    endcase
  endfunction

  logic [W-1:0] pkt_flits [256][$];
  int           pkt_dst [256];
  bit           pkt_done [256];
  logic [W-1:0] txq [NP][V][$];
  int           up_cred [NP][V];
  int           dn_occ [NP][V];
  int           dn_delay [NP][V][$];
  logic [W-1:0] rxbuf [NP][V][$];
  int           next_id = 0, delivered = 0, sent = 0;
  int           interleaves = 0, credit_stalls = 0, va_conflicts = 0;
  int           last_vc [NP];
  bit           slow_dn = 0;
  longint       t_in_head = 0, t_out_head = 0;

  task automatic make_pkt(input int src, input int vc, input int dst, input int nbody);
    int id;
    id = next_id++;
    pkt_flits[id] = {};
    pkt_flits[id].push_back({2'b11, paddr(dst), 4'(id)});
    for (int k = 0; k < nbody; k++) pkt_flits[id].push_back({2'b10, 8'(id + k + 1)});
    pkt_flits[id].push_back({2'b01, 8'(id)});
    pkt_dst[id] = dst; pkt_done[id] = 0;
    foreach (pkt_flits[id][k]) txq[src][vc].push_back(pkt_flits[id][k]);
    sent++;
  endtask

  // upstream senders: one flit per port per clock, from a VC with credit
  always @(negedge clk) if (!rst) begin
    for (int p = 0; p < NP; p++) begin
      int start;
      in_valid[p] = 0; in_flit[p] = '0;
      start = $urandom_range(0, V - 1);
      for (int j = 0; j < V; j++) begin
        int v;
        v = (start + j) % V;
        if (!in_valid[p] && txq[p][v].size() > 0 && up_cred[p][v] > 0) begin
          in_valid[p] = 1; in_vc[p] = 2'(v); in_flit[p] = txq[p][v].pop_front();
          up_cred[p][v]--;
          if (in_flit[p][W-1:W-2] == 2'b11 && t_in_head == 0) t_in_head = $time;
        end
      end
    end
    // downstream credit return
    credit_in = '0;
    for (int o = 0; o < NP; o++)
      for (int w = 0; w < V; w++)
        if (dn_delay[o][w].size() > 0) begin
          dn_delay[o][w][0]--;
          if (dn_delay[o][w][0] <= 0) begin
            void'(dn_delay[o][w].pop_front());
            credit_in[o][w] = 1; dn_occ[o][w]--;
          end
        end
  end

  always @(posedge clk) if (!rst) begin
    for (int p = 0; p < NP; p++)
      for (int v = 0; v < V; v++) if (credit_out[p][v]) up_cred[p][v]++;
    for (int r = 0; r < NP * V; r++)
      if (dut.active_q[r] && !dut.empty[r] && !dut.sa_req[r]) credit_stalls++;
    for (int o = 0; o < NP; o++) begin
      int n;
      n = 0;
      for (int r = 0; r < NP * V; r++) if (dut.va_req[r] && dut.route[r][o]) n++;
      if (n > 1) va_conflicts++;
    end
    for (int o = 0; o < NP; o++) if (out_valid[o]) begin
      int w;
      logic [1:0] t;
      w = out_vc[o];
      t = out_flit[o][W-1:W-2];
      if (t == 2'b11 && t_out_head == 0) t_out_head = $time;
      if (last_vc[o] >= 0 && last_vc[o] != w && rxbuf[o][last_vc[o]].size() > 0) interleaves++;
      last_vc[o] = w;
      dn_occ[o][w]++;
      chk(dn_occ[o][w] <= D, $sformatf("output %0d VC %0d overflowed", o, w));
      dn_delay[o][w].push_back(slow_dn ? $urandom_range(3, 6) : 1);
      if (t == 2'b11) chk(rxbuf[o][w].size() == 0, "head inside a packet on one VC");
      rxbuf[o][w].push_back(out_flit[o]);
      if (t == 2'b01) begin
        int id;
        id = out_flit[o][7:0];
        chk(id < next_id && !pkt_done[id], $sformatf("unknown or repeated packet %0d", id));
        if (id < next_id && !pkt_done[id]) begin
          chk(pkt_dst[id] == o, $sformatf("packet %0d at output %0d, exp %0d", id, o, pkt_dst[id]));
          chk(rxbuf[o][w] == pkt_flits[id], $sformatf("packet %0d flits differ", id));
          pkt_done[id] = 1;
          delivered++;
        end
        rxbuf[o][w] = {};
      end
    end
  end

  initial begin
    for (int p = 0; p < NP; p++) begin
      last_vc[p] = -1;
      for (int v = 0; v < V; v++) begin up_cred[p][v] = D; dn_occ[p][v] = 0; end
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // latency: a single head into an idle router
    make_pkt(0, 0, 1, 1);
    wait (delivered == 1);
    // sent at the negedge before edge t; written at t; crosses in cycle t+2
    chk(t_out_head - t_in_head == 25, $sformatf("head latency %0d ns, expect 25", t_out_head - t_in_head));
    // contention: two VCs of two inputs to the same output, long packets
    make_pkt(0, 1, 2, 6); make_pkt(1, 2, 2, 6); make_pkt(3, 0, 2, 6);
    wait (delivered == 4);
    // random traffic with slow credit return
    slow_dn = 1;
    for (int n = 0; n < 150; n++) begin
      int sp, d;
      sp = $urandom_range(0, NP - 1);
      d  = (sp + $urandom_range(1, NP - 1)) % NP;
      make_pkt(sp, $urandom_range(0, V - 1), d, $urandom_range(0, 4));
      if (n % 10 == 9) repeat (10) @(negedge clk);
    end
    wait (delivered == sent);
    repeat (10) @(negedge clk);
    chk(interleaves > 0, "no VC interleaving on an output");
    chk(credit_stalls > 0, "no credit stall");
    chk(va_conflicts > 0, "no VC allocation conflict");
    $display("delivered %0d, interleaves %0d, credit stalls %0d, VA conflicts %0d",
             delivered, interleaves, credit_stalls, va_conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #300000;
    failures++;
    $display("watchdog expired, delivered %0d of %0d", delivered, sent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
