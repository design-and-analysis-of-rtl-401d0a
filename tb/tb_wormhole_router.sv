// tb_wormhole_router: packets are head {11, port address, id[3:0]}, bodies
// {10, id + k} and a tail {01, id}. Phase 1 (directed, as in the described
// waveform): inputs 0 and 1 both send a long packet to output 2 and then a
// packet to another output; the loser's second packet, although its output
// is idle, must wait behind the first (head-of-line blocking, counted).
// Phase 2: 150 random packets from all inputs to random other ports with
// random downstream ready. Every packet must arrive whole, unmixed with other
// packets, at the output its head names; every packet is delivered.
module tb_wormhole_router;
  localparam int W = 10, NP = 5;
  logic clk = 0, rst = 1;
  logic [NP-1:0][W-1:0] in_flit = '0, out_flit;
  logic [NP-1:0] in_valid = '0, rdy, out_valid, out_rdy = '1;
  int checks = 0, failures = 0;

  wormhole_router #(.W(W), .DEPTH(16)) dut (.*);

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
  longint       t_head [256], t_tail [256];
  logic [W-1:0] txq [NP][$];
  logic [W-1:0] rxbuf [NP][$];
  int           next_id = 0, delivered = 0, sent = 0;
  int           stall_cycles = 0, hol_seen = 0;
  bit           rand_rdy = 0;

  task automatic make_pkt(input int src, input int dst, input int nbody);
    int id;
    id = next_id++;
    pkt_flits[id] = {};
    pkt_flits[id].push_back({2'b11, paddr(dst), 4'(id)});
    for (int k = 0; k < nbody; k++) pkt_flits[id].push_back({2'b10, 8'(id + k + 1)});
    pkt_flits[id].push_back({2'b01, 8'(id)});
    pkt_dst[id] = dst; pkt_done[id] = 0;
    foreach (pkt_flits[id][k]) txq[src].push_back(pkt_flits[id][k]);
    sent++;
  endtask

  // drivers
  always @(negedge clk) begin
    for (int i = 0; i < NP; i++) begin
      if (in_valid[i] && rdy_q[i]) void'(txq[i].pop_front());
    end
    for (int i = 0; i < NP; i++) begin
      in_valid[i] = 0;
      if (!rst && txq[i].size() > 0 && rdy[i] && (!rand_rdy || $urandom_range(0, 3) != 0)) begin
        in_valid[i] = 1; in_flit[i] = txq[i][0];
      end else in_flit[i] = '0;
      if (rand_rdy) out_rdy[i] = $urandom_range(0, 3) != 0;
    end
  end
  logic [NP-1:0] rdy_q;
  always @(posedge clk) rdy_q <= rdy;

  // monitors
  always @(posedge clk) if (!rst) begin
    for (int i = 0; i < NP; i++)
      if (dut.req[i] != '0 && !dut.gnt[0][i] && !dut.gnt[1][i] && !dut.gnt[2][i]
          && !dut.gnt[3][i] && !dut.gnt[4][i]) stall_cycles++;
    for (int o = 0; o < NP; o++) if (out_valid[o] && out_rdy[o]) begin
      logic [1:0] t;
      t = out_flit[o][W-1:W-2];
      if (t == 2'b11) begin
        chk(rxbuf[o].size() == 0, $sformatf("output %0d: head inside another packet", o));
        rxbuf[o] = {};
      end
      rxbuf[o].push_back(out_flit[o]);
      if (t == 2'b11) t_head[out_flit[o][3:0]] = $time;
      if (t == 2'b01) begin
        int id;
        id = out_flit[o][7:0];
        t_tail[id] = $time;
        chk(id < next_id && !pkt_done[id], $sformatf("unknown or repeated packet %0d", id));
        if (id < next_id && !pkt_done[id]) begin
          chk(pkt_dst[id] == o, $sformatf("packet %0d at output %0d, exp %0d", id, o, pkt_dst[id]));
          chk(rxbuf[o] == pkt_flits[id], $sformatf("packet %0d flits differ", id));
          pkt_done[id] = 1;
          delivered++;
        end
        rxbuf[o] = {};
      end
    end
  end

  initial begin
    int a0, a1, b0, b1, loser_first, loser_second;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // phase 1: contention on output 2, second packets to outputs 3 and 4
    a0 = next_id; make_pkt(0, 2, 8);
    a1 = next_id; make_pkt(1, 2, 8);
    b0 = next_id; make_pkt(0, 3, 2);
    b1 = next_id; make_pkt(1, 4, 2);
    wait (delivered == 4);
    loser_first  = (t_head[a0] < t_head[a1]) ? a1 : a0;
    loser_second = (loser_first == a1) ? b1 : b0;
    // the loser's second packet waited for its first although its output was idle
    if (t_head[loser_second] > t_tail[loser_first]) hol_seen++;
    chk(hol_seen == 1, "head-of-line blocking not observed");
    chk(stall_cycles > 0, "no contention stall observed");
    // phase 2: random traffic
    rand_rdy = 1;
    for (int n = 0; n < 150; n++) begin
      int s, d;
      s = $urandom_range(0, NP - 1);
      d = (s + $urandom_range(1, NP - 1)) % NP;
      make_pkt(s, d, $urandom_range(0, 4));
      if (n % 10 == 9) wait (txq[0].size() + txq[1].size() + txq[2].size() + txq[3].size() + txq[4].size() < 20);
    end
    wait (delivered == sent);
    repeat (5) @(posedge clk);
    chk(delivered == 154, $sformatf("delivered %0d of %0d", delivered, sent));
    $display("stall cycles %0d, HoL events %0d", stall_cycles, hol_seen);
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
