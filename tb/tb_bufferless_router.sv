// tb_bufferless_router: a cycle model of the dropping router (per output a
// round-robin packet arbiter over the four other inputs, req[N-1] first after
// reset; a head that is not connected in its own cycle loses its packet) is
// run beside the router. Phase 1 repeats the described case: first heads to
// distinct outputs (nothing dropped), then inputs 0 and 1 both aim at output
// 2 while inputs 2 and 3 aim at output 0 (one packet of each pair dropped).
// Phase 2: random packets on all inputs. Outputs and drop flags are compared
// every clock; drops and deliveries are counted.
module tb_bufferless_router;
  localparam int W = 10, NP = 5;
  logic clk = 0, rst = 1;
  logic [NP-1:0][W-1:0] in_flit = '0, out_flit;
  logic [NP-1:0] drop;
  int checks = 0, failures = 0;

  bufferless_router #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [3:0] paddr(input int p);
    case (p)
      0: return 4'b0011; 1: return 4'b0001; 2: return 4'b0010; 3: return 4'b0100;
      default: return 4'b1000;
    endcase
  endfunction
  function automatic int port_of(input logic [3:0] a);
    for (int p = 0; p < NP; p++) if (paddr(p) == a) return p;
    return -1;
  endfunction

  // model state
  bit m_busy [NP];
  int m_lock [NP];
  int m_top [NP];
  bit m_conn [NP];
  int drops = 0, heads_ok = 0, tails_ok = 0;

  // per-input packet streams
  logic [W-1:0] txq [NP][$];
  task automatic make_pkt(input int src, input int dst, input int nbody);
    txq[src].push_back({2'b11, paddr(dst), 4'(src)});
    for (int k = 0; k < nbody; k++) txq[src].push_back({2'b10, 8'($urandom)});
    txq[src].push_back({2'b01, 8'($urandom)});
  endtask

  always @(negedge clk) if (!rst) begin
    for (int i = 0; i < NP; i++)
      in_flit[i] = (txq[i].size() > 0) ? txq[i].pop_front() : '0;
    #1;
    begin
      logic [NP-1:0][W-1:0] e_out;
      logic [NP-1:0] e_drop;
      int gin [NP];
      bit granted [NP];
      for (int i = 0; i < NP; i++) granted[i] = 0;
      for (int o = 0; o < NP; o++) begin
        gin[o] = -1;
        if (m_busy[o]) gin[o] = m_lock[o];
        else
          for (int j = 0; j < NP - 1 && gin[o] < 0; j++) begin
            int k, ip;
            k  = (m_top[o] - j + NP - 1) % (NP - 1);
            ip = (k < o) ? k : k + 1;
            if (!m_conn[ip] && in_flit[ip][W-1:W-2] == 2'b11
                && port_of(in_flit[ip][W-3:W-6]) == o) gin[o] = ip;
          end
        e_out[o] = (gin[o] >= 0) ? in_flit[gin[o]] : '0;
        if (gin[o] >= 0) granted[gin[o]] = 1;
      end
      for (int i = 0; i < NP; i++) begin
        logic [1:0] t;
        t = in_flit[i][W-1:W-2];
        e_drop[i] = (t == 2'b11) ? (!m_conn[i] && !granted[i])
                  : (t != 2'b00) ? !m_conn[i] : 1'b0;
      end
      for (int o = 0; o < NP; o++) begin
        checks++;
        if (out_flit[o] !== e_out[o]) begin
          failures++; $display("FAIL t=%0t out %0d = %b exp %b", $time, o, out_flit[o], e_out[o]);
        end
      end
      checks++;
      if (drop !== e_drop) begin
        failures++; $display("FAIL t=%0t drop %b exp %b", $time, drop, e_drop);
      end
      for (int i = 0; i < NP; i++) drops += e_drop[i];
      // model update (the clock edge follows)
      for (int o = 0; o < NP; o++) begin
        if (m_busy[o]) begin
          if (m_conn[m_lock[o]] && in_flit[m_lock[o]][W-1:W-2] == 2'b01) begin
            m_busy[o] = 0; m_top[o] = (m_top[o] + NP - 2) % (NP - 1); tails_ok++;
          end
        end else if (gin[o] >= 0) begin
          m_busy[o] = 1; m_lock[o] = gin[o]; heads_ok++;
        end
      end
      for (int i = 0; i < NP; i++) begin
        if (in_flit[i][W-1:W-2] == 2'b11 && !m_conn[i]) m_conn[i] = granted[i];
        else if (in_flit[i][W-1:W-2] == 2'b01) m_conn[i] = 0;
      end
    end
  end

  initial begin
    for (int o = 0; o < NP; o++) begin m_busy[o] = 0; m_top[o] = NP - 2; m_conn[o] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // phase 1: distinct outputs, then two collisions
    make_pkt(0, 1, 2); make_pkt(1, 2, 2); make_pkt(2, 3, 2); make_pkt(3, 4, 2); make_pkt(4, 0, 2);
    make_pkt(0, 2, 2); make_pkt(1, 2, 2); make_pkt(2, 0, 2); make_pkt(3, 0, 2); make_pkt(4, 3, 2);
    wait (txq[0].size() == 0);
    repeat (2) @(posedge clk);
    checks++;
    if (drops != 8) begin failures++; $display("FAIL phase 1 dropped %0d flits, expect 8", drops); end
    // phase 2: random packets with random gaps
    for (int n = 0; n < 300; n++) begin
      int s;
      s = $urandom_range(0, NP - 1);
      if (txq[s].size() < 12) begin
        if ($urandom_range(0, 1) == 1) txq[s].push_back('0);
        make_pkt(s, (s + $urandom_range(1, NP - 1)) % NP, $urandom_range(0, 3));
      end
      if (n % 5 == 4) @(posedge clk);
    end
    wait (txq[0].size() + txq[1].size() + txq[2].size() + txq[3].size() + txq[4].size() == 0);
    repeat (3) @(posedge clk);
    checks++;
    if (drops == 0 || tails_ok == 0) begin failures++; $display("FAIL no drops or deliveries"); end
    $display("dropped flits %0d, packets connected %0d, delivered %0d", drops, heads_ok, tails_ok);
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
