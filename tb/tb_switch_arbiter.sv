// tb_switch_arbiter: random per-input requests (one output each, never its
// own port) with random releases. Checked against a model of five packet
// arbiters, each over the four other inputs in port order: grant per output
// one-hot, never on the diagonal, held until release.
module tb_switch_arbiter;
  logic clk = 0, rst = 1;
  logic [4:0][4:0] req, gnt;
  logic [4:0]      release_o, busy;
  int checks = 0, failures = 0;

  switch_arbiter #(.NP(5)) dut (.clk(clk), .rst(rst), .req(req), .release_o(release_o),
                                .gnt(gnt), .busy(busy));

  always #5 clk = ~clk;

  int         top [5];
  logic       m_busy [5];
  logic [4:0] m_lock [5];
  logic [4:0] exp_g [5];
  int         contended = 0;

  // grant among inputs other than o; sub-index k maps to port k<o ? k : k+1
  function automatic logic [4:0] ref_grant(input int o, input int t, input logic [4:0][4:0] r);
    for (int j = 0; j < 4; j++) begin
      int k, ip;
      k  = (t - j + 4) % 4;
      ip = (k < o) ? k : k + 1;
      if (r[ip][o]) return 5'(1 << ip);
    end
    return 5'b0;
  endfunction

  initial begin
    req = '0; release_o = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int o = 0; o < 5; o++) begin top[o] = 3; m_busy[o] = 0; m_lock[o] = '0; end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      for (int i = 0; i < 5; i++) begin
        int d;
        d = (i + $urandom_range(1, 4)) % 5;
        req[i] = ($urandom_range(0, 1) == 1) ? 5'(1 << d) : 5'b0;
      end
      for (int o = 0; o < 5; o++) release_o[o] = m_busy[o] && ($urandom_range(0, 2) == 0);
      #1;
      for (int o = 0; o < 5; o++) begin
        int nreq;
        nreq = 0;
        for (int i = 0; i < 5; i++) nreq += req[i][o];
        if (!m_busy[o] && nreq > 1) contended++;
        exp_g[o] = m_busy[o] ? m_lock[o] : ref_grant(o, top[o], req);
        checks++;
        if (gnt[o] !== exp_g[o] || gnt[o][o] !== 1'b0) begin
          failures++;
          $display("FAIL n=%0d out %0d gnt=%b exp=%b", n, o, gnt[o], exp_g[o]);
        end
        if (m_busy[o]) begin
          if (release_o[o]) begin m_busy[o] = 0; m_lock[o] = '0; top[o] = (top[o] + 3) % 4; end
        end else if (exp_g[o] != '0) begin
          m_busy[o] = 1; m_lock[o] = exp_g[o];
        end
      end
      @(posedge clk);
    end
    checks++;
    if (contended == 0) begin failures++; $display("FAIL no contention seen"); end
    $display("contended=%0d", contended);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
