// tb_pkt_arbiter: random requests and random tail releases against an
// independent model of the packet-level round-robin arbiter: while free, the
// grant goes combinationally to the first requester in the order top,
// top-1, ... (top = 3 after reset); the winner is held until release, and
// each release moves top down by one.
module tb_pkt_arbiter;
  logic clk = 0, rst = 1;
  logic [3:0] req, grant;
  logic       release_i, busy;
  int checks = 0, failures = 0;
  int holds = 0, releases = 0;

  pkt_arbiter #(.N(4)) dut (.clk(clk), .rst(rst), .req(req), .release_i(release_i),
                            .grant(grant), .busy(busy));

  always #5 clk = ~clk;

  int         top;
  logic       m_busy;
  logic [3:0] m_lock, exp_g;

  function automatic logic [3:0] ref_grant(input int t, input logic [3:0] r);
    for (int j = 0; j < 4; j++) begin
      int idx;
      idx = (t - j + 4) % 4;
      if (r[idx]) return 4'(1 << idx);
    end
    return 4'b0;
  endfunction

  initial begin
    req = '0; release_i = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    top = 3; m_busy = 0; m_lock = '0;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      req       = 4'($urandom);
      release_i = m_busy && ($urandom_range(0, 3) == 0);
      #1;
      exp_g = m_busy ? m_lock : ref_grant(top, req);
      checks++;
      if (grant !== exp_g || busy !== m_busy) begin
        failures++;
        $display("FAIL n=%0d req=%b grant=%b exp=%b busy=%b", n, req, grant, exp_g, busy);
      end
      if (m_busy) begin
        if (release_i) begin m_busy = 0; m_lock = '0; top = (top + 3) % 4; releases++; end
        else holds++;
      end else if (exp_g != '0) begin
        m_busy = 1; m_lock = exp_g;
      end
      @(posedge clk);
    end
    checks++;
    if (holds == 0 || releases == 0) begin failures++; $display("FAIL no hold/release"); end
    $display("holds=%0d releases=%0d", holds, releases);
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
