// tb_vc_switch_allocator: self-checking test of the two-stage switch
// allocator (5 ports x 4 VCs). For 400 cycles each of the 20 input VCs
// requests with probability one half, each to a random output port.
// Checked every cycle: grants go only to requesting VCs; at most one grant
// per input port and per output port; xsel matches the grants; and at least
// one grant is given whenever there is any request (the allocator never
// idles). Fairness: with all four VCs of port 0 asking for output 1, each VC
// is served once in every four cycles.
module tb_vc_switch_allocator;
  localparam int NP = 5, V = 4, NIV = NP * V;
  logic clk = 0, rst = 1;
  logic [NIV-1:0] req = '0, gnt;
  logic [NIV-1:0][NP-1:0] req_port = '0;
  logic [NP-1:0][NP-1:0] xsel;
  int checks = 0, failures = 0;

  vc_switch_allocator #(.NP(NP), .V(V)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    logic [V-1:0] served;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      for (int r = 0; r < NIV; r++) begin
        req[r] = $urandom_range(0, 1) == 0;
        req_port[r] = 5'(1 << $urandom_range(0, NP - 1));
      end
      #1;
      begin
        int per_in [NP];
        logic [NP-1:0][NP-1:0] exp_x;
        exp_x = '0;
        for (int p = 0; p < NP; p++) per_in[p] = 0;
        for (int r = 0; r < NIV; r++) if (gnt[r]) begin
          chk(req[r], $sformatf("grant without request r=%0d", r));
          per_in[r / V]++;
          for (int o = 0; o < NP; o++) if (req_port[r][o]) exp_x[o][r / V] = 1'b1;
        end
        for (int p = 0; p < NP; p++) chk(per_in[p] <= 1, $sformatf("input %0d granted twice", p));
        for (int o = 0; o < NP; o++) chk($onehot0(xsel[o]), $sformatf("output %0d select not one-hot", o));
        chk(xsel == exp_x, "xsel does not match the grants");
        if (req != '0) chk(gnt != '0, "requests but no grant");
      end
    end
    // fairness among the VCs of one port
    served = '0;
    for (int n = 0; n < V; n++) begin
      @(negedge clk);
      req = '0;
      for (int v = 0; v < V; v++) begin req[v] = 1; req_port[v] = 5'b00010; end
      #1;
      chk($onehot(gnt[V-1:0]), "one VC of port 0 must win");
      served |= gnt[V-1:0];
    end
    chk(served == '1, $sformatf("VCs served in four cycles: %b", served));
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
