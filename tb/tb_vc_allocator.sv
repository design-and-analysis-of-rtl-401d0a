// tb_vc_allocator: random requests (each input VC asks for one output port)
// and random free output VCs. Checks each cycle, from the rules alone: a
// grant only to a requester, with one-hot gnt_vc naming a free VC of the
// requested port; no output VC given twice; and whenever a port with a
// requester has a free VC, at least one requester of that port is granted.
// Also checks that a lone requester is granted every free VC in turn
// (round-robin stage 1).
module tb_vc_allocator;
  localparam int NP = 5, V = 4, NIV = NP * V;
  logic clk = 0, rst = 1;
  logic [NIV-1:0] req = '0, gnt;
  logic [NIV-1:0][NP-1:0] req_port = '0;
  logic [NP-1:0][V-1:0] vc_free = '0;
  logic [NIV-1:0][V-1:0] gnt_vc;
  int checks = 0, failures = 0;

  vc_allocator #(.NP(NP), .V(V)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  int conflicts = 0;

  initial begin
    logic [V-1:0] seen;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      for (int r = 0; r < NIV; r++) begin
        req[r] = $urandom_range(0, 2) == 0;
        req_port[r] = 5'(1 << $urandom_range(0, NP - 1));
      end
      for (int o = 0; o < NP; o++) vc_free[o] = 4'($urandom);
      #1;
      begin
        logic [NP-1:0][V-1:0] taken;
        int nreq [NP];
        int ngnt [NP];
        taken = '0;
        for (int o = 0; o < NP; o++) begin nreq[o] = 0; ngnt[o] = 0; end
        for (int r = 0; r < NIV; r++) begin
          int o;
          o = $clog2(req_port[r]);
          if (req[r]) nreq[o]++;
          if (gnt[r]) begin
            ngnt[o]++;
            chk(req[r] && $onehot(gnt_vc[r]) && (gnt_vc[r] & vc_free[o]) != 0,
                $sformatf("bad grant r=%0d vc=%b free=%b", r, gnt_vc[r], vc_free[o]));
            chk((taken[o] & gnt_vc[r]) == 0, $sformatf("output VC given twice, port %0d", o));
            taken[o] |= gnt_vc[r];
          end else chk(gnt_vc[r] == 0, "gnt_vc without gnt");
        end
        for (int o = 0; o < NP; o++) begin
          if (nreq[o] > 1) conflicts++;
          if (nreq[o] > 0 && vc_free[o] != 0)
            chk(ngnt[o] > 0, $sformatf("port %0d has free VCs and requesters but no grant", o));
        end
      end
    end
    // lone requester, all VCs free: four grants cover all four VCs
    seen = '0;
    for (int n = 0; n < V; n++) begin
      @(negedge clk);
      req = '0; req[7] = 1; req_port[7] = 5'b00100; vc_free = '1;
      #1;
      chk(gnt[7], "lone requester not granted");
      seen |= gnt_vc[7];
    end
    chk(seen == '1, $sformatf("stage-1 rotation covered %b", seen));
    chk(conflicts > 0, "no conflicts generated");
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
