// tb_rr_bus_arbiter: random requests against a reference of the rotating
// priority (after reset req[3] first, then req[2], req[1], req[0], ...),
// grant registered one clock after the request. Also checks that a port
// requesting continuously is granted at least once every 4 clocks while all
// ports request (no starvation) and that reset holds the grant at zero.
module tb_rr_bus_arbiter;
  logic clk = 0, rst = 1;
  logic [3:0] req, grant;
  int checks = 0, failures = 0;

  rr_bus_arbiter #(.N(4)) dut (.clk(clk), .rst(rst), .req(req), .grant(grant));

  always #5 clk = ~clk;

  int top;     // index with highest priority this cycle
  logic [3:0] exp_q;

  function automatic logic [3:0] ref_grant(input int t, input logic [3:0] r);
    for (int j = 0; j < 4; j++) begin
      int idx;
      idx = (t - j + 4) % 4;
      if (r[idx]) return 4'(1 << idx);
    end
    return 4'b0;
  endfunction

  initial begin
    req = 4'b1111;
    repeat (3) @(posedge clk);
    checks++;
    if (grant !== 4'b0) begin failures++; $display("FAIL grant during reset"); end
    @(negedge clk) rst = 0;
    top = 3;
    // all requesting: grants must walk 3,2,1,0,3,...
    for (int n = 0; n < 8; n++) begin
      @(posedge clk); #1;
      checks++;
      if (grant !== 4'(1 << top)) begin
        failures++;
        $display("FAIL all-req cycle %0d grant=%b exp=%b", n, grant, 4'(1 << top));
      end
      top = (top + 3) % 4;
    end
    // random requests
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      req   = 4'($urandom);
      exp_q = ref_grant(top, req);
      @(posedge clk); #1;
      checks++;
      if (grant !== exp_q) begin
        failures++;
        $display("FAIL req=%b grant=%b exp=%b", req, grant, exp_q);
      end
      top = (top + 3) % 4;
    end
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
