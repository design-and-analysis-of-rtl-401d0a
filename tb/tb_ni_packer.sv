// tb_ni_packer: a behavioural first-word-fall-through byte FIFO feeds the
// packing module. Packets are {SA, DA, PS, reserved} followed by data bytes;
// write packets (cmd = 1) must come out as head, PS-1 bodies and a tail,
// read packets (cmd = 0) as head and tail. Checks every flit's type and
// payload, four clocks per flit while bytes keep coming, and that the
// machine waits and resumes when the FIFO runs dry in mid-flit.
module tb_ni_packer;
  logic clk = 0, rst = 1;
  logic fifo_empty, fifo_rd, cmd = 1, valid;
  logic [7:0] fifo_data;
  logic [33:0] flit;
  int checks = 0, failures = 0;

  logic [7:0]  bytes[$];
  logic [33:0] expq[$];
  bit          starve = 0;
  int          last_valid = -1, cyc = 0, gaps4 = 0, waits = 0;

  assign fifo_empty = (bytes.size() == 0) || starve;
  assign fifo_data  = (bytes.size() == 0) ? 8'h00 : bytes[0];

  ni_packer dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (fifo_rd && !fifo_empty) void'(bytes.pop_front());
  end

  always @(posedge clk) if (!rst) begin
    #1;
    if (valid) begin
      logic [33:0] e;
      e = expq.pop_front();
      chk(flit == e, $sformatf("flit %h exp %h", flit, e));
      if (last_valid >= 0 && cyc - last_valid == 4) gaps4++;
      last_valid = cyc;
    end
  end

  // queue one packet: returns when its bytes are queued
  task automatic send(input logic c, input logic [7:0] ps, input bit with_starve);
    logic [31:0] w;
    int nflits;
    w = {8'h11, 8'h22, ps, 8'h00};
    for (int k = 3; k >= 0; k--) bytes.push_back(w[8*k +: 8]);
    expq.push_back({2'b11, w});
    nflits = c ? ((ps > 1) ? int'(ps) : 1) : 1;
    for (int f = 0; f < nflits; f++) begin
      w = $urandom;
      for (int k = 3; k >= 0; k--) bytes.push_back(w[8*k +: 8]);
      expq.push_back({(f == nflits - 1) ? 2'b01 : 2'b10, w});
    end
    cmd = c;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    // write packet, 5 flits after the head, bytes all available
    send(1, 8'd5, 0);
    wait (expq.size() == 0);
    chk(gaps4 >= 5, $sformatf("4-clock flit spacing seen %0d times", gaps4));
    repeat (3) @(negedge clk);
    // read packet: head + tail only
    send(0, 8'd7, 0);
    wait (expq.size() == 0);
    repeat (3) @(negedge clk);
    // write packet with the FIFO running dry in mid-flit
    cmd = 1;
    send(1, 8'd3, 0);
    repeat (6) @(negedge clk);
    starve = 1;
    repeat (7) @(negedge clk);
    chk(!valid, "no flit while starved");
    waits++;
    starve = 0;
    wait (expq.size() == 0);
    // random packets
    for (int n = 0; n < 20; n++) begin
      repeat ($urandom_range(1, 4)) @(negedge clk);
      send(1'($urandom), 8'($urandom_range(0, 6)), 0);
      wait (expq.size() == 0);
    end
    repeat (8) @(negedge clk);
    chk(expq.size() == 0 && bytes.size() == 0, "all flits produced");
    chk(waits > 0, "wait state exercised");
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
