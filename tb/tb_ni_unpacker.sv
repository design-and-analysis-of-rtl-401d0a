// tb_ni_unpacker: random packets (head, 0..3 bodies, tail) are offered to the
// unpacking module; the PE side uses a random width (sel_i) per packet and
// strobes after a random delay. Checks: header fields, every payload byte in
// order (top byte first), the assembled words on dat_o (right aligned, first
// byte on top), pkt_done on the tail, and a data flit taking four clocks
// when the PE keeps up.
module tb_ni_unpacker;
  logic clk = 0, rst = 1;
  logic [33:0] flit = '0;
  logic valid = 0, ready, byte_valid, stb_i = 0, ack_o, pkt_done;
  logic [7:0] data_out, src_addr, dst_addr, pkt_size;
  logic [2:0] sel_i = 3'd3;
  logic [63:0] dat_o;
  int checks = 0, failures = 0;

  logic [7:0] bq[$];        // bytes expected on data_out
  logic [7:0] wq[$];        // bytes not yet returned in a word
  int dones = 0, exp_dones = 0, words = 0;
  bit fast_pe = 1;

  ni_unpacker dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic int nb(input logic [2:0] s);
    return (s == 0) ? 1 : (s == 1) ? 2 : (s == 2) ? 4 : 8;
  endfunction

  // byte monitor
  always @(posedge clk) if (!rst) begin
    if (byte_valid) begin
      logic [7:0] e;
      e = bq.pop_front();
      chk(data_out == e, $sformatf("byte %h exp %h", data_out, e));
      wq.push_back(e);
    end
    if (ack_o) begin
      logic [63:0] ew;
      ew = '0;
      for (int k = 0; k < nb(sel_i); k++) ew = {ew[55:0], wq.pop_front()};
      chk(dat_o == ew, $sformatf("word %h exp %h", dat_o, ew));
      words++;
    end
    if (pkt_done) dones++;
  end

  // PE: strobe when a word is ready, after a random delay
  initial begin
    forever begin
      @(negedge clk);
      if (fast_pe) stb_i = 1'b1;
      else stb_i = (wq.size() >= nb(sel_i)) ? ($urandom_range(0, 2) != 0) : 1'b0;
    end
  end

  task automatic offer(input logic [33:0] f);
    @(negedge clk);
    flit = f; valid = 1;
    do @(posedge clk); while (!ready);
    #1;
    @(negedge clk) valid = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    // timing: one packet with sel 0 (byte-wide PE) and a fast PE
    sel_i = 3'd0;
    begin
      int t0, t1;
      offer({2'b11, 8'hA1, 8'hB2, 8'h02, 8'h00});
      #1 chk(src_addr == 8'hA1 && dst_addr == 8'hB2 && pkt_size == 8'h02, "header fields");
      @(negedge clk); flit = {2'b10, 32'h01020304}; valid = 1;
      for (int k = 3; k >= 0; k--) bq.push_back(8'(4 - k));
      @(posedge clk); #1 t0 = $time;
      @(negedge clk); flit = {2'b01, 32'h05060708};
      for (int k = 3; k >= 0; k--) bq.push_back(8'(8 - k));
      do @(posedge clk); while (!ready);
      #1 t1 = $time;
      @(negedge clk) valid = 0;
      exp_dones++;
      chk(t1 - t0 == 40, $sformatf("data flit took %0d ns, expect 4 clocks", t1 - t0));
    end
    fast_pe = 0;
    wait (bq.size() == 0 && wq.size() == 0);
    repeat (3) @(negedge clk);
    // random packets
    for (int n = 0; n < 30; n++) begin
      int nbody;
      logic [7:0] sa, da;
      wait (bq.size() == 0 && wq.size() == 0);
      @(negedge clk);
      sel_i = 3'($urandom_range(0, 3));
      sa = 8'($urandom); da = 8'($urandom);
      nbody = $urandom_range(0, 3);
      offer({2'b11, sa, da, 8'(nbody + 1), 8'h00});
      #1 chk(src_addr == sa && dst_addr == da, "header fields");
      for (int b = 0; b <= nbody; b++) begin
        logic [31:0] w;
        w = $urandom;
        for (int k = 3; k >= 0; k--) bq.push_back(w[8*k +: 8]);
        offer({(b == nbody) ? 2'b01 : 2'b10, w});
      end
      exp_dones++;
      // pad so the last word completes for wide PEs
      while ((wq.size() + bq.size()) % nb(sel_i) != 0) begin
        logic [31:0] w;
        w = $urandom;
        for (int k = 3; k >= 0; k--) bq.push_back(w[8*k +: 8]);
        offer({2'b01, w});
        exp_dones++;
      end
    end
    wait (bq.size() == 0 && wq.size() == 0);
    repeat (4) @(negedge clk);
    chk(dones == exp_dones, $sformatf("pkt_done %0d exp %0d", dones, exp_dones));
    chk(words > 30, $sformatf("%0d words delivered", words));
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
