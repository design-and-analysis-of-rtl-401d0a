// tb_wb_fifo: a Wishbone master model writes 120 words of random width
// (sel 0..7) on clk_i (10 ns); a reader on rclk (8 ns) pops the bytes.
// Checks: the byte stream equals each word's valid bytes, most significant
// first; with room in the FIFO ack_o comes nbytes+1 clocks after the strobe
// is first sampled (latch, one byte per clock, registered ack); while the
// reader is paused the FIFO fills and ack_o is delayed (wait states, counted).
module tb_wb_fifo;
  logic clk_i = 0, rclk = 0, rst_i = 1;
  logic stb_i = 0, ack_o, rd_en = 0, empty;
  logic [2:0] sel_i = '0;
  logic [63:0] dat_i = '0;
  logic [7:0] dout;
  int checks = 0, failures = 0;
  logic [7:0] q[$];
  bit  pause_rd = 0, wdone = 0;
  int  stalled = 0, nread = 0, nexp = 0;

  wb_fifo #(.DEPTH(16)) dut (.*);

  always #5 clk_i = ~clk_i;
  always #4 rclk  = ~rclk;

  task automatic chk(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic int nb(input logic [2:0] s);
    return (s == 0) ? 1 : (s == 1) ? 2 : (s == 2) ? 4 : 8;
  endfunction

  task automatic wb_write(input logic [2:0] s, input logic [63:0] d, output int lat);
    @(negedge clk_i);
    stb_i = 1; sel_i = s; dat_i = d;
    for (int k = nb(s) - 1; k >= 0; k--) q.push_back(d[8*k +: 8]);
    nexp += nb(s);
    lat = 0;
    do begin @(posedge clk_i); lat++; #1; end while (!ack_o);
    @(negedge clk_i) stb_i = 0;
  endtask

  initial begin
    int lat;
    #25 rst_i = 0;
    for (int n = 0; n < 120; n++) begin
      logic [2:0] s;
      s = 3'($urandom);
      if (n == 40) begin
        pause_rd = 1;
        fork begin #400 pause_rd = 0; end join_none
      end
      wb_write(s, {$urandom, $urandom}, lat);
      if (n < 40)
        chk(lat == nb(s) + 1, $sformatf("word %0d ack after %0d clocks, expect %0d", n, lat, nb(s) + 1));
      if (lat > nb(s) + 1) stalled++;
    end
    wdone = 1;
  end

  // reader on rclk, paused for a while to fill the FIFO
  initial begin
    forever begin
      @(negedge rclk);
      rd_en = 0;
      if (!empty && !pause_rd) begin
        logic [7:0] e;
        e = q.pop_front();
        chk(dout == e, $sformatf("byte %0d got %h exp %h", nread, dout, e));
        rd_en = 1;
        nread++;
      end
      if (wdone && nread == nexp) break;
    end
    chk(stalled > 0, "no wait state while the FIFO was full");
    $display("words stalled by a full FIFO: %0d, bytes %0d", stalled, nread);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
