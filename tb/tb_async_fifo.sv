// tb_async_fifo: write clock 10 ns, read clock 14 ns (unrelated). Checks the
// empty flag after clear, that exactly DEPTH words fit before fifo_full
// (no reads), that every word comes out once and in order under random
// simultaneous reads and writes, and that writes while full are ignored.
module tb_async_fifo;
  localparam int W = 10, D = 16;
  logic wclk = 0, rclk = 0, clear_in = 1;
  logic wr_en = 0, rd_en = 0;
  logic [W-1:0] data_in = '0, data_out;
  logic fifo_full, fifo_empty;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];
  int written = 0, readn = 0;
  bit  wdone = 0;

  async_fifo #(.DATA_W(W), .DEPTH(D)) dut (.*);

  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;

  task automatic chk(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  // writer
  initial begin
    int filled;
    #30 clear_in = 0;
    @(posedge rclk); #1;
    chk(fifo_empty, "empty after clear");
    // phase 1: fill without reading
    filled = 0;
    while (!fifo_full && filled < D + 4) begin
      @(negedge wclk);
      if (!fifo_full) begin
        wr_en = 1; data_in = W'($urandom); q.push_back(data_in); filled++;
      end
      @(posedge wclk); #1 wr_en = 0;
    end
    chk(filled == D, $sformatf("%0d words fit, expect %0d", filled, D));
    // a write while full must be ignored
    @(negedge wclk); wr_en = 1; data_in = '1; @(posedge wclk); #1 wr_en = 0;
    written = filled;
    // phase 2: random traffic while the reader drains
    while (written < 300) begin
      @(negedge wclk);
      wr_en = 0;
      if (!fifo_full && $urandom_range(0, 2) != 0) begin
        wr_en = 1; data_in = W'($urandom); q.push_back(data_in); written++;
      end
    end
    @(negedge wclk) wr_en = 0;
    wdone = 1;
  end

  // reader: starts after the fill phase
  initial begin
    wait (written >= D);
    forever begin
      @(negedge rclk);
      rd_en = 0;
      if (!fifo_empty && $urandom_range(0, 2) != 0) begin
        logic [W-1:0] e;
        e = q.pop_front();
        chk(data_out == e, $sformatf("read %0d got %h exp %h", readn, data_out, e));
        rd_en = 1;
        readn++;
      end
      if (wdone && q.size() == 0) break;
    end
    @(negedge rclk) rd_en = 0;
    repeat (4) @(posedge rclk); #1;
    chk(fifo_empty, "empty at end");
    chk(readn == 300, $sformatf("read %0d words", readn));
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
