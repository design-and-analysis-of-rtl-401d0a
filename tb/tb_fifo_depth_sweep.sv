// tb_fifo_depth_sweep: the dual-clock FIFO built at the depths over which
// its cost is usually weighed (4, 8, 16, 32 and 64 words of 10 bits), each
// with unrelated write (10 ns) and read (14 ns) clocks. For every depth:
// empty after clear; exactly DEPTH words are accepted before fifo_full rises;
// a write while full is ignored; the reader then drains the FIFO and must
// see every word once, in order, with fifo_empty high at the end; a second
// round of random reads and writes keeps the order. The depth only changes
// the pointer width, so the same checks apply at every size.
module tb_fifo_depth_sweep;
  localparam int W = 10;
  localparam int NDEP = 5;
  localparam int DEPTHS [NDEP] = '{4, 8, 16, 32, 64};

  logic wclk = 0, rclk = 0, clear_in = 1;
  int   checks = 0, failures = 0;
  bit   done [NDEP];

  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;

  task automatic chk(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  for (genvar k = 0; k < NDEP; k++) begin : g_dep
    localparam int D = DEPTHS[k];
    logic         wr_en = 0, rd_en = 0, fifo_full, fifo_empty;
    logic [W-1:0] data_in = '0, data_out;
    logic [W-1:0] q[$];
    bit           fill_done = 0, wr_done = 0;
    int           n_rd = 0;

    async_fifo #(.DATA_W(W), .DEPTH(D)) u_fifo (
      .wclk(wclk), .rclk(rclk), .clear_in(clear_in), .wr_en(wr_en), .data_in(data_in),
      .fifo_full(fifo_full), .rd_en(rd_en), .data_out(data_out), .fifo_empty(fifo_empty)
    );

    // writer: fill, overfill once, then random writes
    initial begin
      int filled;
      done[k] = 0;
      wait (!clear_in);
      @(posedge rclk); #1;
      chk(fifo_empty, $sformatf("depth %0d: empty after clear", D));
      filled = 0;
      while (!fifo_full && filled < D + 4) begin
        @(negedge wclk);
        wr_en = 1; data_in = W'($urandom); q.push_back(data_in); filled++;
        @(posedge wclk); #1 wr_en = 0;
      end
      chk(filled == D, $sformatf("depth %0d: %0d words fit", D, filled));
      @(negedge wclk); wr_en = 1; data_in = '1; @(posedge wclk); #1 wr_en = 0;
      fill_done = 1;
      for (int n = 0; n < 3 * D; n++) begin
        @(negedge wclk);
        wr_en = 0;
        if (!fifo_full && $urandom_range(0, 1) == 1) begin
          wr_en = 1; data_in = W'($urandom); q.push_back(data_in);
        end
      end
      @(negedge wclk) wr_en = 0;
      wr_done = 1;
    end

    // reader: starts once the FIFO has been filled, pops at random
    initial begin
      wait (fill_done);
      forever begin
        @(negedge rclk);
        rd_en = 0;
        if (wr_done && q.size() == 0) break;
        if (!fifo_empty && $urandom_range(0, 3) != 0) begin
          logic [W-1:0] e;
          e = q.pop_front();
          chk(data_out == e, $sformatf("depth %0d: word %0d is %h, expect %h", D, n_rd, data_out, e));
          rd_en = 1;
          n_rd++;
        end
      end
      @(negedge rclk) rd_en = 0;
      repeat (4) @(posedge rclk);
      #1 chk(fifo_empty, $sformatf("depth %0d: empty after draining", D));
      done[k] = 1;
    end
  end

  initial begin
    #30 clear_in = 0;
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
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
