// tb_crossbar: random flits and random one-hot (or empty) selects per
// output; each output must equal the selected input, or 0 when none is.
module tb_crossbar;
  logic [4:0][9:0] in_flit, out_flit;
  logic [4:0][4:0] sel;
  int checks = 0, failures = 0;

  crossbar #(.NP(5), .W(10)) dut (.in_flit(in_flit), .sel(sel), .out_flit(out_flit));

  initial begin
    for (int n = 0; n < 500; n++) begin
      int pick [5];
      for (int i = 0; i < 5; i++) in_flit[i] = 10'($urandom);
      for (int o = 0; o < 5; o++) begin
        pick[o] = $urandom_range(0, 5);     // 5 means no input
        sel[o]  = (pick[o] == 5) ? 5'b0 : 5'(1 << pick[o]);
      end
      #1;
      for (int o = 0; o < 5; o++) begin
        checks++;
        if (out_flit[o] !== ((pick[o] == 5) ? 10'b0 : in_flit[pick[o]])) begin
          failures++;
          $display("FAIL out %0d = %b pick %0d", o, out_flit[o], pick[o]);
        end
      end
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
