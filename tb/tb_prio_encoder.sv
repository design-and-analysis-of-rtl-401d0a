// tb_prio_encoder: exhaustive check of the enable priority encoder against
// the characteristic table (i[0] highest priority, all zero when disabled).
module tb_prio_encoder;
  logic       en;
  logic [3:0] i, o;
  int checks = 0, failures = 0;

  prio_encoder #(.N(4)) dut (.en(en), .i(i), .o(o));

  function automatic logic [3:0] ref_enc(input logic e, input logic [3:0] r);
    if (!e)   return 4'b0000;
    if (r[0]) return 4'b0001;
    if (r[1]) return 4'b0010;
    if (r[2]) return 4'b0100;
    if (r[3]) return 4'b1000;
    return 4'b0000;
  endfunction

  initial begin
    for (int e = 0; e < 2; e++)
      for (int v = 0; v < 16; v++) begin
        en = e[0];
        i  = v[3:0];
        #1;
        checks++;
        if (o !== ref_enc(en, i)) begin
          failures++;
          $display("FAIL en=%0b i=%b o=%b exp=%b", en, i, o, ref_enc(en, i));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
