// tb_route_compute: every flit type and every 4-bit address against the
// router port-address table (L 0011, E 0001, W 0010, N 0100, S 1000).
module tb_route_compute;
  logic [9:0] flit;
  logic [4:0] out_port;
  int checks = 0, failures = 0;

  route_compute #(.W(10)) dut (.flit(flit), .out_port(out_port));

  function automatic logic [4:0] expect_port(input logic [1:0] t, input logic [3:0] a);
    if (t != 2'b11) return 5'b0;
    case (a)
      4'b0011: return 5'b00001;
      4'b0001: return 5'b00010;
      4'b0010: return 5'b00100;
      4'b0100: return 5'b01000;
      4'b1000: return 5'b10000;
      default: return 5'b0;
    endcase
  endfunction

  initial begin
    for (int t = 0; t < 4; t++)
      for (int a = 0; a < 16; a++) begin
        flit = {t[1:0], a[3:0], 4'($urandom)};
        #1;
        checks++;
        if (out_port !== expect_port(t[1:0], a[3:0])) begin
          failures++;
          $display("FAIL flit=%b port=%b", flit, out_port);
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
