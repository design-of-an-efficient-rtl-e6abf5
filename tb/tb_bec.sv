// tb_bec: exhaustive check of the binary to excess-1 converter at widths
// 3 and 6 against x + 1 modulo 2^W.
module tb_bec;
  int checks = 0, failures = 0;

  logic [2:0] x3, y3;
  logic [5:0] x6, y6;

  bec #(.W(3)) dut3 (.x(x3), .y(y3));
  bec #(.W(6)) dut6 (.x(x6), .y(y6));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      x3 = 3'(i);
      #1;
      checks++;
      if (y3 != 3'((i + 1) % 8)) begin
        failures++;
        $display("FAIL W=3 %0d -> %0d", x3, y3);
      end
    end
    for (int i = 0; i < 64; i++) begin
      x6 = 6'(i);
      #1;
      checks++;
      if (y6 != 6'((i + 1) % 64)) begin
        failures++;
        $display("FAIL W=6 %0d -> %0d", x6, y6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
