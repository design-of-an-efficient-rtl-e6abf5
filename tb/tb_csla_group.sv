// tb_csla_group: exhaustive check of one carry-select group at widths 2
// (the group drawn as group 2) and 5, for both incoming carries.
module tb_csla_group;
  int checks = 0, failures = 0;

  logic [1:0] a2, b2, s2;
  logic       ci2, co2;
  logic [4:0] a5, b5, s5;
  logic       ci5, co5;

  csla_group #(.W(2)) dut2 (.a(a2), .b(b2), .cin(ci2), .sum(s2), .cout(co2));
  csla_group #(.W(5)) dut5 (.a(a5), .b(b5), .cin(ci5), .sum(s5), .cout(co5));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      {ci2, a2, b2} = 5'(i);
      #1;
      checks++;
      if ({co2, s2} != 3'(a2) + 3'(b2) + 3'(ci2)) begin
        failures++;
        $display("FAIL W=2 %0d+%0d+%0d -> %0d", a2, b2, ci2, {co2, s2});
      end
    end
    for (int i = 0; i < 2048; i++) begin
      {ci5, a5, b5} = 11'(i);
      #1;
      checks++;
      if ({co5, s5} != 6'(a5) + 6'(b5) + 6'(ci5)) begin
        failures++;
        $display("FAIL W=5 %0d+%0d+%0d -> %0d", a5, b5, ci5, {co5, s5});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
