// tb_csla16: checks the 16-bit carry select adder against integer addition
// on corner cases (carry rippling through every group boundary) and 20000
// random operand pairs, both carry inputs.
module tb_csla16;
  int checks = 0, failures = 0;

  logic [15:0] a, b, s;
  logic        ci, co;

  csla16 dut (.a(a), .b(b), .cin(ci), .sum(s), .cout(co));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    #1;
    checks++;
    if ({co, s} != 17'(a) + 17'(b) + 17'(ci)) begin
      failures++;
      $display("FAIL %h+%h+%0d -> %h", a, b, ci, {co, s});
    end
  endtask

  initial begin
    // a carry generated just below each group boundary and propagated above
    for (int bnd = 0; bnd < 16; bnd++) begin
      a = 16'hFFFF; b = 16'(1) << bnd; ci = 1'b0; check();
      a = 16'hFFFF >> bnd; b = 16'h0001; ci = 1'b0; check();
      a = 16'hFFFF >> bnd; b = 16'h0000; ci = 1'b1; check();
    end
    a = 16'hFFFF; b = 16'hFFFF; ci = 1'b1; check();
    a = 16'h0000; b = 16'h0000; ci = 1'b0; check();
    for (int i = 0; i < 20000; i++) begin
      a = 16'($urandom); b = 16'($urandom); ci = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
