// tb_mux_add_unit: checks one coefficient multiplier. The PPG inputs are
// formed here from the sample with integer arithmetic, the expected product
// comes from rrc_ref_pkg::ref_prod, and the product is also held against
// the exact x * coef / 2^15 (truncation may lose at most 8 LSBs).
// Covers every 2-bit pattern in every group and both signs.
module tb_mux_add_unit
  import rrc_pkg::*;
  import rrc_ref_pkg::*;
;
  int checks = 0, failures = 0;
  int pat_seen [4];
  int neg_seen = 0;

  sample_t xin;
  pp_t     m [NUM_GRP];
  coef_t   coef;
  prod_t   prod;

  mux_add_unit dut (.xin(xin), .m(m), .coef(coef), .prod(prod));

  always_comb begin
    for (int g = 0; g < NUM_GRP; g++)
      m[g] = pp_t'((int'(xin) + int'(xin) / 2) >> (14 - 2 * g));
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    int  exp_p;
    real ideal;
    #1;
    exp_p = ref_prod(int'(xin), coef);
    ideal = real'(xin) * real'(coef.mag) / 32768.0;
    checks++;
    if (int'(prod) != exp_p) begin
      failures++;
      $display("FAIL x=%0d c=%h got %0d exp %0d", xin, coef, prod, exp_p);
    end
    checks++;
    if ((real'(coef.sign ? -int'(prod) : int'(prod)) > ideal) ||
        (real'(coef.sign ? -int'(prod) : int'(prod)) < ideal - 8.0)) begin
      failures++;
      $display("FAIL range x=%0d c=%h got %0d ideal %f", xin, coef, prod, ideal);
    end
    for (int g = 0; g < 8; g++) pat_seen[coef.mag[2*g+1 -: 2]]++;
    if (coef.sign && prod != 0) neg_seen++;
  endtask

  initial begin
    coef = '0;
    xin  = '0;
    // each group alone with each nonzero pattern (top group limited to 01)
    for (int g = 0; g < 8; g++) begin
      for (int p = 1; p < 4; p++) begin
        if (g == 7 && p > 1) continue;
        xin  = 16'hFFFF;
        coef = '{sign: 1'(p & 1), mag: 16'(p) << (2 * g)};
        check();
      end
    end
    xin = 16'd12345; coef = '{sign: 1'b0, mag: 16'h7FFF}; check();
    xin = 16'hFFFF;  coef = '{sign: 1'b1, mag: 16'h7FFF}; check();
    for (int i = 0; i < 20000; i++) begin
      xin  = 16'($urandom);
      coef = '{sign: 1'($urandom), mag: 16'($urandom) & 16'h7FFF};
      check();
    end
    for (int p = 0; p < 4; p++) begin
      checks++;
      if (pat_seen[p] == 0) begin
        failures++;
        $display("FAIL pattern %0d never used", p);
      end
    end
    checks++;
    if (neg_seen == 0) begin
      failures++;
      $display("FAIL no negative product");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
