// tb_ppg: checks the partial product generator: m[g] must equal
// (x + floor(x/2)) >> (14 - 2g) for every g, on corner and random samples.
module tb_ppg
  import rrc_pkg::*;
;
  int checks = 0, failures = 0;

  sample_t xin;
  pp_t     m [NUM_GRP];

  ppg dut (.xin(xin), .m(m));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    int unsigned m8;
    #1;
    m8 = int'(xin) + int'(xin) / 2;
    for (int g = 0; g < 8; g++) begin
      checks++;
      if (int'(m[g]) != int'(m8 >> (14 - 2 * g))) begin
        failures++;
        $display("FAIL x=%0d g=%0d got %0d exp %0d", xin, g, m[g], m8 >> (14 - 2 * g));
      end
    end
  endtask

  initial begin
    xin = 16'hFFFF; check();
    xin = 16'h0000; check();
    xin = 16'h0001; check();
    xin = 16'hAAAA; check();
    for (int i = 0; i < 5000; i++) begin
      xin = 16'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
