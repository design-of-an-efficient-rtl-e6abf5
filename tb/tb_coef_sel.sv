// tb_coef_sel: checks the symmetric tap mapping of the coefficient
// selector: tap k of an N-tap filter must carry product min(k, N-1-k) and
// taps at or beyond N must carry 0, for N = 25, 37, 49.
module tb_coef_sel
  import rrc_pkg::*;
  import rrc_ref_pkg::*;
;
  int checks = 0, failures = 0;

  prod_t      prod [NUM_UNIQ];
  logic [3:0] intp_sel;
  prod_t      tap  [MAX_TAPS];

  coef_sel dut (.prod(prod), .intp_sel(intp_sel), .tap(tap));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] sels [4] = '{4'd4, 4'd6, 4'd8, 4'd2};
    for (int r = 0; r < 10; r++) begin
      foreach (prod[j]) prod[j] = prod_t'($urandom);
      foreach (sels[s]) begin
        automatic int n = 6 * ref_factor(sels[s]) + 1;
        intp_sel = sels[s];
        #1;
        for (int k = 0; k < MAX_TAPS; k++) begin
          automatic prod_t want = (k < n) ? prod[ref_uniq(k, n)] : '0;
          checks++;
          if (tap[k] != want) begin
            failures++;
            $display("FAIL sel=%0d k=%0d got %0d want %0d", intp_sel, k, tap[k], want);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
