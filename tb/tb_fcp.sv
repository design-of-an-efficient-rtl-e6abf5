// tb_fcp: checks the first coding pass against root-raised-cosine taps
// computed here in floating point (span 6 symbols, unit energy): every
// stored word must carry the right sign and a magnitude within one LSB of
// |h| * 32768, for both roll-off settings and all three factors.
module tb_fcp
  import rrc_pkg::*;
;
  int checks = 0, failures = 0;

  localparam real PI = 3.14159265358979323846;

  logic  flt_sel;
  coef_t c4 [N4];
  coef_t c6 [N6];
  coef_t c8 [N8];

  fcp dut (.flt_sel(flt_sel), .c4(c4), .c6(c6), .c8(c8));

  function automatic real rrc_tap(input int k, input int l, input real b);
    real t = real'(k - 3 * l) / real'(l);
    if (t == 0.0) return 1.0 - b + 4.0 * b / PI;
    if ((t - 1.0 / (4.0 * b)) ** 2 < 1e-18 || (t + 1.0 / (4.0 * b)) ** 2 < 1e-18)
      return b / $sqrt(2.0) * ((1.0 + 2.0 / PI) * $sin(PI / (4.0 * b)) +
                               (1.0 - 2.0 / PI) * $cos(PI / (4.0 * b)));
    return ($sin(PI * t * (1.0 - b)) + 4.0 * b * t * $cos(PI * t * (1.0 + b))) /
           (PI * t * (1.0 - (4.0 * b * t) ** 2));
  endfunction

  task automatic check_set(input int l, input real b, input coef_t got []);
    real h [];
    real e = 0.0;
    h = new[6 * l + 1];
    foreach (h[k]) begin
      h[k] = rrc_tap(k, l, b);
      e += h[k] * h[k];
    end
    e = $sqrt(e);
    for (int k = 0; k < 3 * l + 1; k++) begin
      real want = h[k] / e * 32768.0;
      real gotv = got[k].sign ? -real'(got[k].mag) : real'(got[k].mag);
      checks++;
      if (gotv - want > 1.0 || want - gotv > 1.0) begin
        failures++;
        $display("FAIL L=%0d b=%f k=%0d got %f want %f", l, b, k, gotv, want);
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    coef_t d [];
    for (int f = 0; f < 2; f++) begin
      real b;
      b = f ? 0.35 : 0.22;
      flt_sel = 1'(f);
      #1;
      d = new[N4]; foreach (d[i]) d[i] = c4[i]; check_set(4, b, d);
      d = new[N6]; foreach (d[i]) d[i] = c6[i]; check_set(6, b, d);
      d = new[N8]; foreach (d[i]) d[i] = c8[i]; check_set(8, b, d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
