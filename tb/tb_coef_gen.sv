// tb_coef_gen: checks the coefficient generator end to end: for all six
// filter settings and random samples, product j must equal the reference
// shift-and-add product of the sample and stored coefficient j, and
// positions beyond the filter's half length must give 0.
module tb_coef_gen
  import rrc_pkg::*;
  import rrc_ref_pkg::*;
;
  int checks = 0, failures = 0;

  sample_t    xin;
  logic       flt_sel;
  logic [3:0] intp_sel;
  prod_t      prod [NUM_UNIQ];

  coef_gen dut (.xin(xin), .flt_sel(flt_sel), .intp_sel(intp_sel), .prod(prod));

  function automatic coef_t table_word(input int l, input logic f, input int j);
    case (l)
      4: return (j < N4) ? (f ? H4_B35[j] : H4_B22[j]) : '0;
      6: return (j < N6) ? (f ? H6_B35[j] : H6_B22[j]) : '0;
      default: return f ? H8_B35[j] : H8_B22[j];
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ls [3] = '{4, 6, 8};
    for (int f = 0; f < 2; f++) begin
      foreach (ls[li]) begin
        for (int r = 0; r < 200; r++) begin
          flt_sel  = 1'(f);
          intp_sel = 4'(ls[li]);
          xin      = (r == 0) ? 16'hFFFF : 16'($urandom);
          #1;
          for (int j = 0; j < NUM_UNIQ; j++) begin
            automatic int want = ref_prod(int'(xin), table_word(ls[li], 1'(f), j));
            checks++;
            if (int'(prod[j]) != want) begin
              failures++;
              $display("FAIL L=%0d f=%0d x=%0d j=%0d got %0d want %0d",
                       ls[li], f, xin, j, prod[j], want);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
