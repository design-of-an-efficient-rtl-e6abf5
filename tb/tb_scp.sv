// tb_scp: drives random coefficient sets into the second coding pass and
// checks every output position for INTP_SEL = 4, 6, 8 and for values that
// must fall back to 4.
module tb_scp
  import rrc_pkg::*;
;
  int checks = 0, failures = 0;

  coef_t      c4 [N4];
  coef_t      c6 [N6];
  coef_t      c8 [N8];
  logic [3:0] intp_sel;
  coef_t      cf [NUM_UNIQ];

  scp dut (.c4(c4), .c6(c6), .c8(c8), .intp_sel(intp_sel), .cf(cf));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] sels [5] = '{4'd4, 4'd6, 4'd8, 4'd0, 4'd15};
    for (int r = 0; r < 20; r++) begin
      foreach (c4[i]) c4[i] = coef_t'($urandom);
      foreach (c6[i]) c6[i] = coef_t'($urandom);
      foreach (c8[i]) c8[i] = coef_t'($urandom);
      foreach (sels[s]) begin
        intp_sel = sels[s];
        #1;
        for (int j = 0; j < NUM_UNIQ; j++) begin
          automatic coef_t want;
          case (intp_sel)
            4'd6:    want = (j < 19) ? c6[j] : '0;
            4'd8:    want = c8[j];
            default: want = (j < 13) ? c4[j] : '0;
          endcase
          checks++;
          if (cf[j] != want) begin
            failures++;
            $display("FAIL sel=%0d j=%0d got %h want %h", intp_sel, j, cf[j], want);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
