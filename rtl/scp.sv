// scp: second coding pass.
//
// For each of the 25 coefficient positions CF1..CF25 (index 0..24 here)
// selects the coefficient of the filter named by intp_sel: positions 0..12
// choose among the factor-4, -6 and -8 sets, positions 13..18 among the
// factor-6 and -8 sets, positions 19..24 carry the factor-8 set. A position
// beyond the chosen filter's half length outputs a zero coefficient, so its
// multiplier produces 0. The 25 positions follow the original filter; the
// three-way choice (its text speaks of 2:1 multiplexers) and the zero
// fill are this design's. Combinational.
//
// Ports: c4, c6, c8 from the first coding pass; intp_sel (4, 6 or 8; any
//        other value means 4); cf: the 25 selected coded coefficients.
module scp
  import rrc_pkg::*;
(
  input  coef_t      c4 [N4],
  input  coef_t      c6 [N6],
  input  coef_t      c8 [N8],
  input  logic [3:0] intp_sel,
  output coef_t      cf [NUM_UNIQ]
);

  logic [3:0] fac;

  assign fac = 4'(factor_of(intp_sel));

  for (genvar j = 0; j < NUM_UNIQ; j++) begin : g_cf
    if (j < N4) begin : g_468
      always_comb begin
        unique case (fac)
          4'd4:    cf[j] = c4[j];
          4'd6:    cf[j] = c6[j];
          default: cf[j] = c8[j];
        endcase
      end
    end else if (j < N6) begin : g_68
      always_comb begin
        unique case (fac)
          4'd6:    cf[j] = c6[j];
          4'd8:    cf[j] = c8[j];
          default: cf[j] = '0;
        endcase
      end
    end else begin : g_8
      assign cf[j] = (fac == 4'd8) ? c8[j] : '0;
    end
  end

endmodule
