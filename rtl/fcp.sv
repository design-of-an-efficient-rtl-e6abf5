// fcp: first coding pass (modified form).
//
// Holds both roll-off sets (0.22 and 0.35) of the three filters and passes
// one set on, chosen by flt_sel through a row of 2:1 multiplexers per
// filter. Because the RRC responses are symmetric only half of each filter
// is stored: 13, 19 and 25 coded coefficients for the 25-, 37- and 49-tap
// filters (57 per roll-off instead of 111). Index 0 is the outermost tap,
// the last index the centre tap. The tables themselves are in rrc_pkg.
// The halved rows and the 2:1 roll-off multiplexers follow the original
// filter; the coefficient words are this design's. Combinational.
//
// Ports: flt_sel (0: roll-off 0.22, 1: roll-off 0.35, this design's
//        choice); c4, c6, c8: coded coefficients for factors 4, 6, 8.
module fcp
  import rrc_pkg::*;
(
  input  logic  flt_sel,
  output coef_t c4 [N4],
  output coef_t c6 [N6],
  output coef_t c8 [N8]
);

  if ($bits(coef_t) != COEF_W) begin : g_width_check
    $error("fcp: coded coefficient must be %0d bits", COEF_W);
  end

  for (genvar i = 0; i < N4; i++) begin : g_row4
    assign c4[i] = flt_sel ? H4_B35[i] : H4_B22[i];
  end

  for (genvar i = 0; i < N6; i++) begin : g_row6
    assign c6[i] = flt_sel ? H6_B35[i] : H6_B22[i];
  end

  for (genvar i = 0; i < N8; i++) begin : g_row8
    assign c8[i] = flt_sel ? H8_B35[i] : H8_B22[i];
  end

endmodule
