// coef_gen: coefficient generator.
//
// Computes H(k) * xin for all 25 unique coefficients of the selected filter
// in one clock. The first coding pass picks the roll-off set (flt_sel), the
// second coding pass picks the filter (intp_sel), one partial product
// generator prepares xin, xin/2 and 3*xin/2 terms for all multipliers, and
// 25 multiplexer/final-addition units form the signed products. Positions
// beyond the selected filter's half length give 0. The order of the stages
// follows the original filter; one multiplier per unique coefficient is
// this design's reading of it. Combinational.
//
// Ports: xin (16-bit unsigned up-sampled data), flt_sel, intp_sel;
//        prod[j]: 17-bit signed xin * coefficient j (index 0 = outer tap).
module coef_gen
  import rrc_pkg::*;
(
  input  sample_t    xin,
  input  logic       flt_sel,
  input  logic [3:0] intp_sel,
  output prod_t      prod [NUM_UNIQ]
);

  coef_t c4 [N4];
  coef_t c6 [N6];
  coef_t c8 [N8];
  coef_t cf [NUM_UNIQ];
  pp_t   m  [NUM_GRP];

  fcp u_fcp (
    .flt_sel(flt_sel),
    .c4     (c4),
    .c6     (c6),
    .c8     (c8)
  );

  scp u_scp (
    .c4      (c4),
    .c6      (c6),
    .c8      (c8),
    .intp_sel(intp_sel),
    .cf      (cf)
  );

  ppg u_ppg (
    .xin(xin),
    .m  (m)
  );

  for (genvar j = 0; j < NUM_UNIQ; j++) begin : g_mul
    mux_add_unit u_mul (
      .xin (xin),
      .m   (m),
      .coef(cf[j]),
      .prod(prod[j])
    );
  end

endmodule
