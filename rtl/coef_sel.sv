// coef_sel: coefficient selector.
//
// Spreads the 25 unique products over the taps of the selected filter.
// An RRC response is symmetric, h(k) = h(N-1-k), so tap k of an N-tap
// filter (N = 25, 37, 49 for factor 4, 6, 8) takes product min(k, N-1-k).
// Taps N..48 receive 0. The original filter only names this block; the
// symmetric mapping is this design's, as the halved coefficient store
// requires. Combinational.
//
// Ports: prod (25 signed products, index 0 = outermost tap), intp_sel;
//        tap[k], k = 0..48: product applied to tap k.
module coef_sel
  import rrc_pkg::*;
(
  input  prod_t      prod [NUM_UNIQ],
  input  logic [3:0] intp_sel,
  output prod_t      tap  [MAX_TAPS]
);

  logic [3:0] fac;

  assign fac = 4'(factor_of(intp_sel));

  // tap k of each filter length; a constant index per tap and length
  for (genvar k = 0; k < MAX_TAPS; k++) begin : g_tap
    localparam int U4 = (k < 25) ? ((k < 24 - k) ? k : 24 - k) : 0;
    localparam int U6 = (k < 37) ? ((k < 36 - k) ? k : 36 - k) : 0;
    localparam int U8 = (k < 48 - k) ? k : 48 - k;
    always_comb begin
      unique case (fac)
        4'd4:    tap[k] = (k < 25) ? prod[U4] : '0;
        4'd6:    tap[k] = (k < 37) ? prod[U6] : '0;
        default: tap[k] = prod[U8];
      endcase
    end
  end

endmodule
