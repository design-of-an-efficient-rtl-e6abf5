// mux_add_unit: multiplexer unit and final addition for one coefficient,
// i.e. one constant-by-variable multiplier in shift-and-add form.
//
// The 16-bit coefficient magnitude is cut into eight 2-bit groups. Group g
// (bits 2g+1:2g, weight 2^(2g-15)) steers a 4:1 multiplexer that picks the
// group's partial product with shift s = 14 - 2g:
//   00 -> 0,  01 -> xin >> (s+1),  10 -> xin >> s,  11 -> PPG M8 >> s,
// so only the pattern 11 costs an adder, and that adder is shared in the PPG.
// A balanced tree of seven 16-bit carry select adders sums the eight
// partial products. A two's complement circuit and a multiplexer driven by
// the coefficient's sign bit give the signed product. Every partial product
// is truncated on its own, so the result can be a few LSBs below
// floor(xin * |coef|). Combinational.
//
// The 16-bit adders require a coefficient magnitude below 1.0 (bit 15
// clear); an assertion checks it. The 17-bit signed output is this design's
// choice so that a 16-bit magnitude of either sign fits.
//
// Ports: xin (16-bit unsigned sample), m (PPG outputs), coef (sign +
//        magnitude); prod (17-bit signed xin * coef).
module mux_add_unit
  import rrc_pkg::*;
(
  input  sample_t xin,
  input  pp_t     m [NUM_GRP],
  input  coef_t   coef,
  output prod_t   prod
);

  logic [MAG_W-1:0] sel [NUM_GRP];
  logic [MAG_W-1:0] lvl1 [4];
  logic [MAG_W-1:0] lvl2 [2];
  logic [MAG_W-1:0] mag;
  logic [6:0]       tree_cout;
  prod_t            pos, neg;

  for (genvar g = 0; g < NUM_GRP; g++) begin : g_mux
    localparam int S = 14 - 2 * g;
    always_comb begin
      unique case (coef.mag[2*g+1 -: 2])
        2'b00: sel[g] = '0;
        2'b01: sel[g] = xin >> (S + 1);
        2'b10: sel[g] = xin >> S;
        2'b11: sel[g] = m[g][MAG_W-1:0];
      endcase
    end
  end

  for (genvar i = 0; i < 4; i++) begin : g_lvl1
    csla16 u_add (
      .a(sel[2*i+1]), .b(sel[2*i]), .cin(1'b0), .sum(lvl1[i]), .cout(tree_cout[i])
    );
  end

  for (genvar i = 0; i < 2; i++) begin : g_lvl2
    csla16 u_add (
      .a(lvl1[2*i+1]), .b(lvl1[2*i]), .cin(1'b0), .sum(lvl2[i]), .cout(tree_cout[4+i])
    );
  end

  csla16 u_final (
    .a(lvl2[1]), .b(lvl2[0]), .cin(1'b0), .sum(mag), .cout(tree_cout[6])
  );

  // two's complement circuit and sign multiplexer
  assign pos  = prod_t'({1'b0, mag});
  assign neg  = prod_t'(~{1'b0, mag}) + prod_t'(1);
  assign prod = coef.sign ? neg : pos;

  // Coefficient magnitude must stay below 1.0, so no adder of the tree
  // can carry out.
  always_comb begin
    assert (!coef.mag[MAG_W-1] && (tree_cout == '0))
      else $error("mux_add_unit: coefficient magnitude %h not below 1.0", coef.mag);
  end

endmodule
