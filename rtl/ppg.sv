// ppg: partial product generator shared by all coefficient multipliers.
//
// Multiplying by a 2-bit coefficient group needs xin, xin/2 and, for the
// pattern 11, xin + xin/2. This block forms that one sum, M8 = xin + xin/2
// (17 bits), with the 16-bit carry select adder, and its right shifts by
// 2, 4, ..., 14 (M7 .. M1, 15 down to 3 significant bits) so each of the
// eight coefficient groups finds its 3*xin/2 term pre-scaled. Because it
// depends only on the data sample, one PPG serves every coefficient.
// The sum, the shifts and the widths follow the original filter; sharing
// one PPG among all multipliers and truncating shifts are this design's
// reading. Combinational.
//
// Ports: xin (16-bit unsigned sample);
//        m[g], g = 0..7: M8 >> (14 - 2g), so m[7] = M8 and m[0] = M8 >> 14.
module ppg
  import rrc_pkg::*;
(
  input  sample_t xin,
  output pp_t     m [NUM_GRP]
);

  logic [DATA_W-1:0] m8_sum;
  logic              m8_cout;
  pp_t               m8;

  csla16 u_add (
    .a   (xin),
    .b   (xin >> 1),
    .cin (1'b0),
    .sum (m8_sum),
    .cout(m8_cout)
  );

  assign m8 = {m8_cout, m8_sum};

  for (genvar g = 0; g < NUM_GRP; g++) begin : g_shift
    assign m[g] = m8 >> (14 - 2 * g);
  end

endmodule
