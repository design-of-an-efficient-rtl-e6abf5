// rrc_pkg: types, sizes and coefficient tables shared by the reconfigurable
// root-raised-cosine (RRC) interpolation filter.
//
// Sizes that follow the filter definition: 16-bit input samples, interpolation
// factors 4, 6 and 8 with 25, 37 and 49 taps (7 taps per polyphase branch),
// two roll-off factors (0.22 and 0.35), 17-bit coded coefficients
// (sign bit + 16-bit magnitude) and a 22-bit output.
//
// Coded coefficient: bit 16 is the sign (1 = negative), bits 15:0 the
// magnitude in Q1.15 (weight of bit i is 2^(i-15)). The multiplier datapath
// uses 16-bit adders, so every magnitude must be below 1.0 (bit 15 clear).
//
// Coefficient tables (this design's own values; the filter definition only
// fixes lengths and roll-offs): root-raised-cosine impulse response over a
// span of 6 symbols, t = (k - 3L)/L for k = 0 .. 6L,
//   h(t) = [sin(pi t (1-b)) + 4 b t cos(pi t (1+b))] / [pi t (1 - (4 b t)^2)]
//   h(0) = 1 - b + 4 b / pi
//   h(+-1/(4b)) = b/sqrt(2) [(1+2/pi) sin(pi/(4b)) + (1-2/pi) cos(pi/(4b))]
// scaled to unit energy (sum of h^2 = 1) and rounded to 1/32768. Because the
// response is symmetric only the first 3L+1 taps are stored: index 0 is the
// outermost tap, index 3L the centre tap.
package rrc_pkg;

  localparam int DATA_W   = 16;  // input sample width
  localparam int MAG_W    = 16;  // coefficient magnitude width
  localparam int COEF_W   = 17;  // coded coefficient width (sign + magnitude)
  localparam int PROD_W   = 17;  // signed product width
  localparam int PP_W     = 17;  // PPG word width (M8 = xin + xin/2)
  localparam int NUM_GRP  = 8;   // 2-bit groups in a coefficient magnitude
  localparam int NUM_UNIQ = 25;  // unique coefficients of the longest filter
  localparam int MAX_TAPS = 49;  // taps of the longest filter
  localparam int N4       = 13;  // unique coefficients, factor 4 (25 taps)
  localparam int N6       = 19;  // unique coefficients, factor 6 (37 taps)
  localparam int N8       = 25;  // unique coefficients, factor 8 (49 taps)

  typedef struct packed {
    logic              sign;
    logic [MAG_W-1:0]  mag;
  } coef_t;

  typedef logic signed [PROD_W-1:0] prod_t;
  typedef logic        [PP_W-1:0]   pp_t;
  typedef logic        [DATA_W-1:0] sample_t;

  // Interpolation factor named by the 4-bit INTP_SEL word: 6 and 8 select
  // themselves, every other value selects 4.
  function automatic int unsigned factor_of(input logic [3:0] intp_sel);
    case (intp_sel)
      4'd6:    return 6;
      4'd8:    return 8;
      default: return 4;
    endcase
  endfunction

  function automatic int unsigned taps_of(input logic [3:0] intp_sel);
    return 6 * factor_of(intp_sel) + 1;
  endfunction

  localparam coef_t H4_B22 [13] = '{
    17'h10272, 17'h000f4, 17'h004f3, 17'h00670, 17'h0032c, 17'h1042f, 17'h10b7d,
    17'h10cce, 17'h103ad, 17'h00fce, 17'h02811, 17'h03c28, 17'h043f2
  };
  localparam coef_t H6_B22 [19] = '{
    17'h10200, 17'h1004f, 17'h001ee, 17'h0040b, 17'h0053b, 17'h004d6, 17'h00297,
    17'h10133, 17'h105a4, 17'h10962, 17'h10aec, 17'h10902, 17'h10300, 17'h006dd,
    17'h01369, 17'h020b7, 17'h02c7f, 17'h03499, 17'h0377b
  };
  localparam coef_t H8_B22 [25] = '{
    17'h101bb, 17'h100b2, 17'h000ad, 17'h0022b, 17'h00380, 17'h00462, 17'h0048e,
    17'h003da, 17'h0023e, 17'h10021, 17'h102f5, 17'h105ce, 17'h10820, 17'h1095f,
    17'h1090e, 17'h106d7, 17'h10299, 17'h0038a, 17'h00b2e, 17'h013b4, 17'h01c56,
    17'h02438, 17'h02a8b, 17'h02ea3, 17'h0300d
  };
  localparam coef_t H4_B35 [13] = '{
    17'h101a1, 17'h100f2, 17'h001a4, 17'h0042f, 17'h003a8, 17'h1016a, 17'h108a7,
    17'h10c13, 17'h1056c, 17'h00d3e, 17'h026e8, 17'h03d45, 17'h04623
  };
  localparam coef_t H6_B35 [19] = '{
    17'h10155, 17'h10128, 17'h10033, 17'h00157, 17'h002e2, 17'h003a9, 17'h002fc,
    17'h00098, 17'h10320, 17'h10711, 17'h109a1, 17'h10925, 17'h1046d, 17'h004c7,
    17'h01186, 17'h01fc5, 17'h02cd1, 17'h035f9, 17'h03945
  };
  localparam coef_t H8_B35 [25] = '{
    17'h10127, 17'h1011b, 17'h100ab, 17'h00021, 17'h00129, 17'h00232, 17'h002f5,
    17'h00329, 17'h00296, 17'h0012a, 17'h10100, 17'h10397, 17'h1061e, 17'h107fa,
    17'h1088a, 17'h10745, 17'h103d5, 17'h001cf, 17'h0095d, 17'h01239, 17'h01b83,
    17'h02438, 17'h02b54, 17'h02ffa, 17'h03199
  };
endpackage
