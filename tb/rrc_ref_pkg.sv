// rrc_ref_pkg: reference arithmetic for the testbenches of the RRC filter.
//
// ref_prod computes the multiplier result from the coefficient definition,
// one term per set magnitude bit pair, with plain integer arithmetic:
//   group g, shift s = 14-2g: 01 -> x>>(s+1), 10 -> x>>s,
//                             11 -> (x + x>>1) >> s,
// summed and negated when the sign bit is set. ref_uniq gives the unique
// coefficient used by tap k of an N-tap symmetric filter. rrc_model is a
// cycle-level model of the whole filter computed by direct convolution.
package rrc_ref_pkg;
  import rrc_pkg::*;

  function automatic int ref_prod(input int unsigned x, input logic [16:0] c);
    int unsigned acc = 0;
    int unsigned x15 = x + (x >> 1);
    for (int g = 0; g < 8; g++) begin
      int s = 14 - 2 * g;
      case (c[2*g+1 -: 2])
        2'b01: acc += x >> (s + 1);
        2'b10: acc += x >> s;
        2'b11: acc += x15 >> s;
        default: ;
      endcase
    end
    return c[16] ? -int'(acc) : int'(acc);
  endfunction

  function automatic int ref_uniq(input int k, input int n);
    return (k < n - 1 - k) ? k : n - 1 - k;
  endfunction

  function automatic int ref_factor(input logic [3:0] sel);
    return (sel == 4'd6) ? 6 : (sel == 4'd8) ? 8 : 4;
  endfunction

  function automatic coef_t ref_coef(input int l, input logic f, input int j);
    case (l)
      4: return f ? H4_B35[j] : H4_B22[j];
      6: return f ? H6_B35[j] : H6_B22[j];
      default: return f ? H8_B35[j] : H8_B22[j];
    endcase
  endfunction

  // Filter model, one call of apply() per clock. Three registers capture
  // the input every 4, 6 and 8 clocks; the multipliers see, during the
  // clock after edge c, the register of the current factor (sample and
  // hold). rrcout after edge m is sum_k tap_(m-1-k)[k], where tap_c is the
  // product vector of the clock after edge c.
  class rrc_model;
    int          tap_hist [$];  // MAX_TAPS products per clock, oldest first
    int          nclk;          // index of the coming rising edge
    logic [15:0] held [3];      // registers for factors 4, 6, 8

    function new();
      reset();
    endfunction

    function void reset();
      tap_hist.delete();
      nclk = 0;
      foreach (held[i]) held[i] = '0;
    endfunction

    // rrcout expected after the most recent edge
    function int expected();
      int n = tap_hist.size() / MAX_TAPS;
      int s = 0;
      for (int k = 0; k < MAX_TAPS; k++)
        if (n - 1 - k >= 0) s += tap_hist[(n - 1 - k) * MAX_TAPS + k];
      return s;
    endfunction

    // Inputs applied for the coming edge; returns the expected in_strobe.
    function logic apply(input logic [3:0] sel, input logic f, input logic [15:0] x);
      int          l = ref_factor(sel);
      int          n = 6 * l + 1;
      logic [15:0] u = held[l / 2 - 2];
      logic        strobe = (nclk % l == 0);
      for (int k = 0; k < MAX_TAPS; k++)
        tap_hist.push_back((k < n) ? ref_prod(int'(u), ref_coef(l, f, ref_uniq(k, n))) : 0);
      for (int i = 0; i < 3; i++)
        if (nclk % (4 + 2 * i) == 0) held[i] = x;
      nclk++;
      return strobe;
    endfunction

    // true if any product of the last MAX_TAPS clocks is nonzero
    function logic busy();
      int n = tap_hist.size() / MAX_TAPS;
      for (int c = (n > MAX_TAPS ? n - MAX_TAPS : 0); c < n; c++)
        for (int k = 0; k < MAX_TAPS; k++)
          if (tap_hist[c * MAX_TAPS + k] != 0) return 1'b1;
      return 1'b0;
    endfunction
  endclass

endpackage
