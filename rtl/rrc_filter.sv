// rrc_filter: reconfigurable root-raised-cosine interpolation filter, the
// pulse-shaping stage of a multi-standard digital up converter.
//
// Up-samples a 16-bit baseband stream by 4, 6 or 8 and filters it with a
// 25-, 37- or 49-tap RRC filter of roll-off 0.22 or 0.35, selected at run
// time. Data path, one clock per output sample:
//   data_generator  samples rrcin every L clocks and holds it for L clocks;
//   coef_gen        multiplies the up-sampled word by the 25 unique
//                   coefficients of the chosen filter (shift-and-add with
//                   carry select adders, no general multiplier);
//   coef_sel        maps the products onto the N taps by symmetry;
//   accum_unit      transposed-form adder/delay chain, giving rrcout.
//
// Timing: in_strobe marks the edge that captures rrcin (every L clocks).
// From that edge the captured word drives the multipliers for L clocks, and
// the next edge puts its outermost-tap product on rrcout: a sample first
// shows at rrcout one clock after it is captured, and reaches the centre
// tap 3L clocks later. rrcout changes every clock. Changing intp_sel or
// flt_sel takes effect at once; outputs then mix old and new settings until
// the chain has flushed (49 clocks). Reset is synchronous and active high.
//
// The block split, the coded coefficient format, the adder style and the
// sample-and-hold up-sampling follow the original filter, whose published
// output values this design reproduces; the transposed structure, the clock
// enables, the in_strobe output and the exact coefficient words are this
// design's choices.
//
// Ports: clk, rst, rrcin (unsigned), intp_sel (4/6/8), flt_sel
//        (0: 0.22, 1: 0.35); in_strobe, rrcout (ACC_W-bit signed).
module rrc_filter
  import rrc_pkg::*;
#(
  parameter int ACC_W = 22
) (
  input  logic                    clk,
  input  logic                    rst,
  input  sample_t                 rrcin,
  input  logic [3:0]              intp_sel,
  input  logic                    flt_sel,
  output logic                    in_strobe,
  output logic signed [ACC_W-1:0] rrcout
);

  sample_t up_data;
  prod_t   prod [NUM_UNIQ];
  prod_t   tap  [MAX_TAPS];

  data_generator u_dg (
    .clk      (clk),
    .rst      (rst),
    .rrcin    (rrcin),
    .intp_sel (intp_sel),
    .in_strobe(in_strobe),
    .up_data  (up_data)
  );

  coef_gen u_cg (
    .xin     (up_data),
    .flt_sel (flt_sel),
    .intp_sel(intp_sel),
    .prod    (prod)
  );

  coef_sel u_cs (
    .prod    (prod),
    .intp_sel(intp_sel),
    .tap     (tap)
  );

  accum_unit #(
    .NTAPS(MAX_TAPS),
    .ACC_W(ACC_W)
  ) u_acc (
    .clk (clk),
    .rst (rst),
    .tap (tap),
    .y   (rrcout)
  );

endmodule
