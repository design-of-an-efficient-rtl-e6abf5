// data_generator: input sampling and up-sampling by sample-and-hold.
//
// Three free-running dividers count the master clock modulo 4, 6 and 8.
// Each divider's terminal state (count 0) is a sample clock enable, and
// three 16-bit registers capture rrcin at their own rate. intp_sel chooses
// which register drives up_data. The chosen register holds each word for L
// clocks, so up_data is the input up-sampled by L with each word repeated
// (sample-and-hold), at the master clock rate.
//
// Timing: in_strobe is high in the clock whose rising edge captures rrcin
// (every L clocks, the first one right after reset). up_data shows that
// word from the capturing edge until the next capture. The source must
// hold rrcin stable at the capturing edge. Sampling registers per rate and
// sample-and-hold (not zero stuffing) follow the original filter; using
// clock enables on one clock instead of three divided clocks, and the
// in_strobe output, are this design's choices.
//
// Ports: clk, rst (synchronous, active high, clears counters and
//        registers), rrcin, intp_sel (4, 6, 8; other values mean 4);
//        in_strobe, up_data.
module data_generator
  import rrc_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  sample_t    rrcin,
  input  logic [3:0] intp_sel,
  output logic       in_strobe,
  output sample_t    up_data
);

  logic [1:0] cnt4;
  logic [2:0] cnt6, cnt8;
  logic       ld4, ld6, ld8;     // capture enables
  sample_t    reg4, reg6, reg8;  // sampled data, one register per rate

  assign ld4 = (cnt4 == 2'd0);
  assign ld6 = (cnt6 == 3'd0);
  assign ld8 = (cnt8 == 3'd0);

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt4 <= '0;
      cnt6 <= '0;
      cnt8 <= '0;
      reg4 <= '0;
      reg6 <= '0;
      reg8 <= '0;
    end else begin
      cnt4 <= cnt4 + 2'd1;
      cnt6 <= (cnt6 == 3'd5) ? 3'd0 : cnt6 + 3'd1;
      cnt8 <= cnt8 + 3'd1;
      if (ld4) reg4 <= rrcin;
      if (ld6) reg6 <= rrcin;
      if (ld8) reg8 <= rrcin;
    end
  end

  always_comb begin
    unique case (factor_of(intp_sel))
      6: begin
        in_strobe = ld6 & ~rst;
        up_data   = reg6;
      end
      8: begin
        in_strobe = ld8 & ~rst;
        up_data   = reg8;
      end
      default: begin
        in_strobe = ld4 & ~rst;
        up_data   = reg4;
      end
    endcase
  end

endmodule
