// accum_unit: accumulation unit, the delay/adder chain of a transposed-form
// FIR filter.
//
// Each clock every register takes the one above it plus its tap product:
//   r[k] <= r[k+1] + tap[k],   r[MAX_TAPS-1] <= tap[MAX_TAPS-1],
// and y = r[0]. With tap[k] = h(k) * u(m) this gives
//   y(m+1) = sum_k h(k) * u(m-k),
// one output per clock, one clock after the newest product. Products are
// sign-extended to ACC_W bits. The register chain and its reset are this
// design's construction: the block is only named as the accumulation unit.
//
// Ports: clk, rst (synchronous, active high, clears the chain),
//        tap (MAX_TAPS signed products); y (ACC_W-bit signed output).
module accum_unit
  import rrc_pkg::*;
#(
  parameter int NTAPS = MAX_TAPS,
  parameter int ACC_W = 22
) (
  input  logic                    clk,
  input  logic                    rst,
  input  prod_t                   tap [NTAPS],
  output logic signed [ACC_W-1:0] y
);

  logic signed [ACC_W-1:0] r [NTAPS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < NTAPS; k++) r[k] <= '0;
    end else begin
      for (int k = 0; k < NTAPS - 1; k++) r[k] <= r[k+1] + ACC_W'(tap[k]);
      r[NTAPS-1] <= ACC_W'(tap[NTAPS-1]);
    end
  end

  assign y = r[0];

endmodule
