// rca: W-bit ripple carry adder.
//
// A chain of W full adders; the carry of bit i feeds bit i+1. Inside the
// carry select adder each group uses one of these with its carry input tied
// to 0, where the first full adder reduces to a half adder. Purely
// combinational: sum and cout settle after W full-adder delays. The
// original filter uses 2-bit ripple adders in its carry select adder; the
// width parameter is this design's generalisation.
//
// Ports: a, b (W bits), cin; sum (W bits), cout.
module rca #(
  parameter int W = 2
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_fa
    assign sum[i]  = a[i] ^ b[i] ^ c[i];
    assign c[i+1]  = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
  end

  assign cout = c[W];

endmodule
