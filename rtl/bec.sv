// bec: W-bit binary to excess-1 converter.
//
// Returns x + 1 modulo 2^W without a full-adder chain: bit 0 is inverted and
// every higher bit toggles when all bits below it are 1. In the carry select
// adder it replaces the second ripple adder (the one with carry input 1):
// the carry-1 result of a group is its carry-0 result plus one. The
// original filter gives the BEC's function; the gate form here is the
// usual one. Combinational.
//
// Ports: x (W bits) in, y (W bits) out.
module bec #(
  parameter int W = 3
) (
  input  logic [W-1:0] x,
  output logic [W-1:0] y
);

  logic [W-1:0] all_ones;  // all_ones[i]: x[i-1:0] are all 1

  assign all_ones[0] = 1'b1;
  for (genvar i = 1; i < W; i++) begin : g_and
    assign all_ones[i] = all_ones[i-1] & x[i-1];
  end

  assign y = x ^ all_ones;

endmodule
