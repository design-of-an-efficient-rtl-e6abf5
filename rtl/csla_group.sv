// csla_group: one group of the BEC-based carry select adder.
//
// A W-bit ripple adder adds a and b with carry 0, giving W+1 bits
// (sum and carry). A (W+1)-bit binary to excess-1 converter forms the same
// result plus one, which is what a carry input of 1 would give. The carry
// from the previous group selects between the two, so this group's result
// is ready as soon as that carry arrives. The structure (ripple adder,
// BEC one bit wider than the group, 2W+2 : W+1 multiplexer) follows the
// group 2 drawing of the carry select adder. Combinational.
//
// Ports: a, b (W bits), cin (carry of the previous group);
//        sum (W bits), cout (carry to the next group).
module csla_group #(
  parameter int W = 2
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W:0] r0;  // result for carry in 0: {carry, sum}
  logic [W:0] r1;  // result for carry in 1

  rca #(.W(W)) u_rca (
    .a   (a),
    .b   (b),
    .cin (1'b0),
    .sum (r0[W-1:0]),
    .cout(r0[W])
  );

  bec #(.W(W+1)) u_bec (
    .x(r0),
    .y(r1)
  );

  assign {cout, sum} = cin ? r1 : r0;

endmodule
