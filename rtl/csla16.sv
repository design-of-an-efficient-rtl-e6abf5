// csla16: 16-bit carry select adder built with binary to excess-1 converters.
//
// The 16 bits are split into five groups of 2, 2, 3, 4 and 5 bits
// (bits 1:0, 3:2, 6:4, 10:7, 15:11; numbered 1-based as [2:1], [4:3],
// [7:5], [11:8], [16:12] in the original drawing). The lowest group is a
// plain 2-bit ripple adder with the adder's carry input. Every other group
// computes its carry-0 result with a ripple adder and its carry-1 result
// with a BEC, and the carry of the group below (C2, C4, C7, C11) selects one.
// The growing group widths let each group's local addition finish about
// when its select carry arrives. Combinational.
//
// Ports: a, b (16 bits), cin; sum (16 bits), cout.
module csla16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic        cin,
  output logic [15:0] sum,
  output logic        cout
);

  logic c2, c4, c7, c11;

  rca #(.W(2)) u_g1 (
    .a(a[1:0]), .b(b[1:0]), .cin(cin), .sum(sum[1:0]), .cout(c2)
  );

  csla_group #(.W(2)) u_g2 (
    .a(a[3:2]), .b(b[3:2]), .cin(c2), .sum(sum[3:2]), .cout(c4)
  );

  csla_group #(.W(3)) u_g3 (
    .a(a[6:4]), .b(b[6:4]), .cin(c4), .sum(sum[6:4]), .cout(c7)
  );

  csla_group #(.W(4)) u_g4 (
    .a(a[10:7]), .b(b[10:7]), .cin(c7), .sum(sum[10:7]), .cout(c11)
  );

  csla_group #(.W(5)) u_g5 (
    .a(a[15:11]), .b(b[15:11]), .cin(c11), .sum(sum[15:11]), .cout(cout)
  );

endmodule
