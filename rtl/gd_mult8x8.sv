// gd_mult8x8: unsigned 8x8 -> 16-bit Grouping and Decomposition (GD)
// multiplier.
//
// Grouping: each operand is split into 4-bit halves, so the 64 partial
// products fall into four equal 4x4 groups that are reduced in parallel:
//   group 1  Dadda    a[3:0] x b[3:0]  -> q1, weight 2^0
//   group 2  Wallace  a[3:0] x b[7:4]  -> q2, weight 2^4
//   group 3  Wallace  a[7:4] x b[3:0]  -> q3, weight 2^4
//   group 4  Dadda    a[7:4] x b[7:4]  -> q4, weight 2^8
// Decomposition: the four 8-bit sub-products overlap in columns 4..11 and
// are summed bit by bit, one cell per column, with the carries rippling
// from column to column (operands in the order printed on the published
// schematic; the order within a column does not change the result):
//   P0..P3    q1[3:0] directly
//   P4        full adder      q1[4], q3[0], q2[0]
//   P5..P7    5LA (ii..iv)    q1[k], q3[k-4], q2[k-4] + two carries in
//   P8..P11   5LA (v..viii)   q4[k-8], q3[k-4], q2[k-4] + two carries in
//   P12       full adder (ix) q4[4] + the two carries of 5LA (viii)
//   P13, P14  half adders     q4[5], q4[6] + carry in
//   P15       half adder      q4[7] + carry in
// 5LA (ii) has only one carry in (from the column-4 full adder); its fifth
// input is tied to 0. Column 15 follows the arithmetic rather than the
// published schematic, which takes P15 from the column-14 carry and leaves
// q4[7] unused: an extra half adder adds q4[7] to that carry. Its own carry
// is always 0 because the product fits in 16 bits, so it drives nothing.
//
// Interface: a[7:0], b[7:0] in; p[15:0] out. Purely combinational, no
// clock or reset; the critical path runs through one 4x4 multiplier and
// the column adders from P4 up to P15.
module gd_mult8x8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);
  logic [7:0] q1, q2, q3, q4;   // sub-products of groups 1..4
  logic [11:5] c1, c2;          // 5LA carries out of columns 5..11
  logic c_col4;                 // carry of the column-4 full adder
  logic c_col12, c_col13, c_col14;
  logic c_col15_unused;         // always 0: the product fits in 16 bits

  // groups, reduced in parallel
  dadda4x4   u_grp1 (.a(a[3:0]), .b(b[3:0]), .p(q1));
  wallace4x4 u_grp2 (.a(a[3:0]), .b(b[7:4]), .p(q2));
  wallace4x4 u_grp3 (.a(a[7:4]), .b(b[3:0]), .p(q3));
  dadda4x4   u_grp4 (.a(a[7:4]), .b(b[7:4]), .p(q4));

  // columns 0..3 belong to group 1 only
  assign p[3:0] = q1[3:0];

  // column 4
  full_adder u_col4 (.a(q1[4]), .b(q3[0]), .c(q2[0]), .sum(p[4]), .cout(c_col4));

  // column 5 (5LA ii): a single carry in
  five_la u_col5 (.a(q1[5]), .b(q3[1]), .c(q2[1]), .d(c_col4), .e(1'b0),
                  .s(p[5]), .c1(c1[5]), .c2(c2[5]));

  // columns 6, 7 (5LA iii, iv): group 1 with groups 2 and 3
  five_la u_col6 (.a(q1[6]), .b(q2[2]), .c(q3[2]), .d(c1[5]), .e(c2[5]),
                  .s(p[6]), .c1(c1[6]), .c2(c2[6]));
  five_la u_col7 (.a(q1[7]), .b(q3[3]), .c(q2[3]), .d(c1[6]), .e(c2[6]),
                  .s(p[7]), .c1(c1[7]), .c2(c2[7]));

  // columns 8..11 (5LA v..viii): group 4 with groups 2 and 3
  five_la u_col8  (.a(q4[0]), .b(q3[4]), .c(q2[4]), .d(c1[7]),  .e(c2[7]),
                   .s(p[8]),  .c1(c1[8]),  .c2(c2[8]));
  five_la u_col9  (.a(q4[1]), .b(q3[5]), .c(q2[5]), .d(c1[8]),  .e(c2[8]),
                   .s(p[9]),  .c1(c1[9]),  .c2(c2[9]));
  five_la u_col10 (.a(q4[2]), .b(q3[6]), .c(q2[6]), .d(c1[9]),  .e(c2[9]),
                   .s(p[10]), .c1(c1[10]), .c2(c2[10]));
  five_la u_col11 (.a(q4[3]), .b(q3[7]), .c(q2[7]), .d(c1[10]), .e(c2[10]),
                   .s(p[11]), .c1(c1[11]), .c2(c2[11]));

  // columns 12..15: group 4 alone plus the incoming carries
  full_adder u_col12 (.a(q4[4]), .b(c1[11]), .c(c2[11]), .sum(p[12]), .cout(c_col12));
  half_adder u_col13 (.a(q4[5]), .b(c_col12), .sum(p[13]), .carry(c_col13));
  half_adder u_col14 (.a(q4[6]), .b(c_col13), .sum(p[14]), .carry(c_col14));
  half_adder u_col15 (.a(q4[7]), .b(c_col14), .sum(p[15]), .carry(c_col15_unused));
endmodule
