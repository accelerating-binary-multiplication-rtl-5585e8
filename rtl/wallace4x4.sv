// wallace4x4: unsigned 4x4 -> 8-bit Wallace-tree multiplier.
//
// The sixteen partial products AiBj come from pp_gen4. The columns (at most
// four bits high) are then reduced in three layers of single-bit adders:
//   layer 1    HA(A1B0,A0B1) -> P1,c1   FA(A2B0,A1B1,A0B2) -> s2,c2
//              FA(A2B1,A1B2,A0B3) -> s3,c3   HA(A2B2,A1B3) -> s4,c4
//   layer 2    HA(s2,c1) -> P2,c5   FA(A3B0,s3,c2) -> s6,c6
//              FA(A3B1,s4,c3) -> s7,c7   FA(A3B2,A2B3,c4) -> s8,c8
//   terminal   HA(s6,c5) -> P3,c9   FA(s7,c6,c9) -> P4,c10
//              FA(s8,c7,c10) -> P5,c11   FA(A3B3,c8,c11) -> P6, carry P7
// P0 is A0B0. The cell list and its wiring follow the published 4x4 Wallace
// schematic; signal names here are this design's own.
//
// Interface: a[3:0], b[3:0] in; p[7:0] out. Purely combinational: the
// longest path is the AND plane plus six adder cells (to P7).
module wallace4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0][3:0] pp;  // pp[j][i] = Ai & Bj
  logic s2, s3, s4, s6, s7, s8;
  logic c1, c2, c3, c4, c5, c6, c7, c8, c9, c10, c11;

  pp_gen4 u_pp (.a(a), .b(b), .pp(pp));

  assign p[0] = pp[0][0];

  // layer 1
  half_adder u_l1_c1 (.a(pp[0][1]), .b(pp[1][0]),               .sum(p[1]), .carry(c1));
  full_adder u_l1_c2 (.a(pp[0][2]), .b(pp[1][1]), .c(pp[2][0]), .sum(s2),   .cout(c2));
  full_adder u_l1_c3 (.a(pp[1][2]), .b(pp[2][1]), .c(pp[3][0]), .sum(s3),   .cout(c3));
  half_adder u_l1_c4 (.a(pp[2][2]), .b(pp[3][1]),               .sum(s4),   .carry(c4));

  // layer 2
  half_adder u_l2_c2 (.a(s2),       .b(c1),                     .sum(p[2]), .carry(c5));
  full_adder u_l2_c3 (.a(pp[0][3]), .b(s3),       .c(c2),       .sum(s6),   .cout(c6));
  full_adder u_l2_c4 (.a(pp[1][3]), .b(s4),       .c(c3),       .sum(s7),   .cout(c7));
  full_adder u_l2_c5 (.a(pp[2][3]), .b(pp[3][2]), .c(c4),       .sum(s8),   .cout(c8));

  // terminal layer: ripple from column 3 to column 7
  half_adder u_t_c3  (.a(s6),       .b(c5),                     .sum(p[3]), .carry(c9));
  full_adder u_t_c4  (.a(s7),       .b(c6),       .c(c9),       .sum(p[4]), .cout(c10));
  full_adder u_t_c5  (.a(s8),       .b(c7),       .c(c10),      .sum(p[5]), .cout(c11));
  full_adder u_t_c6  (.a(pp[3][3]), .b(c8),       .c(c11),      .sum(p[6]), .cout(p[7]));
endmodule
