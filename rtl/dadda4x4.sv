// dadda4x4: unsigned 4x4 -> 8-bit Dadda multiplier.
//
// The multiplier uses a 4x4 Dadda unit without drawing its netlist, so this
// is the textbook Dadda reduction built from the same half/full adder cells
// as the Wallace unit. Dadda reduces each column only as far as the next
// target height (3, then 2), which needs fewer cells than Wallace's eager
// reduction:
//   stage 1 (to 3 rows)  HA(A0B3,A1B2) col 3, HA(A1B3,A2B2) col 4
//   stage 2 (to 2 rows)  HA(A0B2,A1B1) col 2, FA in cols 3, 4, 5
//   final                ripple-carry adder over columns 1..6 (1 HA + 5 FA),
//                        carry out is P7
// Signal names: hN/fN are the stage cells, r* the final ripple carries.
//
// Interface: a[3:0], b[3:0] in; p[7:0] out. Purely combinational.
module dadda4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0][3:0] pp;  // pp[j][i] = Ai & Bj, weight i+j
  logic hs1, hc1, hs2, hc2, hs3, hc3;
  logic fs1, fc1, fs2, fc2, fs3, fc3;
  logic r1, r2, r3, r4, r5;

  pp_gen4 u_pp (.a(a), .b(b), .pp(pp));

  // stage 1: column heights 1 2 3 4 3 2 1 -> at most 3
  half_adder u_h1 (.a(pp[3][0]), .b(pp[2][1]), .sum(hs1), .carry(hc1));  // col 3
  half_adder u_h2 (.a(pp[3][1]), .b(pp[2][2]), .sum(hs2), .carry(hc2));  // col 4

  // stage 2: at most 2 per column
  half_adder u_h3 (.a(pp[2][0]), .b(pp[1][1]),           .sum(hs3), .carry(hc3));  // col 2
  full_adder u_f1 (.a(pp[1][2]), .b(pp[0][3]), .c(hs1),  .sum(fs1), .cout(fc1));   // col 3
  full_adder u_f2 (.a(pp[1][3]), .b(hs2),      .c(hc1),  .sum(fs2), .cout(fc2));   // col 4
  full_adder u_f3 (.a(pp[3][2]), .b(pp[2][3]), .c(hc2),  .sum(fs3), .cout(fc3));   // col 5

  // final two rows: ripple-carry adder
  assign p[0] = pp[0][0];
  half_adder u_r1 (.a(pp[0][1]), .b(pp[1][0]),         .sum(p[1]), .carry(r1));
  full_adder u_r2 (.a(pp[0][2]), .b(hs3),      .c(r1), .sum(p[2]), .cout(r2));
  full_adder u_r3 (.a(fs1),      .b(hc3),      .c(r2), .sum(p[3]), .cout(r3));
  full_adder u_r4 (.a(fs2),      .b(fc1),      .c(r3), .sum(p[4]), .cout(r4));
  full_adder u_r5 (.a(fs3),      .b(fc2),      .c(r4), .sum(p[5]), .cout(r5));
  full_adder u_r6 (.a(pp[3][3]), .b(fc3),      .c(r5), .sum(p[6]), .cout(p[7]));
endmodule
