// five_la: 5:2 logic adder ("5LA"), the column adder of the GD multiplier.
//
// Two full adders in series. The first adds a, b, c; its carry leaves as c1
// and its sum feeds the second full adder together with d and e. The second
// adder's carry leaves as c2 and its sum is the column result s. Both carries
// have the weight of the next column, so
//   a + b + c + d + e = s + 2*(c1 + c2).
// In the 8x8 multiplier d and e carry the two carries of the previous
// column's 5LA, so the carry ripples through one full adder per column.
//
// Interface: a..e in; s, c1, c2 out. Purely combinational.
module five_la (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic e,
  output logic s,
  output logic c1,
  output logic c2
);
  logic s_first;  // sum of the first full adder

  full_adder u_fa_first  (.a(a),       .b(b), .c(c), .sum(s_first), .cout(c1));
  full_adder u_fa_second (.a(s_first), .b(d), .c(e), .sum(s),       .cout(c2));
endmodule
