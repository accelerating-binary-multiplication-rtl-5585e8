// full_adder: single-bit full adder, the basic 3:2 counter of every
// reduction tree in this multiplier.
//
// The logic follows the static CMOS mirror adder: an inverted-carry node
// f = ~(a&b | c&(a|b)) is formed first, the carry output is its inverse,
// and the second stack forms the inverted sum node ~(f&(a|b|c) | a&b&c),
// which the output inverter turns into the sum. The result is the usual
// sum = a^b^c, cout = majority(a,b,c). The node structure is taken from the
// transistor schematic; sizing and the CMOS implementation are not modelled.
//
// Interface: a, b, c in; sum, cout out. Purely combinational, no clock.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic cout
);
  logic f;      // inverted carry node of the mirror adder
  logic sum_n;  // inverted sum node, before the output inverter

  always_comb begin
    f     = ~((a & b) | (c & (a | b)));
    cout  = ~f;
    sum_n = ~((f & (a | b | c)) | (a & b & c));
    sum   = ~sum_n;
  end
endmodule
