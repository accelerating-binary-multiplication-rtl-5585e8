// half_adder: single-bit half adder (2:2 counter).
//
// carry = a AND b, sum = (NOT a AND b) OR (NOT b AND a), which is a XOR b.
// Both equations are those of the static CMOS half adder schematic; the
// transistors themselves are not modelled.
//
// Interface: a, b in; sum, carry out. Purely combinational, no clock.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  always_comb begin
    carry = a & b;
    sum   = (~a & b) | (~b & a);
  end
endmodule
