// pp_gen4: 4x4 partial-product generator.
//
// An array of sixteen two-input AND gates: pp[j][i] = a[i] & b[j], the
// partial product AiBj of weight 2^(i+j). Row j holds a times bit j of b.
// The row/column indexing of the output array is this design's own choice.
//
// Interface: a[3:0], b[3:0] in; pp[3:0][3:0] out. Purely combinational.
module pp_gen4 (
  input  logic [3:0]      a,
  input  logic [3:0]      b,
  output logic [3:0][3:0] pp   // pp[j][i] = Ai & Bj
);
  always_comb begin
    for (int j = 0; j < 4; j++)
      for (int i = 0; i < 4; i++)
        pp[j][i] = a[i] & b[j];
  end
endmodule
