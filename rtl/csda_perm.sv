// csda_perm: output permutation of a 1-D CSDA-MST core.
//
// The adder trees deliver the even results (Z0, Z2, Z4, Z6) and the odd
// results (Z1, Z3, Z5, Z7) as two groups; this block puts them in transform
// order T0..T7. For an 8-point transform T_(2i) = ze_i and T_(2i+1) = zo_i.
// For two 4-point transforms T0..T3 = ze (result of x0..x3) and
// T4..T7 = zo (result of x4..x7).
// Purely combinational.
//
// The Z ordering follows the published block diagram; the 4-point grouping
// is this design's choice.
module csda_perm #(
  parameter int W = 12
) (
  input  logic                four_pt,
  input  logic signed [W-1:0] ze [4],
  input  logic signed [W-1:0] zo [4],
  output logic signed [W-1:0] t  [8]
);

  for (genvar i = 0; i < 4; i++) begin : g_out
    assign t[i]     = four_pt ? ze[i] : ((i % 2) == 0 ? ze[i / 2] : zo[i / 2]);
    assign t[4 + i] = four_pt ? zo[i] : ((i % 2) == 0 ? ze[2 + i / 2] : zo[2 + i / 2]);
  end

endmodule
