// csda_sbf: selected butterfly (SBF) at the input of a 1-D CSDA-MST core.
//
// For an 8-point transform it forms the butterfly of the eight inputs,
// a_i = x_i + x_(7-i) (even part) and b_i = x_i - x_(7-i) (odd part), i = 0..3.
// For two 4-point transforms it bypasses the butterfly: the first 4-point
// vector x0..x3 goes out on a0..a3, and the second vector x4..x7 goes out on
// b3, b2, b1, b0 (input row x_i feeds output b_(7-i), as in the butterfly's
// own wiring). One 2:1 multiplexer per output does the selection.
//
// Purely combinational. Outputs are one bit wider than the inputs.
//
// The butterfly and its per-output bypass multiplexers follow the published
// CSDA-MST architecture; the bypass routing of the second 4-point vector
// follows its wiring diagram.
module csda_sbf #(
  parameter int IN_W = 9
) (
  input  logic signed [IN_W-1:0] x [8],
  input  logic                   four_pt,  // 0: 8-point butterfly, 1: bypass
  output logic signed [IN_W:0]   a [4],
  output logic signed [IN_W:0]   b [4]
);

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      if (four_pt) begin
        a[i] = (IN_W+1)'(x[i]);
        b[i] = (IN_W+1)'(x[7-i]);
      end else begin
        a[i] = (IN_W+1)'(x[i]) + (IN_W+1)'(x[7-i]);
        b[i] = (IN_W+1)'(x[i]) - (IN_W+1)'(x[7-i]);
      end
    end
  end

endmodule
