// csda_mst_1d: one-dimensional CSDA multi-standard transform core.
//
// Transforms one row of eight samples per clock: either one 8-point
// transform (MPEG-1/2/4 DCT approximation, H.264 or VC-1 integer transform)
// or two 4-point transforms (H.264, VC-1) of x0..x3 and x4..x7. The chain is
//   selected butterfly (csda_sbf)
//   -> even part CSDA (csda_even) and odd part CSDA (csda_odd), 2 stages each
//   -> error-compensated adder trees (csda_ecat)
//   -> permutation (csda_perm) into T0..T7.
// The mode travels down the pipeline with its row, so the mode may change on
// any row.
//
// Interface: X with in_valid and mode in, T with out_valid out.
// Timing: a row's result appears two clock edges after the row (latency 2),
// one row per clock. Output word k is round(sum_n C[k][n] * x_n / 2^s),
// saturated to OUT_W bits, where s = csda_pkg::out_shift(mode, IN_W, OUT_W).
// Reset: synchronous, active high.
//
// The chain of blocks follows the published 1-D CSDA-MST core. The mode
// encoding, the valid signal and the output scaling rule are this design's.
module csda_mst_1d
  import csda_pkg::*;
#(
  parameter int IN_W  = 9,
  parameter int OUT_W = 12
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  mode_t                   mode,
  input  logic signed [IN_W-1:0]  x [8],
  output logic                    out_valid,
  output mode_t                   out_mode,
  output logic signed [OUT_W-1:0] t [8]
);

  localparam int DW = IN_W + 1;
  localparam int WW = DW + 3 + FRAC;
  localparam int WO = DW + 2 + FRAC;

  logic signed [DW-1:0]    a [4];
  logic signed [DW-1:0]    b [4];
  logic signed [WW-1:0]    de [10];
  logic signed [WO-1:0]    do_w [8];
  logic signed [OUT_W-1:0] ze [4];
  logic signed [OUT_W-1:0] zo [4];
  logic [1:0]              vld;

  csda_sbf #(.IN_W(IN_W)) u_sbf (
    .x(x), .four_pt(mode.four_pt), .a(a), .b(b)
  );

  csda_even #(.DW(DW), .WW(WW)) u_even (
    .clk(clk), .rst(rst), .mode_i(mode), .a(a), .mode_o(out_mode), .de(de)
  );

  csda_odd #(.DW(DW), .WO(WO)) u_odd (
    .clk(clk), .rst(rst), .mode_i(mode), .b(b), .do_w(do_w)
  );

  csda_ecat #(.IN_W(IN_W), .OUT_W(OUT_W), .WW(WW), .WO(WO)) u_ecat (
    .mode(out_mode), .de(de), .do_w(do_w), .ze(ze), .zo(zo)
  );

  csda_perm #(.W(OUT_W)) u_perm (
    .four_pt(out_mode.four_pt), .ze(ze), .zo(zo), .t(t)
  );

  always_ff @(posedge clk) begin
    if (rst) vld <= '0;
    else     vld <= {vld[0], in_valid};
  end
  assign out_valid = vld[1];

endmodule
