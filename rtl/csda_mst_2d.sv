// csda_mst_2d: two-dimensional CSDA multi-standard transform core.
//
// Computes the 2-D transform of 8x8 blocks (one 8-point transform per row
// and column) or of four 4x4 blocks tiled in an 8x8 block (two 4-point
// transforms per row and column), for MPEG-1/2/4, H.264 and VC-1. Structure:
//   1-D core 1 (rows, 9-bit in, 12-bit out)
//   -> transpose memory, 64 x 12-bit
//   -> 1-D core 2 (columns, 12-bit in, 14-bit out)
// Both 1-D transforms run at the same time on consecutive blocks: one row of
// eight samples enters and one line of eight results leaves per clock.
//
// Ports: X0..X7 as the array X, Clk, Reset, S (0: 8-point, 1: two 4-point),
// Std (standard, csda_pkg::std_e encoding: 0 H.264, 1 VC-1, 2 MPEG),
// SelTX (1: transpose between the cores, giving the 2-D transform; 0: rows
// pass the memory untransposed), InValid / OutValid, Out0..Out7 as Out.
// Mode and SelTX are taken per block with its last row; the second core
// uses the mode stored with the block.
// Timing: an input block presented on eight consecutive valid clocks starting
// at clock c leaves on clocks c+13 .. c+20 (core 1: 2, memory: 9 after the
// first row, core 2: 2), output line t being column t of the result
// (or row t with SelTX = 0). Reset: synchronous, active high.
//
// The three-block structure, the widths 9/12/12/14 and the port names follow
// the published 2-D core. Std, InValid/OutValid and the meaning of SelTX are
// this design's additions.
module csda_mst_2d
  import csda_pkg::*;
#(
  parameter int IN_W  = 9,
  parameter int MID_W = 12,
  parameter int OUT_W = 14
) (
  input  logic                    Clk,
  input  logic                    Reset,
  input  logic                    S,
  input  logic [1:0]              Std,
  input  logic                    SelTX,
  input  logic                    InValid,
  input  logic signed [IN_W-1:0]  X [8],
  output logic                    OutValid,
  output logic signed [OUT_W-1:0] Out [8]
);

  mode_t                   mode_in;
  mode_t                   mode_1;
  mode_t                   mode_2;
  mode_t                   mode_unused;
  logic                    vld_1, vld_2;
  logic signed [MID_W-1:0] t1 [8];
  logic signed [MID_W-1:0] t2 [8];
  logic [1:0]              seltx_d;   // SelTX delayed by core 1's latency

  // SelTX travels with its row through core 1 (two clocks) so that the
  // transpose memory sees the value that came with the block's last row.
  always_ff @(posedge Clk) begin
    if (Reset) seltx_d <= '0;
    else       seltx_d <= {seltx_d[0], SelTX};
  end

  assign mode_in = '{std: std_e'(Std), four_pt: S};

  csda_mst_1d #(.IN_W(IN_W), .OUT_W(MID_W)) u_core1 (
    .clk(Clk), .rst(Reset), .in_valid(InValid), .mode(mode_in), .x(X),
    .out_valid(vld_1), .out_mode(mode_1), .t(t1)
  );

  csda_tmem #(.W(MID_W), .N(8), .TAG_W($bits(mode_t))) u_tmem (
    .clk(Clk), .rst(Reset), .in_valid(vld_1), .sel_tx(seltx_d[1]), .tag_i(mode_1),
    .din(t1), .out_valid(vld_2), .tag_o(mode_2), .dout(t2)
  );

  csda_mst_1d #(.IN_W(MID_W), .OUT_W(OUT_W)) u_core2 (
    .clk(Clk), .rst(Reset), .in_valid(vld_2), .mode(mode_2), .x(t2),
    .out_valid(OutValid), .out_mode(mode_unused), .t(Out)
  );

endmodule
