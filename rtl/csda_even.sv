// csda_even: even-part common sharing distributed arithmetic (CSDA_E).
//
// Computes the shared partial sums ("DA words") of the even half of an
// 8-point transform, or of a whole 4-point transform, in two pipeline stages:
//   stage 1 (four-input butterfly): A0 = a0 + a3, A1 = a1 + a2,
//                                   B0 = a0 - a3, B1 = a1 - a2
//   stage 2: P = A0 + A1, Q = A0 - A1
//            DAe0 = P,  DAe1 = P + (P >> 1 or >> 2, MUX-1)
//            DAe2 = Q,  DAe3 = Q + (Q >> 1 or >> 2, MUX-1)
//            M1 = MUX-2 ? B1 + (B1 >> 1) : B1,  M0 likewise from B0
//            DAe4 = B1, DAe5 = M1, DAe6 = M1 - M0, DAe7 = M0 + M1,
//            DAe8 = M0, DAe9 = B0
// The adder trees that follow (csda_ecat) weight and add these words to form
// Z0, Z2, Z4 and Z6. The multiplexer selects come from the mode through
// csda_pkg. The words carry csda_pkg::FRAC fractional bits so that the
// right shifts lose nothing.
//
// Timing: words and mode_o appear two clock edges after a and mode_i.
// Reset (synchronous, active high) clears both pipeline stages.
//
// The two-stage structure, the >>1 / >>2 and B + (B >> 1) multiplexers and
// the ten outputs follow the published CSDA-MST even part. The fractional
// bits, the operand order of DAe6 and the per-mode selects are this design's
// own choices.
module csda_even
  import csda_pkg::*;
#(
  parameter int DW = 10,                 // width of a0..a3
  parameter int WW = DW + 3 + FRAC       // width of the DA words
) (
  input  logic                 clk,
  input  logic                 rst,
  input  mode_t                mode_i,
  input  logic signed [DW-1:0] a [4],
  output mode_t                mode_o,
  output logic signed [WW-1:0] de [10]
);

  // Stage 1: butterfly, 1 bit of growth.
  logic signed [DW:0] A0, A1, B0, B1;
  mode_t              mode_s1;

  always_ff @(posedge clk) begin
    if (rst) begin
      A0 <= '0; A1 <= '0; B0 <= '0; B1 <= '0;
      mode_s1 <= '{std: STD_H264, four_pt: 1'b0};
    end else begin
      A0 <= (DW+1)'(a[0]) + (DW+1)'(a[3]);
      A1 <= (DW+1)'(a[1]) + (DW+1)'(a[2]);
      B0 <= (DW+1)'(a[0]) - (DW+1)'(a[3]);
      B1 <= (DW+1)'(a[1]) - (DW+1)'(a[2]);
      mode_s1 <= mode_i;
    end
  end

  // Stage 2: shared sums in fixed point (FRAC fractional bits).
  localparam logic [NMODES-1:0] MUX1 = tab_e_mux1();
  localparam logic [NMODES-1:0] MUX2 = tab_e_mux2();

  logic signed [WW-1:0] p, q, pf, qf, b0f, b1f, m0, m1;
  logic                 sel1, sel2;

  always_comb begin
    sel1 = MUX1[mode_s1];
    sel2 = MUX2[mode_s1];
    p   = (WW'(A0) + WW'(A1)) <<< FRAC;
    q   = (WW'(A0) - WW'(A1)) <<< FRAC;
    b0f = WW'(B0) <<< FRAC;
    b1f = WW'(B1) <<< FRAC;
    pf  = p + (sel1 ? (p >>> 2) : (p >>> 1));   // MUX-1
    qf  = q + (sel1 ? (q >>> 2) : (q >>> 1));
    m1  = sel2 ? b1f + (b1f >>> 1) : b1f;        // MUX-2
    m0  = sel2 ? b0f + (b0f >>> 1) : b0f;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 10; i++) de[i] <= '0;
      mode_o <= '{std: STD_H264, four_pt: 1'b0};
    end else begin
      de[0] <= p;
      de[1] <= pf;
      de[2] <= q;
      de[3] <= qf;
      de[4] <= b1f;
      de[5] <= m1;
      de[6] <= m1 - m0;
      de[7] <= m0 + m1;
      de[8] <= m0;
      de[9] <= b0f;
      mode_o <= mode_s1;
    end
  end

endmodule
