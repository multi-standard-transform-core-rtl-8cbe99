// csda_odd: odd-part common sharing distributed arithmetic (CSDA_O).
//
// Produces the shared words from which the adder trees (csda_ecat) build the
// odd outputs Z1, Z3, Z5, Z7 of an 8-point transform, or the four outputs of
// the second 4-point transform. Two pipeline stages:
//   stage 1, per input b_n: q_n = MUX-2 ? b_n + (b_n >> 1) : b_n
//   stage 2, per input:     r_n = MUX-3 ? q_n + (b_n >> 4) : q_n
// Outputs: do_w[0..3] = r_0..r_3 and do_w[4..7] = b_0..b_3, all with
// csda_pkg::FRAC fractional bits. The selects come from the mode: r_n is
// 1.5*b_n when several coefficients of the mode are multiples of 3, and
// (17/16)*b_n when a coefficient is a multiple of 17 (the VC-1 4-point c4).
// A coefficient that is a multiple of r_n's gain is then formed from r_n with
// fewer nonzero digits.
//
// Timing: words appear two clock edges after b and mode_i. Reset
// (synchronous, active high) clears both stages.
//
// The first stage (MUX-2) and the >>4 adders of MUX-3 follow the published
// CSDA-MST odd part. Its further cross adders and output multiplexers are not
// built here: the corresponding sums are formed in the adder trees instead.
module csda_odd
  import csda_pkg::*;
#(
  parameter int DW = 10,                 // width of b0..b3
  parameter int WO = DW + 2 + FRAC       // width of the DA words
) (
  input  logic                 clk,
  input  logic                 rst,
  input  mode_t                mode_i,
  input  logic signed [DW-1:0] b [4],
  output logic signed [WO-1:0] do_w [8]
);

  localparam logic [NMODES-1:0] MUX2 = tab_o_mux2();
  localparam logic [NMODES-1:0] MUX3 = tab_o_mux3();

  logic signed [WO-1:0] bf [4];   // b_n in fixed point
  logic signed [WO-1:0] q  [4];

  always_comb begin
    for (int n = 0; n < 4; n++) begin
      bf[n] = WO'(b[n]) <<< FRAC;
      q[n]  = MUX2[mode_i] ? bf[n] + (bf[n] >>> 1) : bf[n];   // MUX-2
    end
  end

  // Stage 1 registers.
  logic signed [WO-1:0] p_s1 [4];
  logic signed [WO-1:0] q_s1 [4];
  mode_t                mode_s1;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int n = 0; n < 4; n++) begin
        p_s1[n] <= '0;
        q_s1[n] <= '0;
      end
      mode_s1 <= '{std: STD_H264, four_pt: 1'b0};
    end else begin
      p_s1    <= bf;
      q_s1    <= q;
      mode_s1 <= mode_i;
    end
  end

  // Stage 2: MUX-3 adds b >> 4.
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int w = 0; w < 8; w++) do_w[w] <= '0;
    end else begin
      for (int n = 0; n < 4; n++) begin
        do_w[n]     <= MUX3[mode_s1] ? q_s1[n] + (p_s1[n] >>> 4) : q_s1[n];
        do_w[4 + n] <= p_s1[n];
      end
    end
  end

endmodule
