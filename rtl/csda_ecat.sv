// csda_ecat: the eight adder trees with error compensation (ECATs) that
// follow CSDA_E and CSDA_O.
//
// Each output Z_k is a weighted sum of the shared DA words, every weight a
// small integer realised as its canonical signed digit (CSD) expansion, that
// is as shifted copies of the word added or subtracted. The weights of every
// mode are constants derived in csda_pkg (even_weight, odd_weight); one tree
// per mode is built and the mode selects its result. Because the words hold
// FRAC fractional bits, the full-precision sum is exactly 2^FRAC times the
// matrix product, so the only truncation is the final scaling by
// 2^(FRAC + out_shift(mode)). Error compensation adds half an output LSB
// before that truncation (round half up), and the result saturates to OUT_W
// bits.
//
// Outputs: ze = Z0, Z2, Z4, Z6 (8-point) or the first 4-point result;
// zo = Z1, Z3, Z5, Z7 (8-point) or the second 4-point result.
// Purely combinational; mode must be the mode of the words presented.
//
// Eight trees after the CSDA stages follow the published architecture. Its
// truncation-error compensation scheme is replaced here by exact words and a
// single final rounding, and the trees are not shared across standards.
module csda_ecat
  import csda_pkg::*;
#(
  parameter int IN_W  = 9,                  // width of the core's inputs x
  parameter int OUT_W = 12,                 // width of the core's outputs
  parameter int WW    = IN_W + 4 + FRAC,    // even DA word width
  parameter int WO    = IN_W + 3 + FRAC,    // odd DA word width
  parameter int ACC_W = IN_W + FRAC + 14    // adder tree width
) (
  input  mode_t                   mode,
  input  logic signed [WW-1:0]    de [10],
  input  logic signed [WO-1:0]    do_w [8],
  output logic signed [OUT_W-1:0] ze [4],
  output logic signed [OUT_W-1:0] zo [4]
);

  // v * w by shift-add over the CSD digits of the constant w.
  function automatic logic signed [ACC_W-1:0] csd_mul(logic signed [ACC_W-1:0] v, int w);
    logic signed [ACC_W-1:0] acc;
    int n;
    acc = '0;
    n = (w < 0) ? -w : w;
    for (int j = 0; j < 9; j++) begin   // |weights| < 256
      if (n[0]) begin
        if (n[1]) begin
          acc = acc - (v <<< j);
          n = n + 1;
        end else begin
          acc = acc + (v <<< j);
          n = n - 1;
        end
      end
      n = n >>> 1;
    end
    return (w < 0) ? -acc : acc;
  endfunction

  // Rounded, saturated scaling of a full-precision sum.
  function automatic logic signed [OUT_W-1:0] scale(logic signed [ACC_W-1:0] v, int sh);
    logic signed [ACC_W-1:0] r;
    logic signed [ACC_W-1:0] hi;
    logic signed [ACC_W-1:0] lo;
    r  = (v + (ACC_W'(1) <<< (sh - 1))) >>> sh;   // sh >= FRAC >= 1
    hi = ACC_W'((1 << (OUT_W - 1)) - 1);
    lo = -ACC_W'(1 << (OUT_W - 1));
    if (r > hi) return hi[OUT_W-1:0];
    if (r < lo) return lo[OUT_W-1:0];
    return r[OUT_W-1:0];
  endfunction

  // Weight tables of every mode, fixed at elaboration.
  typedef int wtab_e_t [NMODES*4*10];   // index (m*4 + k)*10 + w
  typedef int wtab_o_t [NMODES*4*8];    // index (m*4 + k)*8 + w
  typedef int shtab_t  [NMODES];

  function automatic wtab_e_t mk_we();
    wtab_e_t tab;
    for (int m = 0; m < NMODES; m++)
      for (int k = 0; k < 4; k++)
        for (int w = 0; w < 10; w++) tab[(m*4 + k)*10 + w] = even_weight(mode_t'(m), k, w);
    return tab;
  endfunction

  function automatic wtab_o_t mk_wo();
    wtab_o_t tab;
    for (int m = 0; m < NMODES; m++)
      for (int k = 0; k < 4; k++)
        for (int w = 0; w < 8; w++) tab[(m*4 + k)*8 + w] = odd_weight(mode_t'(m), k, w);
    return tab;
  endfunction

  function automatic shtab_t mk_sh();
    shtab_t tab;
    for (int m = 0; m < NMODES; m++) tab[m] = FRAC + out_shift(mode_t'(m), IN_W, OUT_W);
    return tab;
  endfunction

  localparam wtab_e_t WE = mk_we();
  localparam wtab_o_t WOT = mk_wo();
  localparam shtab_t  SH = mk_sh();

  logic signed [ACC_W-1:0] sum_e [NMODES][4];
  logic signed [ACC_W-1:0] sum_o [NMODES][4];

  for (genvar m = 0; m < NMODES; m++) begin : g_mode
    for (genvar k = 0; k < 4; k++) begin : g_out
      always_comb begin
        sum_e[m][k] = '0;
        sum_o[m][k] = '0;
        for (int w = 0; w < 10; w++)
          sum_e[m][k] = sum_e[m][k] + csd_mul(ACC_W'(de[w]), WE[(m*4 + k)*10 + w]);
        for (int w = 0; w < 8; w++)
          sum_o[m][k] = sum_o[m][k] + csd_mul(ACC_W'(do_w[w]), WOT[(m*4 + k)*8 + w]);
      end
    end
  end

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      ze[k] = scale(sum_e[mode][k], SH[mode]);
      zo[k] = scale(sum_o[mode][k], SH[mode]);
    end
  end

endmodule
