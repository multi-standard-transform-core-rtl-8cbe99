// csda_pkg: types and constant functions shared by the CSDA multi-standard
// transform (MST) datapath.
//
// A transform mode is a standard (MPEG-1/2/4, H.264 or VC-1) plus a size
// (one 8-point transform, or two 4-point transforms side by side). The
// functions below hold the integer coefficient sets of every mode and derive
// from them, at elaboration time, every constant the datapath needs: the
// multiplexer selects inside the even and odd CSDA stages, the shift-add
// weights of the adder trees, and the output scaling. Nothing here is
// evaluated at run time by synthesized logic except through constant
// arguments.
//
// Coefficients (all integers; the transform's scaling factor is neglected,
// as in the 8-point matrix C of the design):
//   H.264 8-point : c1..c7 = 12, 8, 10, 8, 6, 4, 3
//   VC-1  8-point : c1..c7 = 16, 16, 15, 12, 9, 6, 4
//   MPEG  8-point : c1..c7 = round(64*cos(k*pi/16)) = 63, 59, 53, 45, 36, 24, 12
//   H.264 4-point : (c4, c2, c6) = 1, 2, 1
//   VC-1  4-point : (c4, c2, c6) = 17, 22, 10
//   MPEG  4-point : (c4, c2, c6) = 45, 59, 24 (the even half of the 8-point DCT)
// The H.264 and VC-1 sets are those of the standards' integer transforms; the
// MPEG set is this design's 6-bit approximation of the DCT.
//
// All datapath words carry FRAC fractional bits so that the right shifts of
// the CSDA stages (>>1, >>2, >>4) are exact; each adder-tree weight is then
// an integer and the sum equals 2^FRAC times the exact matrix product.
package csda_pkg;

  typedef enum logic [1:0] {
    STD_H264 = 2'd0,
    STD_VC1  = 2'd1,
    STD_MPEG = 2'd2
  } std_e;

  typedef struct packed {
    std_e std;      // coding standard
    logic four_pt;  // 0: one 8-point transform, 1: two 4-point transforms
  } mode_t;

  localparam int NMODES = 8;   // every value of mode_t
  localparam int FRAC   = 4;   // fractional bits of the CSDA words
  localparam int ONE    = 1 << FRAC;

  // Standard of a mode; the unused code 3 behaves as H.264.
  function automatic std_e std_of(logic [1:0] s);
    case (s)
      STD_VC1:  return STD_VC1;
      STD_MPEG: return STD_MPEG;
      default:  return STD_H264;
    endcase
  endfunction

  // 8-point coefficient c_k, k = 1..7.
  function automatic int c8(std_e s, int k);
    int t [1:7];
    case (s)
      STD_VC1:  t = '{16, 16, 15, 12, 9, 6, 4};
      STD_MPEG: t = '{63, 59, 53, 45, 36, 24, 12};
      default:  t = '{12, 8, 10, 8, 6, 4, 3};
    endcase
    return t[k];
  endfunction

  // Coefficient c_k (k = 2, 4 or 6) of the four-point matrix used by a mode.
  function automatic int c4pt(mode_t m, int k);
    std_e s = std_of(m.std);
    if (!m.four_pt) return c8(s, k);
    case (s)
      STD_VC1:  return (k == 4) ? 17 : (k == 2) ? 22 : 10;
      STD_MPEG: return c8(STD_MPEG, k);
      default:  return (k == 4) ? 1 : (k == 2) ? 2 : 1;
    endcase
  endfunction

  // Four-point matrix [c4 c4 c4 c4; c2 c6 -c6 -c2; c4 -c4 -c4 c4; c6 -c2 c2 -c6].
  function automatic int mat4(mode_t m, int k, int n);
    int c4 = c4pt(m, 4);
    int c2 = c4pt(m, 2);
    int c6 = c4pt(m, 6);
    case (k)
      0: return c4;
      1: return (n == 0) ? c2 : (n == 1) ? c6 : (n == 2) ? -c6 : -c2;
      2: return (n == 0 || n == 3) ? c4 : -c4;
      default: return (n == 0) ? c6 : (n == 1) ? -c2 : (n == 2) ? c2 : -c6;
    endcase
  endfunction

  // Coefficient of input b_n in odd-part output k. 8-point: matrix C_o, whose
  // outputs are Z1, Z3, Z5, Z7. 4-point: the second 4-point block, whose input
  // vector (x4, x5, x6, x7) reaches the odd part as (b3, b2, b1, b0).
  function automatic int odd_coef(mode_t m, int k, int n);
    std_e s = std_of(m.std);
    int c1 = c8(s, 1);
    int c3 = c8(s, 3);
    int c5 = c8(s, 5);
    int c7 = c8(s, 7);
    if (m.four_pt) return mat4(m, k, 3 - n);
    case (k)
      0: return (n == 0) ? c1 : (n == 1) ? c3 : (n == 2) ? c5 : c7;
      1: return (n == 0) ? c3 : (n == 1) ? -c7 : (n == 2) ? -c1 : -c5;
      2: return (n == 0) ? c5 : (n == 1) ? -c1 : (n == 2) ? c7 : c3;
      default: return (n == 0) ? c7 : (n == 1) ? -c5 : (n == 2) ? c3 : -c1;
    endcase
  endfunction

  // ---------------- even part (CSDA_E) selects and weights ----------------
  // MUX-1: 0 adds >>1 (word = 1.5 * sum), 1 adds >>2 (word = 1.25 * sum).
  function automatic logic e_mux1(logic [1:0] s);
    return std_of(s) == STD_MPEG;
  endfunction
  // MUX-2: 1 selects B + (B >> 1) = 1.5 * B, used when c6 is a multiple of 3.
  function automatic logic e_mux2(mode_t m);
    return (c4pt(m, 6) % 3) == 0;
  endfunction

  // Weight of even word w (DAe0..DAe9) in even output k (Z0, Z2, Z4, Z6).
  // Words, in units of 2^-FRAC: DAe0 = P, DAe1 = f*P, DAe2 = Q, DAe3 = f*Q,
  // DAe4 = B1, DAe5 = g*B1, DAe6 = g*(B1 - B0), DAe7 = g*(B0 + B1),
  // DAe8 = g*B0, DAe9 = B0, with P = A0 + A1, Q = A0 - A1, f from MUX-1 and
  // g from MUX-2.
  //   Z0 = c4*P, Z4 = c4*Q (through f*P, f*Q when c4 divides by f)
  //   Z2 = c6*(B0 + B1) + (c2 - c6)*B0
  //   Z6 = -c6*(B1 - B0) - (c2 - c6)*B1
  function automatic int even_weight(mode_t m, int k, int w);
    int c4 = c4pt(m, 4);
    int c2 = c4pt(m, 2);
    int c6 = c4pt(m, 6);
    int f16 = e_mux1(m.std) ? ONE + ONE / 4 : ONE + ONE / 2;
    int g16 = e_mux2(m) ? ONE + ONE / 2 : ONE;
    bit use_f = ((ONE * c4) % f16) == 0;
    case (k)
      0, 2: begin
        int base = (k == 0) ? 0 : 2;
        if (use_f) return (w == base + 1) ? (ONE * c4) / f16 : 0;
        return (w == base) ? c4 : 0;
      end
      1: return (w == 7) ? (ONE * c6) / g16 : (w == 9) ? c2 - c6 : 0;
      default: return (w == 6) ? -(ONE * c6) / g16 : (w == 4) ? -(c2 - c6) : 0;
    endcase
  endfunction

  // ---------------- odd part (CSDA_O) selects and weights -----------------
  // MUX-3: 1 adds b >> 4, giving r = (1 + 1/16)*b; used when a coefficient is
  // a multiple of 17.
  function automatic logic o_mux3(mode_t m);
    for (int k = 0; k < 4; k++)
      for (int n = 0; n < 4; n++)
        if (odd_coef(m, k, n) % 17 == 0) return 1'b1;
    return 1'b0;
  endfunction
  // MUX-2 (odd): 1 gives q = 1.5*b; used when some coefficient divides by 3.
  function automatic logic o_mux2(mode_t m);
    if (o_mux3(m)) return 1'b0;
    for (int k = 0; k < 4; k++)
      for (int n = 0; n < 4; n++)
        if (odd_coef(m, k, n) % 3 == 0) return 1'b1;
    return 1'b0;
  endfunction
  // Scale of the shared word r_n, in units of 2^-FRAC.
  function automatic int o_gain(mode_t m);
    return ONE + (o_mux2(m) ? ONE / 2 : 0) + (o_mux3(m) ? ONE / 16 : 0);
  endfunction
  // Weight of odd word w in odd output k. Words 0..3 are r_0..r_3 (scaled by
  // o_gain), words 4..7 are the plain b_0..b_3. A coefficient that is a
  // multiple of the gain uses r_n with a smaller weight, else b_n.
  function automatic int odd_weight(mode_t m, int k, int w);
    int n = w % 4;
    int c = odd_coef(m, k, n);
    bit use_r = ((ONE * c) % o_gain(m)) == 0;
    if (w < 4) return use_r ? (ONE * c) / o_gain(m) : 0;
    return use_r ? 0 : c;
  endfunction

  // Select tables, one bit per mode value, for indexing by a run-time mode.
  function automatic logic [NMODES-1:0] tab_e_mux1();
    logic [NMODES-1:0] tab;
    for (int m = 0; m < NMODES; m++) tab[m] = e_mux1(2'(m >> 1));   // std field of mode m
    return tab;
  endfunction
  function automatic logic [NMODES-1:0] tab_e_mux2();
    logic [NMODES-1:0] tab;
    for (int m = 0; m < NMODES; m++) tab[m] = e_mux2(mode_t'(m));
    return tab;
  endfunction
  function automatic logic [NMODES-1:0] tab_o_mux2();
    logic [NMODES-1:0] tab;
    for (int m = 0; m < NMODES; m++) tab[m] = o_mux2(mode_t'(m));
    return tab;
  endfunction
  function automatic logic [NMODES-1:0] tab_o_mux3();
    logic [NMODES-1:0] tab;
    for (int m = 0; m < NMODES; m++) tab[m] = o_mux3(mode_t'(m));
    return tab;
  endfunction

  // ---------------- output scaling ----------------------------------------
  // Largest sum of coefficient magnitudes of any output row, over x.
  function automatic int row_max(mode_t m);
    std_e s = std_of(m.std);
    int r;
    if (m.four_pt) begin
      r = 4 * c4pt(m, 4);
      if (2 * (c4pt(m, 2) + c4pt(m, 6)) > r) r = 2 * (c4pt(m, 2) + c4pt(m, 6));
    end else begin
      r = 8 * c8(s, 4);
      if (2 * (c8(s, 1) + c8(s, 3) + c8(s, 5) + c8(s, 7)) > r)
        r = 2 * (c8(s, 1) + c8(s, 3) + c8(s, 5) + c8(s, 7));
      if (4 * (c8(s, 2) + c8(s, 6)) > r) r = 4 * (c8(s, 2) + c8(s, 6));
    end
    return r;
  endfunction

  // Right shift applied after the adder trees so that any in_w-bit input
  // block gives an out_w-bit result: the smallest s with
  // row_max * 2^(in_w-1) <= 2^(out_w-1+s).
  function automatic int out_shift(mode_t m, int in_w, int out_w);
    longint lim;
    longint need;
    need = longint'(row_max(m)) << (in_w - 1);
    for (int s = 0; s < 24; s++) begin
      lim = longint'(1) << (out_w - 1 + s);
      if (need <= lim) return s;
    end
    return 24;
  endfunction

endpackage
