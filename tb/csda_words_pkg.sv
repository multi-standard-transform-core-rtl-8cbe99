// csda_words_pkg: testbench model of the shared words that the even and odd
// CSDA stages are expected to deliver, computed from their definitions
// (exact values scaled by 16, i.e. four fractional bits) with the multiplier
// choices of each mode written out as a table.
package csda_words_pkg;

  // Gain, in 1/16 units, of the even words DAe1/DAe3 (MUX-1).
  function automatic int e_f16(int std, bit four);
    return (std == 2) ? 20 : 24;
  endfunction
  // Gain of the even words DAe5..DAe8 (MUX-2).
  function automatic int e_g16(int std, bit four);
    if (std == 1 && !four) return 24;
    if (std == 2) return 24;
    return 16;
  endfunction
  // Gain of the odd words r_n (MUX-2 and MUX-3 of the odd part).
  function automatic int o_g16(int std, bit four);
    if (!four) return 24;
    if (std == 1) return 17;
    if (std == 2) return 24;
    return 16;
  endfunction

  // Even words DAe0..DAe9 from a0..a3.
  function automatic longint even_word(int std, bit four, longint a [4], int w);
    longint A0 = a[0] + a[3], A1 = a[1] + a[2];
    longint B0 = a[0] - a[3], B1 = a[1] - a[2];
    longint P = A0 + A1, Q = A0 - A1;
    longint f = e_f16(std, four), g = e_g16(std, four);
    case (w)
      0: return 16 * P;
      1: return f * P;
      2: return 16 * Q;
      3: return f * Q;
      4: return 16 * B1;
      5: return g * B1;
      6: return g * (B1 - B0);
      7: return g * (B0 + B1);
      8: return g * B0;
      default: return 16 * B0;
    endcase
  endfunction

  // Odd words: 0..3 gain * b_n, 4..7 b_n.
  function automatic longint odd_word(int std, bit four, longint b [4], int w);
    if (w < 4) return o_g16(std, four) * b[w];
    return 16 * b[w - 4];
  endfunction

endpackage
