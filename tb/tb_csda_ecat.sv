// tb_csda_ecat: feeds the adder trees with the shared words of random and
// extreme input rows, for every mode, and compares the eight outputs with
// the reference matrix product (rounded and saturated as specified).
module tb_csda_ecat;
  import csda_pkg::*;
  import csda_words_pkg::*;
  import csda_ref_pkg::*;

  localparam int IN_W  = 9;
  localparam int OUT_W = 12;
  localparam int WW    = IN_W + 4 + FRAC;
  localparam int WO    = IN_W + 3 + FRAC;

  mode_t                   mode;
  logic signed [WW-1:0]    de [10];
  logic signed [WO-1:0]    do_w [8];
  logic signed [OUT_W-1:0] ze [4];
  logic signed [OUT_W-1:0] zo [4];
  int checks = 0, failures = 0;

  csda_ecat #(.IN_W(IN_W), .OUT_W(OUT_W)) dut (
    .mode(mode), .de(de), .do_w(do_w), .ze(ze), .zo(zo));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 3000; it++) begin
      longint x [8];
      longint a [4];
      longint b [4];
      int     sd;
      bit     four;
      sd   = $urandom_range(0, 3);
      four = 1'($urandom);
      for (int i = 0; i < 8; i++) begin
        x[i] = longint'($signed(9'($urandom)));
        case (it % 40)
          1: x[i] = -256;
          2: x[i] = 255;
          3: x[i] = (i % 2) ? 255 : -256;
          4: x[i] = (mat(sd, four, 1, i) < 0) ? -256 : 255;
          5: x[i] = (mat(sd, four, 1, i) < 0) ? 255 : -256;
          default: ;
        endcase
      end
      for (int i = 0; i < 4; i++) begin
        a[i] = four ? x[i] : x[i] + x[7-i];
        b[i] = four ? x[7-i] : x[i] - x[7-i];
      end
      mode.std = std_e'(sd);
      mode.four_pt = four;
      for (int w = 0; w < 10; w++) de[w] = WW'(even_word(sd == 3 ? 0 : sd, four, a, w));
      for (int w = 0; w < 8; w++) do_w[w] = WO'(odd_word(sd == 3 ? 0 : sd, four, b, w));
      #1;
      for (int k = 0; k < 4; k++) begin
        automatic longint ee = ref1d(sd, four, IN_W, OUT_W, x, four ? k : 2 * k);
        automatic longint eo = ref1d(sd, four, IN_W, OUT_W, x, four ? 4 + k : 2 * k + 1);
        checks += 2;
        if (longint'(ze[k]) != ee || longint'(zo[k]) != eo) begin
          failures++;
          if (failures < 10)
            $display("mode %0d/%0d k %0d: ze %0d exp %0d, zo %0d exp %0d", sd, four, k, ze[k], ee, zo[k], eo);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
