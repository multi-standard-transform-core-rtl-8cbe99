// tb_csda_even: drives the even-part CSDA with random inputs and a random
// mode on every clock and checks, two clocks later, all ten DA words and the
// delayed mode against the words' definitions.
module tb_csda_even;
  import csda_pkg::*;
  import csda_words_pkg::*;

  localparam int DW = 10;
  localparam int WW = DW + 3 + FRAC;

  logic                 clk = 0;
  logic                 rst;
  mode_t                mode_i, mode_o;
  logic signed [DW-1:0] a [4];
  logic signed [WW-1:0] de [10];
  int checks = 0, failures = 0;

  longint hist_a [$][4];
  mode_t  hist_m [$];

  csda_even #(.DW(DW)) dut (.clk(clk), .rst(rst), .mode_i(mode_i), .a(a),
                            .mode_o(mode_o), .de(de));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1;
    mode_i = '{std: STD_H264, four_pt: 1'b0};
    foreach (a[i]) a[i] = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int it = 0; it < 1200; it++) begin
      longint av [4];
      @(negedge clk);
      // Compare the outputs of the row presented two clocks ago.
      if (hist_m.size() == 2) begin
        longint pa [4];
        mode_t  pm;
        pa = hist_a[0]; hist_a.delete(0);
        pm = hist_m.pop_front();
        checks++;
        if (mode_o !== pm) failures++;
        for (int w = 0; w < 10; w++) begin
          automatic longint e = even_word(int'(pm.std) == 3 ? 0 : int'(pm.std), pm.four_pt, pa, w);
          checks++;
          if (longint'(de[w]) != e) begin
            failures++;
            if (failures < 10) $display("mode %0d/%0d word %0d got %0d exp %0d", pm.std, pm.four_pt, w, de[w], e);
          end
        end
      end
      mode_i.std     = std_e'($urandom_range(0, 3));
      mode_i.four_pt = 1'($urandom);
      for (int i = 0; i < 4; i++) begin
        a[i] = DW'($urandom);
        if (it % 50 == 7) a[i] = (i % 2) ? 10'sd511 : -10'sd512;
        av[i] = longint'(a[i]);
      end
      hist_a.push_back(av);
      hist_m.push_back(mode_i);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
