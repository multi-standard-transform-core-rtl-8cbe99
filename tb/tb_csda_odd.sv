// tb_csda_odd: drives the odd-part CSDA with random inputs and a random mode
// on every clock and checks, two clocks later, the eight words against their
// definitions (gain * b_n and b_n).
module tb_csda_odd;
  import csda_pkg::*;
  import csda_words_pkg::*;

  localparam int DW = 10;
  localparam int WO = DW + 2 + FRAC;

  logic                 clk = 0;
  logic                 rst;
  mode_t                mode_i;
  logic signed [DW-1:0] b [4];
  logic signed [WO-1:0] do_w [8];
  int checks = 0, failures = 0;

  longint hist_b [$][4];
  mode_t  hist_m [$];

  csda_odd #(.DW(DW)) dut (.clk(clk), .rst(rst), .mode_i(mode_i), .b(b), .do_w(do_w));

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
    foreach (b[i]) b[i] = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int it = 0; it < 1200; it++) begin
      longint bv [4];
      @(negedge clk);
      if (hist_m.size() == 2) begin
        longint pb [4];
        mode_t  pm;
        pb = hist_b[0]; hist_b.delete(0);
        pm = hist_m.pop_front();
        for (int w = 0; w < 8; w++) begin
          automatic longint e = odd_word(int'(pm.std) == 3 ? 0 : int'(pm.std), pm.four_pt, pb, w);
          checks++;
          if (longint'(do_w[w]) != e) begin
            failures++;
            if (failures < 10) $display("mode %0d/%0d word %0d got %0d exp %0d", pm.std, pm.four_pt, w, do_w[w], e);
          end
        end
      end
      mode_i.std     = std_e'($urandom_range(0, 3));
      mode_i.four_pt = 1'($urandom);
      for (int i = 0; i < 4; i++) begin
        b[i] = DW'($urandom);
        if (it % 50 == 7) b[i] = (i % 2) ? 10'sd511 : -10'sd512;
        bv[i] = longint'(b[i]);
      end
      hist_b.push_back(bv);
      hist_m.push_back(mode_i);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
