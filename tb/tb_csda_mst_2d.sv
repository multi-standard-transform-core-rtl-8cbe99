// tb_csda_mst_2d: end-to-end test of the 2-D CSDA-MST core at its default
// sizes (9-bit samples, 12-bit transpose memory, 14-bit results).
//
// Sends 8x8 blocks of random and extreme samples, with the standard, the
// size (S) and SelTX chosen per block, some blocks back to back and some
// with idle clocks between rows. The expected result is computed
// independently: the reference 1-D transform of every row, a transposition
// (when SelTX = 1), and the reference 1-D transform of every line. Each
// output line is checked for value and clock (line t of a block leaves
// 6 + t clocks after the block's last row; 13 + t after its first row when
// the rows are consecutive). The test also counts how often each mechanism
// happened (each standard and size, both SelTX values, back-to-back blocks
// overwriting the block being read, idle input clocks, a mode change
// between consecutive blocks) and fails if one never did.
module tb_csda_mst_2d;
  import csda_ref_pkg::*;

  localparam int IN_W  = 9;
  localparam int MID_W = 12;
  localparam int OUT_W = 14;
  localparam int NBLK  = 240;

  logic                    Clk = 0;
  logic                    Reset;
  logic                    S;
  logic [1:0]              Std;
  logic                    SelTX;
  logic                    InValid;
  logic signed [IN_W-1:0]  X [8];
  logic                    OutValid;
  logic signed [OUT_W-1:0] Out [8];
  int checks = 0, failures = 0;
  int cyc = 0;

  int n_mode [6];
  int n_tx = 0, n_notx = 0, n_b2b = 0, n_gap = 0, n_switch = 0, n_first_lat = 0;

  typedef struct {
    longint res [8][8];   // expected output line t, word i
    int     id;
    int     last;         // clock of the last row
  } blk_t;
  blk_t done_q [$];
  int   line = 0;

  csda_mst_2d dut (
    .Clk(Clk), .Reset(Reset), .S(S), .Std(Std), .SelTX(SelTX),
    .InValid(InValid), .X(X), .OutValid(OutValid), .Out(Out));

  always #5 Clk = ~Clk;
  always @(posedge Clk) cyc <= cyc + 1;

  initial begin
    repeat (NBLK * 40 + 1000) @(posedge Clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge Clk) begin
    if (!Reset && OutValid) begin
      if (done_q.size() == 0) begin
        failures++;
        $display("unexpected output at cycle %0d", cyc);
      end else begin
        checks++;
        if (cyc != done_q[0].last + 6 + line) begin
          failures++;
          $display("line %0d at cycle %0d, expected %0d", line, cyc, done_q[0].last + 6 + line);
        end
        for (int i = 0; i < 8; i++) begin
          checks++;
          if (longint'(Out[i]) != done_q[0].res[line][i]) begin
            failures++;
            if (failures < 10)
              $display("blk %0d line %0d Out%0d = %0d, expected %0d", done_q[0].id, line, i, Out[i], done_q[0].res[line][i]);
          end
        end
        if (line == 7) begin
          line = 0;
          done_q.delete(0);
        end else line++;
      end
    end
  end

  initial begin
    int prev_mode = -1;
    Reset = 1;
    InValid = 0;
    S = 0;
    Std = 0;
    SelTX = 1;
    foreach (X[i]) X[i] = '0;
    repeat (3) @(posedge Clk);
    @(negedge Clk);
    Reset = 0;
    for (int blk = 0; blk < NBLK; blk++) begin
      blk_t   b;
      longint xin [8][8];
      longint y1  [8][8];
      longint ln  [8];
      int     sd, first;
      bit     four, tx, gaps;
      sd    = (blk < 6) ? blk / 2 : $urandom_range(0, 2);
      four  = (blk < 6) ? 1'(blk) : 1'($urandom);
      tx    = (blk % 9 != 5);
      gaps  = (blk % 4 == 3);
      if (blk > 10 && blk % 17 == 0) begin sd = prev_mode / 2; four = 1'(prev_mode); end
      n_mode[sd * 2 + 32'(four)]++;
      if (tx) n_tx++; else n_notx++;
      if (gaps) n_gap++; else n_b2b++;
      if (prev_mode >= 0 && prev_mode != sd * 2 + 32'(four)) n_switch++;
      prev_mode = sd * 2 + 32'(four);
      first = -1;
      for (int r = 0; r < 8; r++) begin
        while (gaps && $urandom_range(0, 2) == 0) begin
          InValid = 0;
          @(negedge Clk);
        end
        InValid = 1;
        S = four;
        Std = 2'(sd);
        SelTX = tx;
        for (int i = 0; i < 8; i++) begin
          X[i] = IN_W'($urandom);
          case (blk % 23)
            7:  X[i] = 9'sd255;
            8:  X[i] = -9'sd256;
            9:  X[i] = ((r + i) % 2) ? 9'sd255 : -9'sd256;
            default: ;
          endcase
          xin[r][i] = longint'(X[i]);
        end
        if (first < 0) first = cyc;
        b.last = cyc;
        @(negedge Clk);
      end
      InValid = 0;
      if (b.last - first == 7) n_first_lat++;
      // Reference: rows, optional transposition, lines.
      for (int r = 0; r < 8; r++) begin
        for (int i = 0; i < 8; i++) ln[i] = xin[r][i];
        for (int k = 0; k < 8; k++) y1[r][k] = ref1d(sd, four, IN_W, MID_W, ln, k);
      end
      for (int t = 0; t < 8; t++) begin
        for (int i = 0; i < 8; i++) ln[i] = tx ? y1[i][t] : y1[t][i];
        for (int k = 0; k < 8; k++) b.res[t][k] = ref1d(sd, four, MID_W, OUT_W, ln, k);
      end
      b.id = blk * 100 + sd * 10 + 32'(four) * 2 + 32'(tx);
      done_q.push_back(b);
    end
    repeat (30) @(negedge Clk);
    checks++;
    if (done_q.size() != 0) begin failures++; $display("%0d blocks not delivered", done_q.size()); end
    for (int m = 0; m < 6; m++) begin
      checks++;
      if (n_mode[m] == 0) begin failures++; $display("mode %0d never used", m); end
    end
    checks += 6;
    if (n_tx == 0)        failures++;
    if (n_notx == 0)      failures++;
    if (n_b2b == 0)       failures++;
    if (n_gap == 0)       failures++;
    if (n_switch == 0)    failures++;
    if (n_first_lat == 0) failures++;
    $display("mechanisms: modes %0d %0d %0d %0d %0d %0d, seltx1 %0d, seltx0 %0d, back-to-back %0d, gaps %0d, mode switches %0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_mode[4], n_mode[5],
             n_tx, n_notx, n_b2b, n_gap, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
