// tb_cinema_frame: streams one 4928 x 2048 frame (digital cinema format at
// 24 Hz) through the 2-D core as 8x8 blocks in raster order, rows back to
// back with no idle clock, and checks every result against the reference
// 2-D transform. It also checks the throughput: the whole frame must leave
// the core in (frame samples / 8) clocks plus the 13-clock pipeline latency,
// i.e. 8 samples per clock. Sample values are a deterministic pattern: a
// smooth gradient plus a pseudo-random term, limited to the 9-bit range.
// The standard and size cycle through all six modes from one block row
// (a band of 8 frame lines) to the next.
module tb_cinema_frame;
  import csda_ref_pkg::*;

  localparam int FW = 4928;
  localparam int FH = 2048;
  localparam int NBX = FW / 8;
  localparam int NBY = FH / 8;
  localparam longint NROWS = longint'(FW) * FH / 8;

  logic              Clk = 0;
  logic              Reset;
  logic              S;
  logic [1:0]        Std;
  logic              SelTX;
  logic              InValid;
  logic signed [8:0] X [8];
  logic              OutValid;
  logic signed [13:0] Out [8];
  int checks = 0, failures = 0;
  longint cyc = 0;
  longint first_in = -1, last_out = 0, lines_out = 0;

  int mat_c [6][8][8];
  int sh1 [6];
  int sh2 [6];

  typedef struct {
    longint res [8][8];
  } blk_t;
  blk_t   exp_q [$];
  int     line = 0;

  csda_mst_2d dut (
    .Clk(Clk), .Reset(Reset), .S(S), .Std(Std), .SelTX(SelTX),
    .InValid(InValid), .X(X), .OutValid(OutValid), .Out(Out));

  always #5 Clk = ~Clk;
  always @(posedge Clk) cyc <= cyc + 1;

  initial begin
    repeat (NROWS + 1000) @(posedge Clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint rnd_sat(longint y, int s, int w);
    longint hi = (longint'(1) << (w - 1)) - 1;
    longint lo = -(longint'(1) << (w - 1));
    if (s > 0) y = (y + (longint'(1) << (s - 1))) >>> s;
    return (y > hi) ? hi : (y < lo) ? lo : y;
  endfunction

  function automatic int pix(int px, int py);
    int v = ((px * 3 + py * 5) % 400) - 200 + int'($urandom_range(0, 110)) - 55;
    return (v > 255) ? 255 : (v < -256) ? -256 : v;
  endfunction

  always @(negedge Clk) begin
    if (!Reset && OutValid) begin
      lines_out++;
      last_out = cyc;
      if (exp_q.size() == 0) failures++;
      else begin
        for (int i = 0; i < 8; i++) begin
          checks++;
          if (longint'(Out[i]) != exp_q[0].res[line][i]) begin
            failures++;
            if (failures < 10) $display("line %0d Out%0d = %0d, expected %0d", line, i, Out[i], exp_q[0].res[line][i]);
          end
        end
        if (line == 7) begin line = 0; exp_q.delete(0); end
        else line++;
      end
    end
  end

  initial begin
    for (int m = 0; m < 6; m++) begin
      for (int r = 0; r < 8; r++)
        for (int n = 0; n < 8; n++) mat_c[m][r][n] = mat(m / 2, 1'(m), r, n);
      sh1[m] = rshift(m / 2, 1'(m), 9, 12);
      sh2[m] = rshift(m / 2, 1'(m), 12, 14);
    end
    Reset = 1;
    InValid = 0;
    S = 0; Std = 0; SelTX = 1;
    foreach (X[i]) X[i] = '0;
    repeat (3) @(posedge Clk);
    @(negedge Clk);
    Reset = 0;
    for (int by = 0; by < NBY; by++) begin
      automatic int m = by % 6;
      for (int bx = 0; bx < NBX; bx++) begin
        blk_t   b;
        longint xin [8][8];
        longint y1  [8][8];
        for (int r = 0; r < 8; r++) begin
          InValid = 1;
          Std = 2'(m / 2);
          S = 1'(m);
          for (int i = 0; i < 8; i++) begin
            xin[r][i] = pix(bx * 8 + i, by * 8 + r);
            X[i] = 9'(xin[r][i]);
          end
          if (first_in < 0) first_in = cyc;
          @(negedge Clk);
        end
        for (int r = 0; r < 8; r++)
          for (int k = 0; k < 8; k++) begin
            automatic longint y = 0;
            for (int n = 0; n < 8; n++) y += mat_c[m][k][n] * xin[r][n];
            y1[r][k] = rnd_sat(y, sh1[m], 12);
          end
        for (int t = 0; t < 8; t++)
          for (int k = 0; k < 8; k++) begin
            automatic longint y = 0;
            for (int n = 0; n < 8; n++) y += mat_c[m][k][n] * y1[n][t];
            b.res[t][k] = rnd_sat(y, sh2[m], 14);
          end
        exp_q.push_back(b);
      end
    end
    InValid = 0;
    repeat (30) @(negedge Clk);
    checks++;
    if (lines_out != NROWS) begin failures++; $display("%0d lines out, expected %0d", lines_out, NROWS); end
    checks++;
    if (last_out - first_in + 1 != NROWS + 13) begin
      failures++;
      $display("frame took %0d clocks, expected %0d", last_out - first_in + 1, NROWS + 13);
    end
    $display("frame %0dx%0d: %0d clocks from first row in to last line out (%0d samples)",
             FW, FH, last_out - first_in + 1, longint'(FW) * FH);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
