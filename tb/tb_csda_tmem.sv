// tb_csda_tmem: writes random 8x8 blocks into the transpose memory, some
// back to back (the next block overwriting the one being read), some with
// idle clocks between rows, with SelTX chosen per block, and checks every
// line read out (columns when transposing, rows otherwise), its tag and its
// clock (line t two clocks plus t after the block's last row).
module tb_csda_tmem;
  localparam int W = 12;
  localparam int N = 8;

  logic                clk = 0;
  logic                rst;
  logic                in_valid;
  logic                sel_tx;
  logic [2:0]          tag_i;
  logic signed [W-1:0] din [N];
  logic                out_valid;
  logic [2:0]          tag_o;
  logic signed [W-1:0] dout [N];
  int checks = 0, failures = 0;
  int cyc = 0;
  int n_b2b = 0, n_gap = 0, n_tx = 0, n_notx = 0;

  typedef struct {
    int d [N][N];
    bit tx;
    int tag;
    int last;
  } blk_t;
  blk_t done_q [$];
  int   line = 0;

  csda_tmem #(.W(W), .N(N), .TAG_W(3)) dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .sel_tx(sel_tx), .tag_i(tag_i),
    .din(din), .out_valid(out_valid), .tag_o(tag_o), .dout(dout));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (!rst && out_valid) begin
      if (done_q.size() == 0) begin
        failures++;
        $display("unexpected line at cycle %0d", cyc);
      end else begin
        blk_t b;
        b = done_q[0];
        checks++;
        if (cyc != b.last + 2 + line) begin
          failures++;
          $display("line %0d at cycle %0d, expected %0d", line, cyc, b.last + 2 + line);
        end
        checks++;
        if (int'(tag_o) != b.tag) failures++;
        for (int i = 0; i < N; i++) begin
          automatic int e = b.tx ? b.d[i][line] : b.d[line][i];
          checks++;
          if (int'(dout[i]) != e) begin
            failures++;
            if (failures < 10) $display("tx %0d line %0d word %0d = %0d, expected %0d", b.tx, line, i, dout[i], e);
          end
        end
        if (line == N - 1) begin
          line = 0;
          done_q.delete(0);
        end else line++;
      end
    end
  end

  initial begin
    rst = 1;
    in_valid = 0;
    sel_tx = 0;
    tag_i = 0;
    foreach (din[i]) din[i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int blk = 0; blk < 300; blk++) begin
      blk_t b;
      bit   gaps;
      gaps  = (blk % 3 == 2);
      b.tx  = (blk % 5 != 4) ? 1'b1 : 1'b0;
      if (blk % 7 == 3) b.tx = 1'b0;
      b.tag = $urandom_range(0, 7);
      if (gaps) n_gap++; else n_b2b++;
      if (b.tx) n_tx++; else n_notx++;
      for (int r = 0; r < N; r++) begin
        while (gaps && $urandom_range(0, 2) == 0) begin
          in_valid = 0;
          @(negedge clk);
        end
        in_valid = 1;
        sel_tx = b.tx;
        tag_i = 3'(b.tag);
        for (int i = 0; i < N; i++) begin
          din[i] = W'($urandom);
          b.d[r][i] = int'(din[i]);
        end
        b.last = cyc;
        @(negedge clk);
        // sel_tx and tag only matter with the last row: scramble them before.
        sel_tx = 1'($urandom);
        tag_i = 3'($urandom);
      end
      done_q.push_back(b);
      in_valid = 0;
    end
    repeat (20) @(negedge clk);
    checks++;
    if (done_q.size() != 0) begin failures++; $display("%0d blocks not read", done_q.size()); end
    checks += 4;
    if (n_b2b == 0) failures++;
    if (n_gap == 0) failures++;
    if (n_tx == 0) failures++;
    if (n_notx == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
