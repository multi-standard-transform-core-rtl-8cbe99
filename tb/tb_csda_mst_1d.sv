// tb_csda_mst_1d: streams random rows through a 1-D core, one per clock with
// occasional idle clocks, changing the mode on any row, and checks every
// output row against the reference matrix product and the two-clock latency.
// Runs with the core-1 sizes (9-bit in, 12-bit out) by default; the core-2
// sizes are covered by the 2-D testbench.
module tb_csda_mst_1d;
  import csda_pkg::*;
  import csda_ref_pkg::*;

  localparam int IN_W  = 9;
  localparam int OUT_W = 12;
  localparam int LAT   = 2;

  logic                    clk = 0;
  logic                    rst;
  logic                    in_valid;
  mode_t                   mode;
  logic signed [IN_W-1:0]  x [8];
  logic                    out_valid;
  mode_t                   out_mode;
  logic signed [OUT_W-1:0] t [8];
  int checks = 0, failures = 0;
  int cyc = 0;
  int mode_seen [8];

  typedef struct {
    longint v [8];
    int     sd;
    bit     four;
    int     cyc;
  } row_t;
  row_t exp_q [$];

  csda_mst_1d #(.IN_W(IN_W), .OUT_W(OUT_W)) dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .mode(mode), .x(x),
    .out_valid(out_valid), .out_mode(out_mode), .t(t));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Checker: sample outputs just before each rising edge.
  always @(negedge clk) begin
    if (!rst && out_valid) begin
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected output at cycle %0d", cyc);
      end else begin
        row_t r;
        r = exp_q[0];
        exp_q.delete(0);
        checks++;
        if (cyc - r.cyc != LAT) begin
          failures++;
          $display("latency %0d, expected %0d", cyc - r.cyc, LAT);
        end
        checks++;
        if (int'(out_mode.std) != r.sd || out_mode.four_pt != r.four) failures++;
        for (int k = 0; k < 8; k++) begin
          automatic longint e = ref1d(r.sd, r.four, IN_W, OUT_W, r.v, k);
          checks++;
          if (longint'(t[k]) != e) begin
            failures++;
            if (failures < 10) $display("mode %0d/%0d T%0d = %0d, expected %0d", r.sd, r.four, k, t[k], e);
          end
        end
      end
    end
  end

  initial begin
    rst = 1;
    in_valid = 0;
    mode = '{std: STD_H264, four_pt: 1'b0};
    foreach (x[i]) x[i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int it = 0; it < 3000; it++) begin
      row_t r;
      @(negedge clk);
      in_valid = ($urandom_range(0, 9) != 0);
      r.sd   = $urandom_range(0, 2);
      r.four = 1'($urandom);
      mode.std = std_e'(r.sd);
      mode.four_pt = r.four;
      for (int i = 0; i < 8; i++) begin
        x[i] = IN_W'($urandom);
        if (it % 31 == 3) x[i] = (i % 2) ? 9'sd255 : -9'sd256;
        if (it % 31 == 4) x[i] = -9'sd256;
        r.v[i] = longint'(x[i]);
      end
      r.cyc = cyc;
      if (in_valid) begin
        exp_q.push_back(r);
        mode_seen[{r.sd[1:0], r.four}]++;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    // Every mode must have been exercised.
    for (int sd = 0; sd < 3; sd++)
      for (int f = 0; f < 2; f++) begin
        checks++;
        if (mode_seen[sd * 2 + f] == 0) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
