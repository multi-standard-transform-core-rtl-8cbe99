// csda_tmem: transpose memory (TMEM) between the two 1-D cores.
//
// An N x N array of W-bit registers (64 words of 12 bits by default) with one
// write port and one read port, each N words wide. Rows of a block are
// written one per valid cycle; once the N-th row is in, the block is read out
// one line per clock for N clocks. With sel_tx = 1 the lines read are the
// columns of the block (transposition); with sel_tx = 0 they are its rows, in
// the order written.
//
// A single array serves back-to-back blocks without stalls: each block is
// written into the lines the previous block is being read from (read before
// write in the same clock), so the storage orientation alternates between
// row-wise and column-wise from block to block when transposing. The next
// block's row t is never written before the previous block's line t has been
// read, because reading starts right after the last write and advances one
// line per clock.
//
// A tag (the transform mode) is captured with each block's last row and
// returned with its lines. sel_tx is sampled with the last row too.
// Timing: line 0 of a block appears on dout two clock edges after its last
// row is presented (output registered), lines 1..N-1 on the following clocks.
// Reset: synchronous, active high; the array itself is not reset.
//
// The 64 x 12-bit size follows the published transpose memory. Its
// scheduling (the original quotes a 52-cycle latency) is not described, so
// the in-place alternating scheme and the 2-clock read-out are this design's.
module csda_tmem #(
  parameter int W     = 12,
  parameter int N     = 8,
  parameter int TAG_W = 3
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic                sel_tx,
  input  logic [TAG_W-1:0]    tag_i,
  input  logic signed [W-1:0] din  [N],
  output logic                out_valid,
  output logic [TAG_W-1:0]    tag_o,
  output logic signed [W-1:0] dout [N]
);

  localparam int CW = $clog2(N);

  logic signed [W-1:0] mem [N][N];

  logic [CW-1:0]    wr_cnt;
  logic             wr_dir;     // 0: row t -> mem[t][*], 1: row t -> mem[*][t]
  logic             rd_active;
  logic [CW-1:0]    rd_cnt;
  logic             rd_dir;     // 0: read mem[t][*], 1: read mem[*][t]
  logic [TAG_W-1:0] rd_tag;
  logic             blk_done;
  logic             nxt_dir;

  assign blk_done = in_valid && (wr_cnt == CW'(N - 1));
  // Line orientation the finished block is read in, and hence the one the
  // next block is written in.
  assign nxt_dir  = sel_tx ? !wr_dir : wr_dir;

  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int i = 0; i < N; i++) begin
        if (wr_dir) mem[i][wr_cnt] <= din[i];
        else        mem[wr_cnt][i] <= din[i];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_cnt    <= '0;
      wr_dir    <= 1'b0;
      rd_active <= 1'b0;
      rd_cnt    <= '0;
      rd_dir    <= 1'b0;
      rd_tag    <= '0;
    end else begin
      if (in_valid) wr_cnt <= (wr_cnt == CW'(N - 1)) ? '0 : wr_cnt + 1'b1;
      if (blk_done) begin
        wr_dir    <= nxt_dir;
        rd_dir    <= nxt_dir;
        rd_tag    <= tag_i;
        rd_active <= 1'b1;
        rd_cnt    <= '0;
      end else if (rd_active) begin
        rd_cnt <= rd_cnt + 1'b1;
        if (rd_cnt == CW'(N - 1)) rd_active <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      tag_o     <= '0;
      for (int i = 0; i < N; i++) dout[i] <= '0;
    end else begin
      out_valid <= rd_active;
      tag_o     <= rd_tag;
      for (int i = 0; i < N; i++)
        dout[i] <= rd_dir ? mem[i][rd_cnt] : mem[rd_cnt][i];
    end
  end

  // A block may only complete once the previous one has been read to its
  // last line (guaranteed by the one-row-per-clock input rate).
  a_no_overrun: assert property (@(posedge clk) disable iff (rst)
    blk_done && rd_active |-> rd_cnt == CW'(N - 1));

endmodule
