// cmac_correlator: a time-division-multiplexed cross-correlator built from
// DSP-packed complex multiply-accumulate cells.
//
// What it does: NB*M signal inputs (for the default 32 blocks of M = 32
// inputs, i.e. 512 dual-polarisation stations) arrive as a stream of M
// complex samples per word, block by block and time sample by time sample.
// For every pair of inputs (p, q) the correlator forms the visibility
//     V(p, q) = sum over t of x_q(t) * conj(x_p(t))
// over a frame of T samples.
//
// Structure: tdm_cache (double-buffered frame store) -> array_driver (slot
// sequencer) -> a fold network -> cmac_array (M x (M+1) CMACs, each two DSP
// slices) -> readout. While one frame is replayed from one bank, the next
// frame is written into the other.
//
// Slots: in an off-diagonal slot the cache delivers block i (X, row port)
// and block j > i (Y, column port); cell (r, k), k < M, computes
// V(iM + r, jM + k) and the extra column M idles. In a diagonal slot it
// delivers blocks i and j = i+1; the fold network puts X on the lower
// triangle (k <= r: V(iM + r, iM + k)) and Y, mirrored, on the upper one
// (k > r: V(jM + M-1-r, jM + M-k)). An M x (M+1) grid holds exactly two
// such triangles, so two blocks' self-correlations share one slot and a
// frame takes NB*(NB-1)/2 + ceil(NB/2) slots (512 for NB = 32).
//
// Interface: in_valid/in_re/in_im take one word of M samples per cycle.
// Results leave one array column per cycle: while out_valid is high,
// out_re/out_im[r] is cell (r, out_col) of the slot tagged out_diag,
// out_row_blk (i) and out_col_blk (j), to be read with the mapping above.
// overrun pulses when a frame completes while the previous one is still
// being replayed (its bank will be overwritten); dropped pulses when the
// driver has to skip such a frame.
//
// Timing: writing a frame takes NB*T words, replaying it takes T cycles
// per slot, so in real time the array clock must be the number of slots
// times the per-input sample rate. The first result column of a slot leaves
// 7 cycles after the slot's last read is issued (1 cache, 5 CMAC, 1 load),
// T + 6 cycles after busy rises. T must be at least M + 1.
//
// The CMAC, the M x (M+1) array size and the slot count follow the
// published design; the fold wiring, the frame format, the cache and the readout
// are this design's choices.
module cmac_correlator #(
  parameter int unsigned M     = 32,   // matrix size: inputs per block, array is M x (M+1)
  parameter int unsigned NB    = 32,   // station blocks (stations per row, D)
  parameter int unsigned T     = 64,   // samples integrated per frame and slot
  parameter int unsigned W     = 9,    // sample component width
  parameter int unsigned ACC_W = 27    // accumulator width
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      in_valid,
  input  logic signed [W-1:0]       in_re [M],
  input  logic signed [W-1:0]       in_im [M],
  output logic                      out_valid,
  output logic [$clog2(NB)-1:0]     out_row_blk,
  output logic [$clog2(NB)-1:0]     out_col_blk,
  output logic                      out_diag,
  output logic [$clog2(M+2)-1:0]    out_col,
  output logic signed [ACC_W-1:0]   out_re [M],
  output logic signed [ACC_W-1:0]   out_im [M],
  output logic                      busy,
  output logic                      frame_done,
  output logic                      overrun,
  output logic                      dropped
);

  initial assert (T >= M + 1) else $error("cmac_correlator: T must be at least M + 1");

  logic                  frame_ready, ready_bank;
  logic                  rd_en, rd_bank, rd_valid;
  logic [$clog2(NB)-1:0] rd_row_blk, rd_col_blk;
  logic [$clog2(T)-1:0]  rd_t;
  logic signed [W-1:0]   row_re [M], row_im [M], col_re [M], col_im [M];
  logic                  arr_en, arr_first, arr_last, arr_diag;
  logic [$clog2(NB)-1:0] arr_row_blk, arr_col_blk;

  tdm_cache #(.M(M), .NB(NB), .T(T), .W(W)) u_cache (
    .clk, .rst,
    .in_valid, .in_re, .in_im,
    .frame_ready, .ready_bank, .overrun,
    .rd_busy(busy), .rd_en, .rd_bank, .rd_row_blk, .rd_col_blk, .rd_t,
    .rd_valid, .row_re, .row_im, .col_re, .col_im
  );

  array_driver #(.NB(NB), .T(T)) u_driver (
    .clk, .rst,
    .frame_ready, .ready_bank, .busy, .dropped, .frame_done,
    .rd_en, .rd_bank, .rd_row_blk, .rd_col_blk, .rd_t,
    .arr_en, .arr_first, .arr_last, .arr_diag, .arr_row_blk, .arr_col_blk
  );

  // fold network: which samples each triangle of the array sees
  logic signed [W-1:0] col_lo_re [M+1], col_lo_im [M+1], col_hi_re [M+1], col_hi_im [M+1];
  logic signed [W-1:0] row_lo_re [M],   row_lo_im [M],   row_hi_re [M],   row_hi_im [M];

  always_comb begin
    for (int k = 0; k <= M; k++) begin
      // lower triangle (k <= r < M): block i in a diagonal slot, else block j
      if (k < M) begin
        col_lo_re[k] = arr_diag ? row_re[k] : col_re[k];
        col_lo_im[k] = arr_diag ? row_im[k] : col_im[k];
      end else begin
        col_lo_re[k] = '0;
        col_lo_im[k] = '0;
      end
      // upper triangle (k > r): block j mirrored in a diagonal slot
      if (k == 0) begin
        col_hi_re[k] = '0;
        col_hi_im[k] = '0;
      end else if (arr_diag) begin
        col_hi_re[k] = col_re[M - k];
        col_hi_im[k] = col_im[M - k];
      end else if (k < M) begin
        col_hi_re[k] = col_re[k];
        col_hi_im[k] = col_im[k];
      end else begin
        col_hi_re[k] = '0;   // column M idles in off-diagonal slots
        col_hi_im[k] = '0;
      end
    end
    for (int r = 0; r < M; r++) begin
      row_lo_re[r] = row_re[r];
      row_lo_im[r] = row_im[r];
      row_hi_re[r] = arr_diag ? col_re[M - 1 - r] : row_re[r];
      row_hi_im[r] = arr_diag ? col_im[M - 1 - r] : row_im[r];
    end
  end

  cmac_array #(.ROWS(M), .COLS(M + 1), .W(W), .ACC_W(ACC_W)) u_array (
    .clk, .rst,
    .en(arr_en), .first(arr_first), .last(arr_last),
    .col_lo_re, .col_lo_im, .col_hi_re, .col_hi_im,
    .row_lo_re, .row_lo_im, .row_hi_re, .row_hi_im,
    .out_valid, .out_col, .out_re, .out_im
  );

  // slot tag: remembered when the slot's last sample enters the array, and
  // held through the readout (the next slot ends T > M cycles later)
  logic [$clog2(NB)-1:0] tag_row_q, tag_col_q, hold_row_q, hold_col_q;
  logic                  tag_diag_q, hold_diag_q;
  logic                  out_start;

  assign out_start = out_valid && out_col == '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      tag_row_q  <= '0;
      tag_col_q  <= '0;
      hold_row_q <= '0;
      hold_col_q <= '0;
      tag_diag_q  <= 1'b0;
      hold_diag_q <= 1'b0;
    end else begin
      if (arr_en && arr_last) begin
        tag_row_q  <= arr_row_blk;
        tag_col_q  <= arr_col_blk;
        tag_diag_q <= arr_diag;
      end
      if (out_start) begin
        hold_row_q  <= tag_row_q;
        hold_col_q  <= tag_col_q;
        hold_diag_q <= tag_diag_q;
      end
    end
  end

  assign out_row_blk = out_start ? tag_row_q : hold_row_q;
  assign out_col_blk = out_start ? tag_col_q : hold_col_q;
  assign out_diag    = out_start ? tag_diag_q : hold_diag_q;

  a_data_aligned: assert property (@(posedge clk) disable iff (rst) arr_en |-> rd_valid)
    else $error("cmac_correlator: array fed without cache data");

endmodule
