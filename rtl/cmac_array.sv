// cmac_array: a ROWS x COLS grid of complex multiply-accumulate cells with a
// shift-out readout of the finished sums.
//
// What it does: every cell (r, k) accumulates col[k] * conj(row[r]) over a
// run of samples. Each row and each column has two broadcast buses, "lo" and
// "hi": a cell on or below the diagonal (k <= r) takes col_lo[k] and
// row_lo[r], a cell above it (k > r) takes col_hi[k] and row_hi[r]. With the
// same samples on both buses the grid is a plain cross-multiplier; with
// different samples its lower and upper triangles correlate two different
// sets of inputs at once, which is how an M x (M+1) grid handles two
// diagonal station blocks in one slot (see cmac_correlator). One cycle feeds
// ROWS*COLS products.
//
// When a run ends, the grid copies all its sums into a readout register per
// cell, in the same cycle in which it may already be accumulating the next
// run, and shifts them out one column per cycle: out_re/out_im[r] hold cell
// (r, out_col) while out_valid is high.
//
// Timing: the control inputs en/first/last qualify the samples of the same
// cycle. The sums of a run whose `last` sample entered on cycle t are loaded
// 6 cycles later (5 cycles of CMAC pipeline, 1 of load), and column k
// appears on cycle t + 6 + k. Runs must be at least COLS samples long so that
// one readout ends before the next begins; an assertion checks this.
//
// The grid of CMACs fed by row and column inputs and its M x (M+1) size
// follow the published design; the two-bus triangle split, the readout chain and the
// broadcast wiring without pipeline registers are this design's choices.
module cmac_array #(
  parameter int unsigned ROWS  = 32,
  parameter int unsigned COLS  = 33,
  parameter int unsigned W     = 9,
  parameter int unsigned ACC_W = 27
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,
  input  logic                    first,
  input  logic                    last,
  input  logic signed [W-1:0]     col_lo_re [COLS],   // for cells with k <= r
  input  logic signed [W-1:0]     col_lo_im [COLS],
  input  logic signed [W-1:0]     col_hi_re [COLS],   // for cells with k > r
  input  logic signed [W-1:0]     col_hi_im [COLS],
  input  logic signed [W-1:0]     row_lo_re [ROWS],
  input  logic signed [W-1:0]     row_lo_im [ROWS],
  input  logic signed [W-1:0]     row_hi_re [ROWS],
  input  logic signed [W-1:0]     row_hi_im [ROWS],
  output logic                    out_valid,
  output logic [$clog2(COLS+1)-1:0] out_col,
  output logic signed [ACC_W-1:0] out_re [ROWS],
  output logic signed [ACC_W-1:0] out_im [ROWS]
);

  logic signed [ACC_W-1:0] acc_re [ROWS][COLS];
  logic signed [ACC_W-1:0] acc_im [ROWS][COLS];
  logic                    done   [ROWS][COLS];
  logic signed [ACC_W-1:0] rd_re  [ROWS][COLS];
  logic signed [ACC_W-1:0] rd_im  [ROWS][COLS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar k = 0; k < COLS; k++) begin : g_col
      localparam bit LO = (k <= r);
      cmac #(.W(W), .ACC_W(ACC_W), .CONJ(1'b1)) u_cmac (
        .clk, .rst, .en, .first, .last,
        .a(LO ? col_lo_re[k] : col_hi_re[k]), .b(LO ? col_lo_im[k] : col_hi_im[k]),
        .c(LO ? row_lo_re[r] : row_hi_re[r]), .d(LO ? row_lo_im[r] : row_hi_im[r]),
        .acc_re(acc_re[r][k]), .acc_im(acc_im[r][k]), .acc_done(done[r][k]));

      // readout register: load the finished sum, otherwise shift towards
      // column 0
      always_ff @(posedge clk) begin
        if (done[r][k]) begin
          rd_re[r][k] <= acc_re[r][k];
          rd_im[r][k] <= acc_im[r][k];
        end else if (k + 1 < COLS) begin
          rd_re[r][k] <= rd_re[r][(k + 1) % COLS];
          rd_im[r][k] <= rd_im[r][(k + 1) % COLS];
        end
      end
    end
    assign out_re[r] = rd_re[r][0];
    assign out_im[r] = rd_im[r][0];
  end

  // every cell sees the same control, so cell (0,0) times the readout
  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_col   <= '0;
    end else if (done[0][0]) begin
      out_valid <= 1'b1;
      out_col   <= '0;
    end else if (out_valid) begin
      out_valid <= (32'(out_col) != COLS - 1);
      out_col   <= (32'(out_col) == COLS - 1) ? '0 : out_col + 1'b1;
    end
  end

  // a new sum may not arrive while the previous one is still shifting out
  property p_no_overlap;
    @(posedge clk) disable iff (rst)
      done[0][0] |-> (!out_valid || 32'(out_col) == COLS - 1);
  endproperty
  a_no_overlap: assert property (p_no_overlap)
    else $error("cmac_array: run shorter than COLS samples, readout overrun");

endmodule
