// tdm_cache: double-buffered sample store that lets the CMAC array replay a
// frame of station samples once for every pair of station blocks.
//
// What it does: the input is a stream of M complex samples per word, one
// word per station block and time sample, in the order
//     for t in 0..T-1: for blk in 0..NB-1: word(blk, t).
// A frame is NB*T words. The cache writes a frame into one of two banks; when
// the frame is complete it raises frame_ready for one cycle with the number
// of that bank and switches writing to the other bank. Meanwhile the reader
// (the array driver) reads the completed bank through two read ports, one
// for the block on the array's rows and one for the block on its columns,
// both at the same time index.
//
// Timing: one word written per cycle when in_valid is high. Reads are
// synchronous: the address presented with rd_en on cycle t gives data and
// rd_valid on cycle t+1. If a frame completes while the reader still reports
// rd_busy, the next frame will overwrite the bank being read; overrun pulses
// to say so (nothing is stopped).
//
// Each word is stored as {im, re} per input, M inputs wide. The double
// buffering, the word order and the two read ports are this design's
// choices; the published design names a TDM cache built from block RAM and gives
// only its size in BRAM36 blocks.
module tdm_cache #(
  parameter int unsigned M  = 32,   // inputs per station block (matrix size)
  parameter int unsigned NB = 32,   // station blocks (stations per row, D)
  parameter int unsigned T  = 64,   // time samples per frame
  parameter int unsigned W  = 9     // sample component width
) (
  input  logic                      clk,
  input  logic                      rst,
  // write side
  input  logic                      in_valid,
  input  logic signed [W-1:0]       in_re [M],
  input  logic signed [W-1:0]       in_im [M],
  output logic                      frame_ready,
  output logic                      ready_bank,
  output logic                      overrun,
  // read side
  input  logic                      rd_busy,
  input  logic                      rd_en,
  input  logic                      rd_bank,
  input  logic [$clog2(NB)-1:0]     rd_row_blk,
  input  logic [$clog2(NB)-1:0]     rd_col_blk,
  input  logic [$clog2(T)-1:0]      rd_t,
  output logic                      rd_valid,
  output logic signed [W-1:0]       row_re [M],
  output logic signed [W-1:0]       row_im [M],
  output logic signed [W-1:0]       col_re [M],
  output logic signed [W-1:0]       col_im [M]
);

  localparam int unsigned DEPTH  = NB * T;
  localparam int unsigned AW     = $clog2(DEPTH);
  localparam int unsigned WORD_W = 2 * W * M;

  typedef logic [WORD_W-1:0] word_t;

  word_t mem0 [DEPTH];
  word_t mem1 [DEPTH];

  // ---- write side ---------------------------------------------------------
  logic [$clog2(NB)-1:0] wr_blk;
  logic [$clog2(T)-1:0]  wr_t;
  logic                  wr_bank;
  word_t                 wr_word;
  logic [AW-1:0]         wr_addr;
  logic                  wr_frame_end;

  always_comb begin
    for (int i = 0; i < M; i++) begin
      wr_word[2*W*i +: W]     = in_re[i];
      wr_word[2*W*i + W +: W] = in_im[i];
    end
  end

  assign wr_addr      = AW'(wr_blk) * AW'(T) + AW'(wr_t);
  assign wr_frame_end = in_valid && 32'(wr_blk) == NB - 1 && 32'(wr_t) == T - 1;

  always_ff @(posedge clk) begin
    if (in_valid) begin
      if (wr_bank) mem1[wr_addr] <= wr_word;
      else         mem0[wr_addr] <= wr_word;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_blk      <= '0;
      wr_t        <= '0;
      wr_bank     <= 1'b0;
      frame_ready <= 1'b0;
      ready_bank  <= 1'b0;
      overrun     <= 1'b0;
    end else begin
      frame_ready <= wr_frame_end;
      overrun     <= wr_frame_end && rd_busy;
      if (wr_frame_end) ready_bank <= wr_bank;
      if (in_valid) begin
        if (32'(wr_blk) == NB - 1) begin
          wr_blk <= '0;
          if (32'(wr_t) == T - 1) begin
            wr_t    <= '0;
            wr_bank <= ~wr_bank;
          end else begin
            wr_t <= wr_t + 1'b1;
          end
        end else begin
          wr_blk <= wr_blk + 1'b1;
        end
      end
    end
  end

  // ---- read side ----------------------------------------------------------
  word_t         row_q, col_q;
  logic [AW-1:0] row_addr, col_addr;

  assign row_addr = AW'(rd_row_blk) * AW'(T) + AW'(rd_t);
  assign col_addr = AW'(rd_col_blk) * AW'(T) + AW'(rd_t);

  always_ff @(posedge clk) begin
    if (rd_en) begin
      row_q <= rd_bank ? mem1[row_addr] : mem0[row_addr];
      col_q <= rd_bank ? mem1[col_addr] : mem0[col_addr];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) rd_valid <= 1'b0;
    else     rd_valid <= rd_en;
  end

  always_comb begin
    for (int i = 0; i < M; i++) begin
      row_re[i] = row_q[2*W*i +: W];
      row_im[i] = row_q[2*W*i + W +: W];
      col_re[i] = col_q[2*W*i +: W];
      col_im[i] = col_q[2*W*i + W +: W];
    end
  end

endmodule
