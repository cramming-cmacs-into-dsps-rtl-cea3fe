// array_driver: steps the CMAC array through the time-division-multiplexed
// (TDM) slots of one frame.
//
// What it does: a frame holds T time samples of NB station blocks. Each slot
// lasts T cycles, in which the driver reads time sample t = 0..T-1 of two
// blocks from the cache: one on the read port for the array's rows, one on
// the port for its columns. There are two kinds of slot:
//   * diagonal slots (arr_diag = 1) carry two blocks i and j = i+1 whose
//     correlations with themselves are wanted. The array's lower triangle
//     correlates block i with itself, its upper triangle block j with
//     itself. With NB odd, the last diagonal slot carries the last block on
//     both ports. There are ceil(NB/2) of them, taken first.
//   * off-diagonal slots carry blocks i < j and correlate all of block j
//     against all of block i: NB*(NB-1)/2 of them, row block outer.
// A frame thus takes NB*(NB-1)/2 + ceil(NB/2) slots: 512 for NB = 32.
// The first and last sample of each slot are flagged so that every CMAC
// clears its accumulator at the start of the slot and hands its sum over at
// the end.
//
// Interface: frame_ready/ready_bank from the cache start a frame; rd_* is
// the cache read address; arr_en/arr_first/arr_last, arr_diag and
// arr_row_blk/arr_col_blk are delayed by the cache's one-cycle read latency
// so that they line up with the cache's read data. busy is high while a
// frame is being replayed; a frame_ready arriving then is dropped and
// `dropped` pulses. frame_done pulses after the last read of a frame.
//
// Timing: one read per cycle, no gaps: a frame takes exactly T * slots
// cycles from the cycle after frame_ready. The slot counts follow the
// published design's table; the pairing of neighbouring blocks in diagonal slots,
// the slot order and the handling of a frame that arrives early are this
// design's choices.
module array_driver
  import cmac_pkg::*;
#(
  parameter int unsigned NB = 32,
  parameter int unsigned T  = 64
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  frame_ready,
  input  logic                  ready_bank,
  output logic                  busy,
  output logic                  dropped,
  output logic                  frame_done,
  // cache read address
  output logic                  rd_en,
  output logic                  rd_bank,
  output logic [$clog2(NB)-1:0] rd_row_blk,
  output logic [$clog2(NB)-1:0] rd_col_blk,
  output logic [$clog2(T)-1:0]  rd_t,
  // array control, aligned with the cache read data
  output logic                  arr_en,
  output logic                  arr_first,
  output logic                  arr_last,
  output logic                  arr_diag,
  output logic [$clog2(NB)-1:0] arr_row_blk,
  output logic [$clog2(NB)-1:0] arr_col_blk
);

  localparam int unsigned BW = $clog2(NB);

  typedef enum logic [1:0] {S_IDLE, S_DIAG, S_OFF} state_e;
  state_e state;

  logic [BW-1:0] i_q, j_q;
  logic [$clog2(T)-1:0] t_q;
  logic          bank_q;

  wire t_end = 32'(t_q) == T - 1;

  // second block of the diagonal slot starting at block b
  function automatic logic [BW-1:0] diag_partner(int unsigned b);
    return BW'((b + 1 < NB) ? b + 1 : b);
  endfunction

  assign busy       = (state != S_IDLE);
  assign rd_en      = busy;
  assign rd_bank    = bank_q;
  assign rd_row_blk = i_q;
  assign rd_col_blk = j_q;
  assign rd_t       = t_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      i_q        <= '0;
      j_q        <= '0;
      t_q        <= '0;
      bank_q     <= 1'b0;
      dropped    <= 1'b0;
      frame_done <= 1'b0;
    end else begin
      dropped    <= frame_ready && busy;
      frame_done <= 1'b0;
      if (busy) t_q <= t_end ? '0 : t_q + 1'b1;
      unique case (state)
        S_IDLE: if (frame_ready) begin
          state  <= S_DIAG;
          bank_q <= ready_bank;
          i_q    <= '0;
          j_q    <= diag_partner(0);
          t_q    <= '0;
        end
        S_DIAG: if (t_end) begin
          if (32'(i_q) + 2 < NB) begin
            i_q <= i_q + BW'(2);
            j_q <= diag_partner(32'(i_q) + 2);
          end else if (NB > 1) begin
            state <= S_OFF;
            i_q   <= '0;
            j_q   <= BW'(1);
          end else begin
            state      <= S_IDLE;
            frame_done <= 1'b1;
          end
        end
        S_OFF: if (t_end) begin
          if (32'(j_q) + 1 < NB) begin
            j_q <= j_q + 1'b1;
          end else if (32'(i_q) + 2 < NB) begin
            i_q <= i_q + 1'b1;
            j_q <= i_q + BW'(2);
          end else begin
            state      <= S_IDLE;
            frame_done <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // control lined up with the cache's one-cycle read latency
  always_ff @(posedge clk) begin
    if (rst) begin
      arr_en      <= 1'b0;
      arr_first   <= 1'b0;
      arr_last    <= 1'b0;
      arr_diag    <= 1'b0;
      arr_row_blk <= '0;
      arr_col_blk <= '0;
    end else begin
      arr_en      <= rd_en;
      arr_first   <= rd_en && t_q == '0;
      arr_last    <= rd_en && t_end;
      arr_diag    <= (state == S_DIAG);
      arr_row_blk <= i_q;
      arr_col_blk <= j_q;
    end
  end

  // slot counter, used only to check the enumeration
  int unsigned slot_cnt;
  always_ff @(posedge clk) begin
    if (rst || !busy) slot_cnt <= 0;
    else if (t_end)   slot_cnt <= slot_cnt + 1;
  end

  a_slot_count: assert property (@(posedge clk) disable iff (rst)
      (busy && t_end && state == S_OFF && 32'(i_q) + 2 >= NB && 32'(j_q) + 1 >= NB)
      |-> slot_cnt + 1 == num_slots(NB))
    else $error("array_driver: frame ended after %0d slots", slot_cnt + 1);

  a_row_lt_col: assert property (@(posedge clk) disable iff (rst) (state == S_OFF) |-> i_q < j_q)
    else $error("array_driver: off-diagonal slot with row block not before column block");

endmodule
