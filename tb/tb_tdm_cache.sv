// tb_tdm_cache: self-checking testbench of the double-buffered sample cache.
//
// Small sizes (M = 3 inputs, NB = 4 blocks, T = 5 samples). Frames of random
// samples are written with random gaps in in_valid; the testbench keeps its
// own copy of each frame. After every frame it checks frame_ready and the
// bank number (banks must alternate), then, while the next frame is being
// written into the other bank, reads every (block, t) word of the
// finished bank through the row port, with a random block on the column port, and compares the data,
// which must arrive one cycle after the address. Holding rd_busy high across
// a frame end must raise overrun; otherwise overrun must stay low.
module tb_tdm_cache;

  localparam int M = 3, NB = 4, T = 5, W = 9;
  localparam int FRAMES = 12;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic in_valid;
  logic signed [W-1:0] in_re [M], in_im [M];
  logic frame_ready, ready_bank, overrun;
  logic rd_busy, rd_en, rd_bank, rd_valid;
  logic [$clog2(NB)-1:0] rd_row_blk, rd_col_blk;
  logic [$clog2(T)-1:0] rd_t;
  logic signed [W-1:0] row_re [M], row_im [M], col_re [M], col_im [M];

  tdm_cache #(.M(M), .NB(NB), .T(T), .W(W)) dut (.*);

  // reference frames: [frame][blk][t][input]
  logic signed [W-1:0] ref_re [FRAMES][NB][T][M];
  logic signed [W-1:0] ref_im [FRAMES][NB][T][M];

  int frames_seen = 0, overruns = 0;
  int busy_frames[$];  // frames during whose end rd_busy was held

  // writer: frames back to back with random gaps
  initial begin
    in_valid = 0;
    foreach (in_re[i]) begin in_re[i] = '0; in_im[i] = '0; end
    foreach (ref_re[f, b, t, i]) begin
      ref_re[f][b][t][i] = W'($urandom);
      ref_im[f][b][t][i] = W'($urandom);
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int f = 0; f < FRAMES; f++)
      for (int t = 0; t < T; t++)
        for (int b = 0; b < NB; b++) begin
          // at least one idle cycle per word, so that a reader issuing
          // one address per cycle always finishes before the next frame
          do begin
            @(negedge clk);
            in_valid = 0;
          end while ($urandom_range(3, 0) == 0);
          @(negedge clk);
          in_valid = 1;
          foreach (in_re[i]) begin in_re[i] = ref_re[f][b][t][i]; in_im[i] = ref_im[f][b][t][i]; end
        end
    @(negedge clk);
    in_valid = 0;
  end

  // frame_ready and overrun monitor
  always @(posedge clk) begin
    #1;
    if (!rst && frame_ready) begin
      checks++;
      if (ready_bank !== 1'(frames_seen % 2)) begin
        failures++;
        $display("frame %0d in bank %0d", frames_seen, ready_bank);
      end
      frames_seen++;
    end
    if (!rst && overrun) overruns++;
  end

  // reader: after each frame read the whole bank once
  initial begin
    rd_busy = 0; rd_en = 0; rd_bank = 0; rd_row_blk = '0; rd_col_blk = '0; rd_t = '0;
    wait (!rst);
    for (int f = 0; f < FRAMES; f++) begin
      int rb, cb, tt;
      bit pend;
      wait (frames_seen > f);
      rd_busy = 1;
      pend = 0;
      for (int k = 0; k <= NB * T; k++) begin
        @(negedge clk);
        if (pend) begin
          checks++;
          if (!rd_valid) begin failures++; $display("rd_valid low"); end
          for (int i = 0; i < M; i++)
            if (row_re[i] !== ref_re[f][rb][tt][i] || row_im[i] !== ref_im[f][rb][tt][i] ||
                col_re[i] !== ref_re[f][cb][tt][i] || col_im[i] !== ref_im[f][cb][tt][i]) begin
              failures++;
              if (failures < 20)
                $display("frame %0d blk %0d/%0d t %0d input %0d mismatch", f, rb, cb, tt, i);
            end
        end
        if (k < NB * T) begin
          rb = k / T; cb = $urandom_range(NB - 1, 0); tt = k % T;
          rd_en = 1; rd_bank = 1'(f % 2);
          rd_row_blk = rb[$clog2(NB)-1:0]; rd_col_blk = cb[$clog2(NB)-1:0]; rd_t = tt[$clog2(T)-1:0];
          pend = 1;
        end else begin
          rd_en = 0;
        end
      end
      // frame 5: stay busy over the next frame end to provoke an overrun
      if (f == 5) begin
        busy_frames.push_back(f + 1);
        wait (frames_seen > f + 1);
        @(negedge clk);
      end
      rd_busy = 0;
    end
    repeat (5) @(posedge clk);
    checks++;
    if (frames_seen != FRAMES) begin failures++; $display("saw %0d frames", frames_seen); end
    checks++;
    if (overruns != 1) begin failures++; $display("overruns %0d, expected 1", overruns); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
