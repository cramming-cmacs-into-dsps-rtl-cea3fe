// tb_cmac_correlator: end-to-end self-checking testbench of the correlator at reduced size
// (M = 4 inputs per block, NB = 3 blocks, T = 6 samples per frame).
//
// The testbench writes frames of random samples (values -255..255, the code
// -256 being reserved) into the correlator and keeps its own copy. For every
// frame the correlator replays, it expects one readout per slot (row block i
// <= column block j, in that order) and checks every visibility
//     V(p, q) = sum_t x_q(t) * conj(x_p(t))
// against the copy, together with the slot tags and the column index. It
// lists the slots itself: ceil(NB/2) diagonal slots pairing blocks (0,1),
// (2,3), ... (a lone last block is paired with itself), then every pair of
// blocks i < j. In a diagonal slot, cell (r, k) must hold V(iM+r, iM+k) for
// k <= r and V(jM+M-1-r, jM+M-k) above the diagonal; in an off-diagonal
// slot V(iM+r, jM+k), and 0 in the idle column M.
// It also checks that a replay keeps busy high for exactly T*NB*(NB+1)/2
// cycles and that the first result column of a frame leaves T + 6 cycles
// after busy rises.
// Frames are written either "slow" (after the previous replay has ended) or
// "fast" (immediately). A fast frame completes while the previous one is
// still being replayed, which must raise overrun and have the frame
// dropped. Counted mechanisms, each of which must occur: frames replayed,
// replays from each of the two banks, diagonal slots (i = j), off-diagonal
// slots, overruns, dropped frames.
module tb_cmac_correlator;

  localparam int M = 4, NB = 3, T = 6, W = 9, ACC_W = 27;
  localparam int NF = 5;
  // frame 1 is written while frame 0 is replayed and gets dropped
  localparam bit FAST [NF] = '{0, 1, 0, 0, 0};
  localparam int EXP_FRAMES = 4;
  localparam int SLOTS = NB * (NB - 1) / 2 + (NB + 1) / 2;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic                        in_valid;
  logic signed [W-1:0]         in_re [M], in_im [M];
  logic                        out_valid;
  logic [$clog2(NB)-1:0]       out_row_blk, out_col_blk;
  logic [$clog2(M+2)-1:0]      out_col;
  logic                        out_diag;
  logic signed [ACC_W-1:0]     out_re [M], out_im [M];
  logic                        busy, frame_done, overrun, dropped;

  cmac_correlator #(.M(M), .NB(NB), .T(T), .W(W), .ACC_W(ACC_W)) dut (.*);

  // frame data kept by the testbench: [frame][block][t][input]
  logic signed [W-1:0] fr_re [NF][NB][T][M];
  logic signed [W-1:0] fr_im [NF][NB][T][M];

  // expected replays and slots
  typedef struct { int f; int i; int j; bit dg; } slot_t;
  slot_t exp_q[$];
  int    exp_frames[$];   // frames that must be replayed, in order

  // mechanism counters
  int n_frames = 0, n_bank[2] = '{0, 0}, n_diag = 0, n_offdiag = 0, n_overrun = 0, n_dropped = 0;

  // ---------------- writer ----------------
  initial begin
    in_valid = 0;
    foreach (in_re[i]) begin in_re[i] = '0; in_im[i] = '0; end
    foreach (fr_re[f, b, t, i]) begin
      fr_re[f][b][t][i] = W'(int'($urandom_range(510, 0)) - 255);
      fr_im[f][b][t][i] = W'(int'($urandom_range(510, 0)) - 255);
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int f = 0; f < NF; f++) begin
      if (!FAST[f]) begin
        while (busy) @(negedge clk);
        exp_frames.push_back(f);
      end
      for (int t = 0; t < T; t++)
        for (int b = 0; b < NB; b++) begin
          @(negedge clk);
          in_valid = 1;
          foreach (in_re[i]) begin in_re[i] = fr_re[f][b][t][i]; in_im[i] = fr_im[f][b][t][i]; end
        end
      @(negedge clk);
      in_valid = 0;
      // let the finished frame reach the driver before looking at busy
      repeat (3) @(negedge clk);
    end
  end

  // ---------------- replay monitor ----------------
  int busy_start = -1, first_out = -1;
  bit busy_q = 0;
  always @(posedge clk) begin
    #1;
    if (!rst) begin
      if (overrun) n_overrun++;
      if (dropped) n_dropped++;
      if (busy && !busy_q) begin
        int f;
        busy_start = cyc;
        first_out  = -1;
        n_frames++;
        n_bank[dut.u_driver.rd_bank]++;
        checks++;
        if (exp_frames.size() == 0) begin
          failures++;
          $display("unexpected replay at cycle %0d", cyc);
          f = 0;
        end else f = exp_frames.pop_front();
        for (int b = 0; b < NB; b += 2) exp_q.push_back('{f, b, (b + 1 < NB) ? b + 1 : b, 1'b1});
        for (int i = 0; i < NB; i++)
          for (int j = i + 1; j < NB; j++) exp_q.push_back('{f, i, j, 1'b0});
      end
      if (!busy && busy_q) begin
        checks++;
        if (cyc - busy_start != T * SLOTS) begin
          failures++;
          $display("replay took %0d cycles, expected %0d", cyc - busy_start, T * SLOTS);
        end
      end
      busy_q = busy;
    end
  end

  // ---------------- result checker ----------------
  always @(posedge clk) begin
    #1;
    if (!rst && out_valid) begin
      int k;
      k = int'(out_col);
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected result at cycle %0d", cyc);
      end else begin
        slot_t s;
        s = exp_q[0];
        if (k == 0 && first_out < 0) begin
          first_out = cyc;
          checks++;
          if (first_out - busy_start != T + 6) begin
            failures++;
            $display("first column %0d cycles after replay start, expected %0d",
                     first_out - busy_start, T + 6);
          end
        end
        if (int'(out_row_blk) != s.i || int'(out_col_blk) != s.j || out_diag != s.dg) begin
          failures++;
          if (failures < 20)
            $display("slot tag (%0d,%0d,%0d), expected (%0d,%0d,%0d)", out_row_blk, out_col_blk,
                     out_diag, s.i, s.j, s.dg);
        end
        for (int r = 0; r < M; r++) begin
          longint er, ei;
          int pb, pi, qb, qi;   // row input p and column input q: block, index
          bit idle;
          idle = 0;
          if (s.dg) begin
            if (k <= r) begin pb = s.i; pi = r;         qb = s.i; qi = k;     end
            else        begin pb = s.j; pi = M - 1 - r; qb = s.j; qi = M - k; end
          end else begin
            pb = s.i; pi = r; qb = s.j; qi = k;
            idle = (k == M);
          end
          er = 0; ei = 0;
          if (!idle)
            for (int t = 0; t < T; t++) begin
              longint xr, xi, yr, yi;
              xr = longint'(fr_re[s.f][qb][t][qi]); xi = longint'(fr_im[s.f][qb][t][qi]);
              yr = longint'(fr_re[s.f][pb][t][pi]); yi = longint'(fr_im[s.f][pb][t][pi]);
              er += xr * yr + xi * yi;
              ei += xi * yr - xr * yi;
            end
          if (longint'(out_re[r]) != er || longint'(out_im[r]) != ei) begin
            failures++;
            if (failures < 20)
              $display("frame %0d cell (%0d,%0d) V(%0d,%0d): got (%0d,%0d) expected (%0d,%0d)", s.f,
                       r, k, pb * M + pi, qb * M + qi, out_re[r], out_im[r], er, ei);
          end
        end
        if (k == M) begin
          if (s.dg) n_diag++; else n_offdiag++;
          void'(exp_q.pop_front());
        end
      end
    end
  end

  // ---------------- end ----------------
  initial begin
    wait (!rst);
    // wait for the writer to finish and every replay to drain
    do @(posedge clk);
    while (cyc < 10 || in_valid || exp_frames.size() != 0 || exp_q.size() != 0 || busy);
    repeat (50) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || exp_frames.size() != 0) begin
      failures++;
      $display("missing results");
    end
    $display("mechanisms: frames=%0d bank0=%0d bank1=%0d diagonal_slots=%0d offdiagonal_slots=%0d overruns=%0d dropped=%0d",
             n_frames, n_bank[0], n_bank[1], n_diag, n_offdiag, n_overrun, n_dropped);
    checks++;
    if (n_frames != EXP_FRAMES) begin failures++; $display("frames replayed %0d, expected %0d", n_frames, EXP_FRAMES); end
    checks++; if (n_diag == 0)    begin failures++; $display("no diagonal slot"); end
    checks++; if (NB > 1 && n_offdiag == 0) begin failures++; $display("no off-diagonal slot"); end
    checks++; if (n_bank[0] == 0 || n_bank[1] == 0) begin failures++; $display("a bank never replayed"); end
    checks++; if (n_overrun == 0) begin failures++; $display("no overrun"); end
    checks++; if (n_dropped == 0) begin failures++; $display("no dropped frame"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
