// tb_cmac_array: self-checking testbench of the CMAC grid and its readout.
//
// A 3 x 5 grid is fed random samples, independent on the lo and hi buses,
// in runs of 5..12 samples, with random idle (en low) cycles inside runs.
// For each run the testbench keeps the expected sum of col[k] * conj(row[r])
// for every cell, taking the lo buses for cells with k <= r and the hi
// buses above the diagonal;
// the grid must then put column k of the sums on its outputs exactly 6 + k
// cycles after the run's last sample, with out_col = k.
module tb_cmac_array;

  localparam int ROWS = 3, COLS = 5, W = 9, ACC_W = 27;
  localparam int LAT = 6;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic en, first, last;
  logic signed [W-1:0] col_lo_re [COLS], col_lo_im [COLS], col_hi_re [COLS], col_hi_im [COLS];
  logic signed [W-1:0] row_lo_re [ROWS], row_lo_im [ROWS], row_hi_re [ROWS], row_hi_im [ROWS];
  logic out_valid;
  logic [$clog2(COLS+1)-1:0] out_col;
  logic signed [ACC_W-1:0] out_re [ROWS], out_im [ROWS];

  cmac_array #(.ROWS(ROWS), .COLS(COLS), .W(W), .ACC_W(ACC_W)) dut (
    .clk, .rst, .en, .first, .last,
    .col_lo_re, .col_lo_im, .col_hi_re, .col_hi_im, .row_lo_re, .row_lo_im, .row_hi_re, .row_hi_im,
    .out_valid, .out_col, .out_re, .out_im);

  typedef struct { longint re [ROWS][COLS]; longint im [ROWS][COLS]; int due; } run_t;
  run_t q[$];

  function automatic int rs();
    return int'($urandom_range(510, 0)) - 255;
  endfunction

  initial begin
    run_t cur;
    int len, k;
    en = 0; first = 0; last = 0;
    foreach (col_lo_re[i]) begin
      col_lo_re[i] = '0; col_lo_im[i] = '0; col_hi_re[i] = '0; col_hi_im[i] = '0;
    end
    foreach (row_lo_re[i]) begin
      row_lo_re[i] = '0; row_lo_im[i] = '0; row_hi_re[i] = '0; row_hi_im[i] = '0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int run = 0; run < 400; run++) begin
      len = $urandom_range(12, COLS);
      k = 0;
      foreach (cur.re[r, c]) begin cur.re[r][c] = 0; cur.im[r][c] = 0; end
      while (k < len) begin
        @(negedge clk);
        foreach (col_lo_re[i]) begin
          col_lo_re[i] = W'(rs()); col_lo_im[i] = W'(rs());
          col_hi_re[i] = W'(rs()); col_hi_im[i] = W'(rs());
        end
        foreach (row_lo_re[i]) begin
          row_lo_re[i] = W'(rs()); row_lo_im[i] = W'(rs());
          row_hi_re[i] = W'(rs()); row_hi_im[i] = W'(rs());
        end
        if (k > 0 && $urandom_range(7, 0) == 0) begin
          en = 0; first = 0; last = 0;
          continue;
        end
        en = 1; first = (k == 0); last = (k == len - 1);
        foreach (cur.re[r, c]) begin
          longint xr, xi, yr, yi;
          if (c <= r) begin
            xr = col_lo_re[c]; xi = col_lo_im[c]; yr = row_lo_re[r]; yi = row_lo_im[r];
          end else begin
            xr = col_hi_re[c]; xi = col_hi_im[c]; yr = row_hi_re[r]; yi = row_hi_im[r];
          end
          cur.re[r][c] += xr * yr + xi * yi;
          cur.im[r][c] += xi * yr - xr * yi;
        end
        if (last) begin
          cur.due = cyc + LAT;
          q.push_back(cur);
        end
        k++;
      end
    end
    @(negedge clk);
    en = 0; first = 0; last = 0;
    repeat (40) @(posedge clk);
    if (q.size() != 0) begin
      failures++;
      $display("%0d runs never read out", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // readout checker
  always @(posedge clk) begin
    #1;
    if (!rst && out_valid) begin
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("unexpected readout at cycle %0d", cyc);
      end else begin
        int kk;
        kk = int'(out_col);
        if (cyc != q[0].due + kk) begin
          failures++;
          $display("column %0d at cycle %0d, expected cycle %0d", kk, cyc, q[0].due + kk);
        end
        for (int r = 0; r < ROWS; r++)
          if (longint'(out_re[r]) != q[0].re[r][kk] || longint'(out_im[r]) != q[0].im[r][kk]) begin
            failures++;
            if (failures < 20)
              $display("cell (%0d,%0d): got (%0d,%0d) expected (%0d,%0d)", r, kk,
                       out_re[r], out_im[r], q[0].re[r][kk], q[0].im[r][kk]);
          end
        if (kk == COLS - 1) void'(q.pop_front());
      end
    end
  end

endmodule
