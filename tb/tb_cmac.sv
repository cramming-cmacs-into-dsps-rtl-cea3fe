// tb_cmac: self-checking testbench of the complex multiply-accumulate cell.
//
// Three cells run side by side:
//   u9c : W = 9, CONJ = 1 (the correlator setting), random runs of 1..24
//         samples with random idle cycles in between;
//   u9n : W = 9, CONJ = 0, the same stimulus, checked against x*y;
//   u4  : W = 4, CONJ = 1, every combination of a, b, c, d in -7..7, each
//         a run of one sample, so every single product is checked;
//   u3  : W = 3, CONJ = 0, every combination of a, b, c, d in -3..3, checked
//         against x*y: the exhaustive small-width case of the design notes.
// The reference sums are formed in the testbench from the integer formulas
// of the complex product. Each finished sum must appear exactly 5 cycles
// after its `last` sample was presented (4 pipeline stages in the slices,
// 1 in the accumulator).
module tb_cmac;

  localparam int LAT = 5;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- W = 9 cells ----------------
  logic              en9, first9, last9;
  logic signed [8:0] a9, b9, c9, d9;
  logic signed [26:0] re9c, im9c, re9n, im9n;
  logic              done9c, done9n;

  cmac #(.W(9), .ACC_W(27), .CONJ(1'b1)) u9c (
    .clk, .rst, .en(en9), .first(first9), .last(last9),
    .a(a9), .b(b9), .c(c9), .d(d9), .acc_re(re9c), .acc_im(im9c), .acc_done(done9c));
  cmac #(.W(9), .ACC_W(27), .CONJ(1'b0)) u9n (
    .clk, .rst, .en(en9), .first(first9), .last(last9),
    .a(a9), .b(b9), .c(c9), .d(d9), .acc_re(re9n), .acc_im(im9n), .acc_done(done9n));

  // ---------------- W = 4 cell ----------------
  logic              en4, first4, last4;
  logic signed [3:0] a4, b4, c4, d4;
  logic signed [26:0] re4, im4;
  logic              done4;

  cmac #(.W(4), .ACC_W(27), .CONJ(1'b1)) u4 (
    .clk, .rst, .en(en4), .first(first4), .last(last4),
    .a(a4), .b(b4), .c(c4), .d(d4), .acc_re(re4), .acc_im(im4), .acc_done(done4));

  // ---------------- W = 3 cell ----------------
  logic              en3, first3, last3;
  logic signed [2:0] a3, b3, c3, d3;
  logic signed [26:0] re3, im3;
  logic              done3;

  cmac #(.W(3), .ACC_W(27), .CONJ(1'b0)) u3 (
    .clk, .rst, .en(en3), .first(first3), .last(last3),
    .a(a3), .b(b3), .c(c3), .d(d3), .acc_re(re3), .acc_im(im3), .acc_done(done3));

  // expected results, queued with the cycle at which they are due
  typedef struct { longint re; longint im; int due; } exp_t;
  exp_t q9c[$], q9n[$], q4[$], q3[$];

  function automatic int rnd_sample(int w);
    int lim = (1 << (w - 1)) - 1;     // -2^(w-1) is the reserved code
    return int'($urandom_range(2 * lim, 0)) - lim;
  endfunction

  // W = 9 stimulus
  initial begin
    longint sc_re, sc_im, sn_re, sn_im;
    int len, k;
    en9 = 0; first9 = 0; last9 = 0; a9 = 0; b9 = 0; c9 = 0; d9 = 0;
    wait (!rst);
    for (int run = 0; run < 1500; run++) begin
      len = $urandom_range(24, 1);
      k = 0;
      sc_re = 0; sc_im = 0; sn_re = 0; sn_im = 0;
      while (k < len) begin
        @(negedge clk);
        if ($urandom_range(9, 0) < 2) begin
          en9 = 0; first9 = 1'($urandom_range(1, 0)); last9 = 1'($urandom_range(1, 0));
          a9 = 9'(rnd_sample(9)); b9 = 9'(rnd_sample(9));
          c9 = 9'(rnd_sample(9)); d9 = 9'(rnd_sample(9));
          continue;
        end
        en9 = 1; first9 = (k == 0); last9 = (k == len - 1);
        // an occasional full-scale positive/negative corner
        if ($urandom_range(15, 0) == 0) begin
          a9 = 9'sd255; b9 = -9'sd255; c9 = -9'sd255; d9 = -9'sd255;
        end else begin
          a9 = 9'(rnd_sample(9)); b9 = 9'(rnd_sample(9));
          c9 = 9'(rnd_sample(9)); d9 = 9'(rnd_sample(9));
        end
        sc_re += longint'(a9) * c9 + longint'(b9) * d9;
        sc_im += longint'(b9) * c9 - longint'(a9) * d9;
        sn_re += longint'(a9) * c9 - longint'(b9) * d9;
        sn_im += longint'(b9) * c9 + longint'(a9) * d9;
        if (last9) begin
          q9c.push_back('{sc_re, sc_im, cyc + LAT});
          q9n.push_back('{sn_re, sn_im, cyc + LAT});
        end
        k++;
      end
    end
    @(negedge clk);
    en9 = 0; first9 = 0; last9 = 0;
  end

  // W = 4 exhaustive stimulus
  initial begin
    en4 = 0; first4 = 0; last4 = 0; a4 = 0; b4 = 0; c4 = 0; d4 = 0;
    wait (!rst);
    for (int ia = -7; ia <= 7; ia++)
      for (int ib = -7; ib <= 7; ib++)
        for (int ic = -7; ic <= 7; ic++)
          for (int id = -7; id <= 7; id++) begin
            @(negedge clk);
            en4 = 1; first4 = 1; last4 = 1;
            a4 = 4'(ia); b4 = 4'(ib); c4 = 4'(ic); d4 = 4'(id);
            q4.push_back('{longint'(ia * ic + ib * id), longint'(ib * ic - ia * id), cyc + LAT});
          end
    @(negedge clk);
    en4 = 0; first4 = 0; last4 = 0;
  end

  // W = 3 exhaustive stimulus
  initial begin
    en3 = 0; first3 = 0; last3 = 0; a3 = 0; b3 = 0; c3 = 0; d3 = 0;
    wait (!rst);
    for (int ia = -3; ia <= 3; ia++)
      for (int ib = -3; ib <= 3; ib++)
        for (int ic = -3; ic <= 3; ic++)
          for (int id = -3; id <= 3; id++) begin
            @(negedge clk);
            en3 = 1; first3 = 1; last3 = 1;
            a3 = 3'(ia); b3 = 3'(ib); c3 = 3'(ic); d3 = 3'(id);
            q3.push_back('{longint'(ia * ic - ib * id), longint'(ib * ic + ia * id), cyc + LAT});
          end
    @(negedge clk);
    en3 = 0; first3 = 0; last3 = 0;
  end

  // checkers
  task automatic check_one(string name, ref exp_t q[$], input logic signed [26:0] re,
                           input logic signed [26:0] im);
    exp_t e;
    checks++;
    if (q.size() == 0) begin
      failures++;
      $display("%s: unexpected result (%0d,%0d) at cycle %0d", name, re, im, cyc);
      return;
    end
    e = q.pop_front();
    if (longint'(re) != e.re || longint'(im) != e.im || cyc != e.due) begin
      failures++;
      if (failures < 20)
        $display("%s: got (%0d,%0d) at cycle %0d, expected (%0d,%0d) at cycle %0d",
                 name, re, im, cyc, e.re, e.im, e.due);
    end
  endtask

  always @(posedge clk) begin
    #1;
    if (!rst) begin
      if (done9c) check_one("w9 conj", q9c, re9c, im9c);
      if (done9n) check_one("w9 plain", q9n, re9n, im9n);
      if (done4)  check_one("w4 exhaustive", q4, re4, im4);
      if (done3)  check_one("w3 exhaustive", q3, re3, im3);
    end
  end

  initial begin
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // wait for both stimulus streams and the pipeline to drain
    repeat (60000) @(posedge clk);
    if (q9c.size() != 0 || q9n.size() != 0 || q4.size() != 0 || q3.size() != 0) begin
      failures++;
      $display("results missing: %0d %0d %0d %0d", q9c.size(), q9n.size(), q4.size(), q3.size());
    end
    if (checks < 50000) begin
      failures++;
      $display("too few results: %0d", checks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
