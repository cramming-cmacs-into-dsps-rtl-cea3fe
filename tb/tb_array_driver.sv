// tb_array_driver: self-checking testbench of the TDM slot sequencer.
//
// NB = 5 blocks and T = 3 samples: a frame has 3 diagonal slots ((0,1),
// (2,3), (4,4)) followed by 10 off-diagonal slots (i < j), 13 slots of 3
// cycles. The testbench starts frames from alternating banks and checks,
// cycle by cycle, the read address and the diagonal flag against its own
// list of the slots (t fastest), that the array control follows the
// read address one cycle later with first/last on the first and last sample
// of each slot, that the frame takes exactly T*NB*(NB+1)/2 cycles with busy
// high throughout, and that a frame offered while busy is dropped.
module tb_array_driver;

  localparam int NB = 5, T = 3;
  localparam int SLOTS = NB * (NB - 1) / 2 + (NB + 1) / 2;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic frame_ready, ready_bank, busy, dropped, frame_done;
  logic rd_en, rd_bank;
  logic [$clog2(NB)-1:0] rd_row_blk, rd_col_blk, arr_row_blk, arr_col_blk;
  logic [$clog2(T)-1:0] rd_t;
  logic arr_en, arr_first, arr_last, arr_diag;

  array_driver #(.NB(NB), .T(T)) dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%s", what);
    end
  endtask

  int drops = 0;
  int si[$], sj[$];
  bit sd[$];
  always @(posedge clk) begin
    #1;
    if (!rst && dropped) drops++;
  end

  initial begin
    frame_ready = 0; ready_bank = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int f = 0; f < 6; f++) begin
      int n;
      int pi, pj, pt;
      bit pv, pd;
      repeat ($urandom_range(4, 0)) @(negedge clk);
      chk(!busy && !rd_en, "busy before frame start");
      frame_ready = 1; ready_bank = 1'(f);
      @(negedge clk);
      frame_ready = 0;
      n = 0;
      pv = 0;
      // the slot list
      si.delete(); sj.delete(); sd.delete();
      for (int b = 0; b < NB; b += 2) begin
        si.push_back(b); sj.push_back(b + 1 < NB ? b + 1 : b); sd.push_back(1);
      end
      for (int i = 0; i < NB; i++)
        for (int j = i + 1; j < NB; j++) begin
          si.push_back(i); sj.push_back(j); sd.push_back(0);
        end
      chk(si.size() == SLOTS, "slot list length");
      for (int s = 0; s < si.size(); s++)
        for (int t = 0; t < T; t++) begin
          int i, j;
          bit dg;
          i = si[s]; j = sj[s]; dg = sd[s];
          // a second frame offered in the middle of frame 2 must be dropped
          if (f == 2 && s == 5 && t == 0) frame_ready = 1;
          chk(busy && rd_en && rd_bank == 1'(f), "busy/rd_en/bank wrong during frame");
          chk(int'(rd_row_blk) == i && int'(rd_col_blk) == j && int'(rd_t) == t,
              $sformatf("read (%0d,%0d,%0d), expected (%0d,%0d,%0d)",
                        rd_row_blk, rd_col_blk, rd_t, i, j, t));
          chk(arr_en == pv, "arr_en not one cycle behind rd_en");
          if (pv) chk(int'(arr_row_blk) == pi && int'(arr_col_blk) == pj && arr_diag == pd &&
                      arr_first == (pt == 0) && arr_last == (pt == T - 1),
                      "array control does not follow the read one cycle later");
          pi = i; pj = j; pt = t; pd = dg; pv = 1;
          n++;
          @(negedge clk);
          frame_ready = 0;
        end
      // the cycle after the last read
      chk(!busy && !rd_en, "still busy after T*slots cycles");
      chk(frame_done, "frame_done missing");
      chk(arr_en && arr_last && !arr_diag && int'(arr_row_blk) == NB - 2 && int'(arr_col_blk) == NB - 1,
          "last slot control missing");
      chk(n == T * SLOTS, "wrong number of reads");
      @(negedge clk);
      chk(!arr_en && !frame_done, "control still active after frame");
    end
    chk(drops == 1, $sformatf("%0d frames dropped, expected 1", drops));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
