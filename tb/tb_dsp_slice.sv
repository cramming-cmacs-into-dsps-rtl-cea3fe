// tb_dsp_slice: self-checking testbench of the DSP slice datapath.
//
// Four slices share random operands and differ in configuration:
//   u_add_z : D + A, P = M,        P registered
//   u_sub_pc: D - A, P = M + PCIN, P registered
//   u_add_c : D + A, P = M + C,    P registered
//   u_acc_p : D - A, P = M + P,    P registered (accumulates)
//   u_comb  : D + A, P = M + PCIN, P not registered
// The expected outputs are computed from a record of the inputs sampled at
// every clock edge: the product of the operands sampled at edge k is in M
// after edge k+2 and in P after edge k+3, i.e. 4 edges from presentation.
// The pre-adder wraps at 27 bits, which the random full-range operands
// exercise.
module tb_dsp_slice;
  import cmac_pkg::*;

  localparam int N = 4000;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [DSP_A_W-1:0] a, d;
  logic signed [DSP_B_W-1:0] b;
  logic signed [DSP_P_W-1:0] c, pcin;
  logic signed [DSP_P_W-1:0] p_add_z, p_sub_pc, p_add_c, p_acc_p, p_comb;

  dsp_slice #(.PREADD(PRE_ADD), .ALU_Z(ALU_ZERO), .PREG(1'b1)) u_add_z (
    .clk, .rst, .ce(1'b1), .a, .d, .b, .c, .pcin, .p(p_add_z));
  dsp_slice #(.PREADD(PRE_SUB), .ALU_Z(ALU_PCIN), .PREG(1'b1)) u_sub_pc (
    .clk, .rst, .ce(1'b1), .a, .d, .b, .c, .pcin, .p(p_sub_pc));
  dsp_slice #(.PREADD(PRE_ADD), .ALU_Z(ALU_C), .PREG(1'b1)) u_add_c (
    .clk, .rst, .ce(1'b1), .a, .d, .b, .c, .pcin, .p(p_add_c));
  dsp_slice #(.PREADD(PRE_SUB), .ALU_Z(ALU_P), .PREG(1'b1)) u_acc_p (
    .clk, .rst, .ce(1'b1), .a, .d, .b, .c, .pcin, .p(p_acc_p));
  dsp_slice #(.PREADD(PRE_ADD), .ALU_Z(ALU_PCIN), .PREG(1'b0)) u_comb (
    .clk, .rst, .ce(1'b1), .a, .d, .b, .c, .pcin, .p(p_comb));

  // inputs as sampled at each edge after reset
  logic signed [DSP_A_W-1:0] ha[N], hd[N];
  logic signed [DSP_B_W-1:0] hb[N];
  logic signed [DSP_P_W-1:0] hc[N], hpc[N];

  function automatic logic signed [DSP_P_W-1:0] prod(int k, bit sub);
    logic signed [DSP_A_W-1:0] ad;
    ad = sub ? hd[k] - ha[k] : hd[k] + ha[k];   // 27-bit wrap
    return DSP_P_W'(ad) * DSP_P_W'(hb[k]);
  endfunction

  task automatic chk(string name, logic signed [DSP_P_W-1:0] got, logic signed [DSP_P_W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("%s: got %0d expected %0d", name, got, exp);
    end
  endtask

  initial begin
    logic signed [DSP_P_W-1:0] acc;
    a = '0; d = '0; b = '0; c = '0; pcin = '0;
    acc = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < N; k++) begin
      // operands for edge k; mostly full range, sometimes the extremes
      a    = DSP_A_W'({$urandom, $urandom});
      d    = DSP_A_W'({$urandom, $urandom});
      if ($urandom_range(7, 0) == 0) begin
        a = {1'b0, {(DSP_A_W-1){1'b1}}};
        d = {1'b0, {(DSP_A_W-1){1'b1}}};
      end
      b    = DSP_B_W'($urandom);
      c    = DSP_P_W'({$urandom, $urandom});
      pcin = DSP_P_W'({$urandom, $urandom});
      ha[k] = a; hd[k] = d; hb[k] = b; hc[k] = c; hpc[k] = pcin;
      @(posedge clk);
      #1;
      // after edge k: registered P holds the product of edge k-3
      if (k >= 3) begin
        chk("add_z",  p_add_z,  prod(k - 3, 1'b0));
        chk("sub_pc", p_sub_pc, prod(k - 3, 1'b1) + hpc[k]);
        if (k >= 4) chk("add_c", p_add_c, prod(k - 3, 1'b0) + hc[k - 2]);
        acc = acc + prod(k - 3, 1'b1);
        chk("acc_p",  p_acc_p,  acc);
      end
      // unregistered P: M holds the product of edge k-2, plus the live PCIN
      if (k >= 2) chk("comb", p_comb, prod(k - 2, 1'b0) + pcin);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
