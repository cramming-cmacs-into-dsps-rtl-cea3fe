// dsp_slice: the datapath of one DSP48E2-style multiply-add slice.
//
// What it does: P = (D +/- A) * B + Z, with Z chosen among zero, the cascade
// input PCIN, the C port, or P itself. The structure is the one of the
// Xilinx DSP48E2 slice: A and D each pass one input register into the 27-bit
// pre-adder, whose result is registered (AD); B passes two registers (B1, B2)
// so that it meets AD at the 27x18 signed multiplier; the product is
// registered (M); the ALU adds Z and the sum is registered (P). C also passes
// two registers before it reaches the ALU, as the slice diagram draws it, so
// a C value meets the product of the operands presented one cycle before it.
//
// Timing: with every register in place an operand set presented on cycle 0
// gives M after the 3rd rising edge and P after the 4th. PCIN is not
// registered, so it has to arrive in the cycle in which the matching M is
// held (the cascade in the CMAC relies on this). With PREG = 0 the output p
// is the ALU sum itself, taken straight from the M register, which is how the
// upper slice of the CMAC hands its product to the lower one.
//
// The pre-adder wraps at 27 bits, as the hardware does. Only the subset of
// the real slice that the CMAC needs is modelled: no dynamic OPMODE, no
// pattern detector, no SIMD modes, no A/B cascades. The register stages and
// the pre-adder subtract follow the slice drawings; the synchronous reset of
// all registers and the single clock enable are this design's choice.
module dsp_slice
  import cmac_pkg::*;
#(
  parameter preadd_e PREADD = PRE_ADD,   // D + A or D - A
  parameter alu_z_e  ALU_Z  = ALU_ZERO,  // second ALU operand
  parameter bit      PREG   = 1'b1       // 1: register P, 0: P = M + Z unregistered
) (
  input  logic                      clk,
  input  logic                      rst,    // synchronous, clears every register
  input  logic                      ce,     // clock enable of every register
  input  logic signed [DSP_A_W-1:0] a,
  input  logic signed [DSP_A_W-1:0] d,
  input  logic signed [DSP_B_W-1:0] b,
  input  logic signed [DSP_P_W-1:0] c,
  input  logic signed [DSP_P_W-1:0] pcin,
  output logic signed [DSP_P_W-1:0] p
);

  logic signed [DSP_A_W-1:0] a1_q, d1_q, ad_q;
  logic signed [DSP_B_W-1:0] b1_q, b2_q;
  logic signed [DSP_P_W-1:0] c1_q, c2_q;
  logic signed [DSP_M_W-1:0] m_q;
  logic signed [DSP_P_W-1:0] p_q;

  logic signed [DSP_A_W-1:0] ad_d;
  logic signed [DSP_P_W-1:0] z, sum;

  // 27-bit pre-adder, wrapping.
  always_comb begin
    if (PREADD == PRE_SUB) ad_d = d1_q - a1_q;
    else                   ad_d = d1_q + a1_q;
  end

  always_comb begin
    unique case (ALU_Z)
      ALU_PCIN: z = pcin;
      ALU_C:    z = c2_q;
      ALU_P:    z = p_q;
      default:  z = '0;
    endcase
    sum = DSP_P_W'(m_q) + z;  // m_q sign-extends to 48 bits
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      a1_q <= '0; d1_q <= '0; b1_q <= '0; c1_q <= '0;
      ad_q <= '0; b2_q <= '0; c2_q <= '0;
      m_q  <= '0; p_q  <= '0;
    end else if (ce) begin
      a1_q <= a;
      d1_q <= d;
      b1_q <= b;
      c1_q <= c;
      ad_q <= ad_d;
      b2_q <= b1_q;
      c2_q <= c1_q;
      m_q  <= ad_q * b2_q;
      p_q  <= sum;
    end
  end

  assign p = PREG ? p_q : sum;

endmodule
