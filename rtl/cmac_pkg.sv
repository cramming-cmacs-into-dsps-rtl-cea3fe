// cmac_pkg: widths and small helpers shared by the CMAC correlator.
//
// The DSP port widths are those of the Xilinx DSP48E2 slice that the CMAC is
// packed into: a 27-bit A/D pre-adder, an 18-bit B port, a 48-bit P/PCIN path.
// The pre-adder is 27 bits wide and wraps like the hardware does; the 48-bit
// C port and P feedback exist in the slice but the CMAC leaves them unused.
package cmac_pkg;

  localparam int unsigned DSP_A_W = 27;   // A, D and pre-adder width
  localparam int unsigned DSP_B_W = 18;   // B (multiplier) width
  localparam int unsigned DSP_M_W = DSP_A_W + DSP_B_W;  // full product width
  localparam int unsigned DSP_P_W = 48;   // P, PCIN and C width

  // Source of the ALU's second operand (the first is always the product).
  typedef enum logic [1:0] {
    ALU_ZERO = 2'd0,   // P = M
    ALU_PCIN = 2'd1,   // P = M + PCIN (cascade from the slice below)
    ALU_C    = 2'd2,   // P = M + C
    ALU_P    = 2'd3    // P = M + P   (accumulate inside the slice)
  } alu_z_e;

  // Pre-adder operation of a slice.
  typedef enum logic {
    PRE_ADD = 1'b0,    // AD = D + A
    PRE_SUB = 1'b1     // AD = D - A
  } preadd_e;

  // Number of TDM slots needed to correlate every pair of NB station blocks
  // on an M x (M+1) array: NB*(NB-1)/2 slots for pairs of different blocks,
  // plus ceil(NB/2) slots that each hold two blocks' self-correlations.
  function automatic int unsigned num_slots(int unsigned nb);
    return nb * (nb - 1) / 2 + (nb + 1) / 2;
  endfunction

endpackage
