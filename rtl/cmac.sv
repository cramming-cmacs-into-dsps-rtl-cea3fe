// cmac: complex multiply-accumulate cell built from two cascaded DSP slices.
//
// What it does: accumulates z = x * y (or x * conj(y), see CONJ) over a run
// of samples, where x = a + ib and y = c + id are W-bit signed complex
// numbers. A run starts with a sample flagged `first` and ends with one
// flagged `last`; the finished sum is shown on acc_re/acc_im with acc_done
// high for one cycle, and stays there until the next sample is accumulated.
//
// How it works: the real and imaginary parts are packed into one wide
// operand 2W bits apart, so that a single wide multiply produces both parts
// of a complex product in separate bit fields. The upper slice forms
// (a*2^2W + b) * c = ac*2^2W + bc in its pre-adder and multiplier. The lower
// slice forms (b*2^2W - a) * (-d) = -bd*2^2W + ad and adds the upper product
// through the cascade, so its P output holds
//     P = (ac - bd) * 2^2W + (bc + ad).
// Bits 2W-1:0 are the imaginary part as a signed number; bits above are the
// real part, short by one whenever the imaginary part is negative, so bit
// 2W-1 is added back as a carry-in in the real accumulator. Two fabric
// accumulators, each with a mux that feeds back either the running sum or
// zero (at the start of a run), integrate the two fields. For W = 9 the
// fields are P[35:18] and P[17:0] and the slice ports carry a|0|0, s|s|b,
// c and s|s|a, b|0|0, -d, exactly as in the slice drawings.
//
// Limits: the packing needs 3W <= 27. The value -2^(W-1) is not supported in
// b (the 27-bit pre-adder of the lower slice overflows) nor in d when
// CONJ = 0 (its negation overflows); radio astronomy data reserves that
// code as "not a number". With all four inputs at -2^(W-1) the product
// fields overflow as well.
//
// Conjugation: the lower slice's B port expects -d. With CONJ = 1 the d
// input is wired to that port unchanged, which makes the cell compute
// x * conj(y), the correlation product, at no cost; with CONJ = 0 d is
// negated first and the cell computes x * y.
//
// Timing: fully pipelined, one sample per cycle. A sample presented on cycle
// 0 reaches the lower slice's P register after the 4th edge and the
// accumulators after the 5th; acc_done rises with the accumulator update of
// the `last` sample. The packing, the slice configuration, the carry-in and
// the clear muxes follow the published design; the en/first/last control, the
// default accumulator width and the reset are this design's choices.
module cmac
  import cmac_pkg::*;
#(
  parameter int unsigned W     = 9,    // sample component width
  parameter int unsigned ACC_W = 27,   // accumulator width
  parameter bit          CONJ  = 1'b1  // 1: x*conj(y), 0: x*y
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,     // sample valid
  input  logic                    first,  // sample starts a new sum
  input  logic                    last,   // sample ends the sum
  input  logic signed [W-1:0]     a,      // x real  (column input)
  input  logic signed [W-1:0]     b,      // x imag
  input  logic signed [W-1:0]     c,      // y real  (row input)
  input  logic signed [W-1:0]     d,      // y imag
  output logic signed [ACC_W-1:0] acc_re,
  output logic signed [ACC_W-1:0] acc_im,
  output logic                    acc_done
);

  localparam int unsigned SH  = 2 * W;   // field spacing
  localparam int unsigned LAT = 4;       // input to P register

  initial begin
    assert (3 * W <= DSP_A_W) else $error("cmac: 3*W must fit the 27-bit pre-adder");
    assert (W <= DSP_B_W)     else $error("cmac: W must fit the 18-bit B port");
    assert (ACC_W >= SH + 1)  else $error("cmac: accumulator narrower than a product");
  end

  // ---- operand packing --------------------------------------------------
  logic signed [DSP_A_W-1:0] up_a, up_d, lo_a, lo_d;
  logic signed [DSP_B_W-1:0] up_b, lo_b;
  logic signed [W-1:0]       d_port;

  assign d_port = CONJ ? d : -d;

  always_comb begin
    up_a = DSP_A_W'(a) <<< SH;   // a | 0 | 0
    up_d = DSP_A_W'(b);          // s | s | b
    up_b = DSP_B_W'(c);          // c
    lo_a = DSP_A_W'(a);          // s | s | a
    lo_d = DSP_A_W'(b) <<< SH;   // b | 0 | 0
    lo_b = DSP_B_W'(d_port);     // -d
  end

  logic signed [DSP_P_W-1:0] up_p, lo_p;

  dsp_slice #(.PREADD(PRE_ADD), .ALU_Z(ALU_ZERO), .PREG(1'b0)) u_upper (
    .clk, .rst, .ce(1'b1),
    .a(up_a), .d(up_d), .b(up_b), .c('0), .pcin('0), .p(up_p)
  );

  dsp_slice #(.PREADD(PRE_SUB), .ALU_Z(ALU_PCIN), .PREG(1'b1)) u_lower (
    .clk, .rst, .ce(1'b1),
    .a(lo_a), .d(lo_d), .b(lo_b), .c('0), .pcin(up_p), .p(lo_p)
  );

  // ---- field extraction -------------------------------------------------
  logic signed [SH-1:0] re_field, im_field;
  logic                 carry_in;

  assign re_field = lo_p[2*SH-1:SH];
  assign im_field = lo_p[SH-1:0];
  assign carry_in = lo_p[SH-1];

  // ---- control pipeline aligned with P ------------------------------------
  logic [LAT-1:0] en_sr, first_sr, last_sr;

  always_ff @(posedge clk) begin
    if (rst) begin
      en_sr    <= '0;
      first_sr <= '0;
      last_sr  <= '0;
    end else begin
      en_sr    <= {en_sr[LAT-2:0], en};
      first_sr <= {first_sr[LAT-2:0], first};
      last_sr  <= {last_sr[LAT-2:0], last};
    end
  end

  // ---- accumulators with clear mux --------------------------------------
  logic signed [ACC_W-1:0] fb_re, fb_im;

  assign fb_re = first_sr[LAT-1] ? '0 : acc_re;
  assign fb_im = first_sr[LAT-1] ? '0 : acc_im;

  always_ff @(posedge clk) begin
    if (rst) begin
      acc_re   <= '0;
      acc_im   <= '0;
      acc_done <= 1'b0;
    end else begin
      acc_done <= en_sr[LAT-1] & last_sr[LAT-1];
      if (en_sr[LAT-1]) begin
        acc_re <= fb_re + ACC_W'(re_field) + ACC_W'(carry_in);
        acc_im <= fb_im + ACC_W'(im_field);
      end
    end
  end

endmodule
