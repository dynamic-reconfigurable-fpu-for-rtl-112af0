// fp_operand_decode: operand decode unit of the vector FPU.
//
// Splits one 64-bit operand word - 1x64 double, 2x32 single, or 4x16
// half/bfloat16/DLFloat - into the unified internal representation:
//   sign      4 bits : 16b s[3..0]; 32b {s1,s1,s0,s0}; 64b s0 repeated
//   exponent 40 bits : one slot of 40/lanes bits per lane (10/20/40),
//                      biased exponent right-aligned in its slot; the slack
//                      bits above it absorb overflow of the exponent adder
//   mantissa 56 bits : one slot of 56/lanes bits per lane (14/28/56); the
//                      slot's top bit is an overflow bit, the next one the
//                      implicit bit, then the fraction, zeros below
// This is the published layout (for 16-bit formats the exponent and fraction
// padding depend on the format). Subnormals are given the effective biased
// exponent 1 and implicit bit 0. Per lane the unit also flags zero,
// subnormal, infinity, NaN and signalling NaN. Combinational.
module fp_operand_decode
  import fpu_pkg::*;
(
  input  logic [63:0] op_i,
  input  fmt_e        fmt_i,
  output logic [3:0]  sign_o,
  output logic [39:0] exp_o,
  output logic [55:0] mant_o,
  output logic [3:0]  is_zero_o,
  output logic [3:0]  is_sub_o,
  output logic [3:0]  is_inf_o,
  output logic [3:0]  is_nan_o,
  output logic [3:0]  is_snan_o
);

  always_comb begin
    int nl, w, eb, fb, ew, mw;
    logic [63:0] lane;
    logic [10:0] e;
    logic [51:0] f;
    logic        s;
    nl = fmt_lanes(fmt_i);
    w  = 64 / nl;
    eb = fmt_ebits(fmt_i);
    fb = fmt_fbits(fmt_i);
    ew = 40 / nl;
    mw = 56 / nl;
    sign_o    = '0;
    exp_o     = '0;
    mant_o    = '0;
    is_zero_o = '0;
    is_sub_o  = '0;
    is_inf_o  = '0;
    is_nan_o  = '0;
    is_snan_o = '0;
    lane = '0;
    s = 1'b0;
    e = '0;
    f = '0;
    for (int l = 0; l < 4; l++) begin
      if (l < nl) begin
        lane = (op_i >> (w * l)) & ((64'd1 << w) - 64'd1);
        if (w == 64) lane = op_i;
        s = lane[w-1];
        e = 11'((lane >> fb) & ((64'd1 << eb) - 64'd1));
        f = 52'(lane & ((64'd1 << fb) - 64'd1));
        for (int r = 0; r < 4; r++) if (r < 4 / nl) sign_o[l * (4 / nl) + r] = s;
        is_zero_o[l] = (e == 0) && (f == 0);
        is_sub_o[l]  = (e == 0) && (f != 0);
        is_inf_o[l]  = (e == 11'((1 << eb) - 1)) && (f == 0);
        is_nan_o[l]  = (e == 11'((1 << eb) - 1)) && (f != 0);
        is_snan_o[l] = is_nan_o[l] && !f[fb-1];
        exp_o  = exp_o | (40'((e == 0) ? 11'd1 : e) << (ew * l));
        // slot: [mw-1] overflow, [mw-2] implicit, fraction below
        mant_o = mant_o | ((((56'(e != 0) << fb) | 56'(f)) << (mw - 2 - fb)) << (mw * l));
      end
    end
  end

endmodule
