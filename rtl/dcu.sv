// dcu: Downcast Unit.
//
// Takes a set of twelve IEEE double operands - four operand triples
// (A,B,C) = (op[3k], op[3k+1], op[3k+2]), k = 0..3 - into its input
// registers, analyses them, and packs them in the format chosen by the
// precision controller into the three 64-bit operand words of the vector FPU.
//
// Sections, as in the design's DCU diagram:
//   input registers   - loaded when load_i is high
//   input decode      - sign, exponent, fraction of every operand
//   mantissa analysis - need_bits_o: the largest number of leading fraction
//                       bits any operand needs; an operand needs the bits up
//                       to the first one that is followed by THRESH zeros or
//                       more (or only by zeros), all 52 if there is none
//   exponent process  - exponent rebiased by bias_DP - bias_fmt for every
//                       format; ovf_o[f] says that some finite operand
//                       overflows format f after rounding
//   rounding/packing  - round to nearest even to the format's fraction width,
//                       results below the format's normal range flushed to
//                       zero, infinities kept, NaNs made quiet; an overflow
//                       packs an infinity. Group g of a format with n lanes
//                       per word carries triples g*n .. g*n+n-1, lane l of
//                       each word holding triple g*n+l.
//   output registers  - ops_o, valid_o, tag_o and fmt_o, loaded when issue_i
//                       is high, so the words reach the FPU one cycle after
//                       the controller issues a group.
// The analysis is combinational on the input registers. THRESH is a
// synthesis parameter of the design; its default value is this design's.
module dcu
  import fpu_pkg::*;
#(
  parameter int unsigned THRESH = 8
) (
  input  logic                    clk_i,
  input  logic                    rst_ni,
  input  logic                    load_i,
  input  logic [NDCU_OP-1:0][63:0] operands_i,
  output logic [4:0]              ovf_o,        // indexed by fmt_e
  output logic [5:0]              need_bits_o,
  input  logic                    issue_i,
  input  fmt_e                    fmt_i,
  input  tag_t                    tag_i,
  output logic                    valid_o,
  output logic [2:0][63:0]        ops_o,        // A, B, C words
  output tag_t                    tag_o,
  output fmt_e                    fmt_o
);

  logic [NDCU_OP-1:0][63:0] in_q;

  always_ff @(posedge clk_i) if (load_i) in_q <= operands_i;

  // double -> format f; ovf reports a finite value beyond the format's range
  function automatic logic [64:0] downcast(logic [63:0] x, fmt_e f);
    logic        s, ovf;
    int          e, eb, fb, bias, et, sh;
    logic [52:0] m;
    logic [63:0] mant, rem, half, r;
    s    = x[63];
    e    = int'(x[62:52]);
    eb   = fmt_ebits(f);
    fb   = fmt_fbits(f);
    bias = fmt_bias(f);
    ovf  = 1'b0;
    if (f == FMT_DP) return {1'b0, x};
    if (e == 2047) begin
      if (x[51:0] != 0) r = (((64'd1 << eb) - 64'd1) << fb) | (64'd1 << (fb - 1));
      else r = (64'(s) << (eb + fb)) | (((64'd1 << eb) - 64'd1) << fb);
      return {1'b0, r};
    end
    m  = {1'b1, x[51:0]};
    et = e - 1023 + bias;
    sh = 52 - fb;
    mant = 64'(m >> sh);
    rem  = 64'(m) & ((64'd1 << sh) - 64'd1);
    half = 64'd1 << (sh - 1);
    if (rem > half || (rem == half && mant[0])) mant = mant + 64'd1;
    if (mant[fb+1]) begin
      mant = mant >> 1;
      et   = et + 1;
    end
    if (e == 0 || et < 1) r = 64'(s) << (eb + fb);  // underflow: flush to zero
    else if (et >= (1 << eb) - 1) begin
      ovf = 1'b1;
      r   = (64'(s) << (eb + fb)) | (((64'd1 << eb) - 64'd1) << fb);
    end else r = (64'(s) << (eb + fb)) | (64'(et) << fb) | (mant & ((64'd1 << fb) - 64'd1));
    return {ovf, r};
  endfunction

  // leading fraction bits an operand needs (mantissa analysis)
  function automatic logic [5:0] need_bits(logic [63:0] x);
    logic [5:0] n;
    logic       seen;
    int         run;
    n    = 6'd0;
    seen = 1'b0;
    run  = 0;
    if (x[62:52] == 11'h7FF || x[62:52] == 11'd0) return 6'd0;
    // scan from the LSB up; run = zeros between this bit and the next one below
    for (int b = 0; b < 52; b++) begin
      if (x[b]) begin
        if (!seen || run >= int'(THRESH)) n = 6'(52 - b);
        seen = 1'b1;
        run  = 0;
      end else begin
        run = run + 1;
      end
    end
    return n;
  endfunction

  always_comb begin
    ovf_o       = '0;
    need_bits_o = '0;
    for (int k = 0; k < int'(NDCU_OP); k++) begin
      logic [5:0] nb;
      nb = need_bits(in_q[k]);
      if (nb > need_bits_o) need_bits_o = nb;
      for (int f = 0; f < 5; f++) ovf_o[f] = ovf_o[f] | downcast(in_q[k], fmt_e'(f))[64];
    end
  end

  // rounding and packing of the issued group
  logic [2:0][63:0] pack;
  always_comb begin
    int nl, w, k;
    nl = fmt_lanes(fmt_i);
    w  = 64 / nl;
    k  = 0;
    pack = '0;
    for (int o = 0; o < 3; o++)
      for (int l = 0; l < 4; l++)
        if (l < nl) begin
          k = int'(tag_i.group) * nl + l;
          if (k < int'(NSETS))
            pack[o] = pack[o] | (downcast(in_q[3 * k + o], fmt_i)[63:0] << (w * l));
        end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) valid_o <= 1'b0;
    else valid_o <= issue_i;
  end
  always_ff @(posedge clk_i) begin
    if (issue_i) begin
      ops_o <= pack;
      tag_o <= tag_i;
      fmt_o <= fmt_i;
    end
  end

endmodule
