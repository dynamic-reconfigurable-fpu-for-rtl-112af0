// vfpu: vectorized multi-format fused multiply-accumulate unit.
//
// One 64-bit word per operand carries 1x64 (double), 2x32 (single) or 4x16
// (half, bfloat16, DLFloat) lanes; the format comes with every instruction
// (mode_switch), so the lane layout can change from one operation to the
// next. All sixteen operations of the operation table are supported: MUL,
// ADD, SUB, the fused MADD3/MSUB3/NMADD3/NMSUB3 on operand C, MADD2/NMADD2
// on the accumulated value, the selects MAX3/MIN3/EQ3/NEQ3, MANT, NEGEXP and
// NOPSHF. Arithmetic is correctly rounded to nearest, ties to even, with
// subnormal inputs and outputs; NaN results are the canonical quiet NaN.
//
// Pipeline, five register stages as in the design's datapath diagram:
//   R0  input registers (A, B, C, instruction, valid, tag)
//   S1  instruction decode                                   -> R1
//   S2  operand decode (unified representation), 16-way
//       partial-product multiplier, exponent add, specials   -> R2
//   S3  exponent compare, aligner (right barrel shifter),
//       128-bit vectorized adder, sign logic                 -> R3
//   S4  complementer, leading-zero count, normalizer (left
//       shift, or right shift for subnormals), RNE rounding,
//       exponent adjust, output encode and output select     -> R4
// A result leaves five clock edges after its operands are presented, and
// one operation can be accepted every cycle; fpu_enable_i = 0 freezes the
// whole pipeline.
//
// Accumulation: the sum of each arithmetic operation, before rounding and
// normalized so that it is below 4 in units of its exponent, is kept per
// lane as the accumulated value (Acc). It is forwarded from stage S4 to S3
// when the operations follow back to back, so MADD2 can issue every cycle.
// Which operations update Acc, and that Acc carries no infinities or NaNs,
// are choices of this design.
//
// Internally each lane is a W-bit field (W = 128/lanes). The product is
// placed with its top bit at W-2 and the addend mantissa at W-3, both
// weighted 2^(E-bias) at bit W-3; the field bits below the product keep
// enough guard bits, and bits shifted out by the aligner are ORed into bit 0.
// The leading-zero count is taken from the finished sum rather than
// anticipated in parallel with the adder, a simplification of this design.
module vfpu
  import fpu_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        fpu_enable_i,
  input  logic        valid_i,
  input  instr_t      instr_i,
  input  logic [63:0] a_i,
  input  logic [63:0] b_i,
  input  logic [63:0] c_i,
  input  tag_t        tag_i,
  output logic        valid_o,
  output logic [63:0] result_o,
  output status_t     status_o,
  output fmt_e        fmt_o,
  output tag_t        tag_o
);

  localparam logic signed [13:0] EZERO = -14'sd4096;  // exponent given to a zero operand

  typedef logic signed [13:0] exp_t;

  // ------------------------------------------------------------------
  // lane helpers
  function automatic logic [63:0] lane_bits(logic [63:0] word, fmt_e f, int l);
    int w;
    w = 64 / fmt_lanes(f);
    if (w == 64) return word;
    return (word >> (w * l)) & ((64'd1 << w) - 64'd1);
  endfunction

  function automatic logic [63:0] one_word(fmt_e f);
    logic [63:0] r;
    int w;
    w = 64 / fmt_lanes(f);
    r = '0;
    for (int l = 0; l < 4; l++)
      if (l < fmt_lanes(f)) r = r | (64'(fmt_bias(f)) << (fmt_fbits(f) + w * l));
    return r;
  endfunction

  function automatic logic [63:0] qnan_lane(fmt_e f);
    return ((64'd1 << fmt_ebits(f)) - 64'd1) << fmt_fbits(f) | (64'd1 << (fmt_fbits(f) - 1));
  endfunction

  function automatic logic [63:0] inf_lane(fmt_e f, logic s);
    return (64'(s) << (fmt_ebits(f) + fmt_fbits(f))) |
           (((64'd1 << fmt_ebits(f)) - 64'd1) << fmt_fbits(f));
  endfunction

  // ordered comparison of two lanes: 1 = lt, 2 = eq, 3 = gt, 0 = unordered
  function automatic logic [1:0] fp_cmp(logic [63:0] x, logic [63:0] y, fmt_e f);
    int w, fb, eb;
    logic [63:0] mag_x, mag_y, kx, ky, expmask;
    logic sx, sy, nan_x, nan_y;
    w  = 64 / fmt_lanes(f);
    fb = fmt_fbits(f);
    eb = fmt_ebits(f);
    sx = x[w-1];
    sy = y[w-1];
    mag_x = x & ((64'd1 << (w - 1)) - 64'd1);
    mag_y = y & ((64'd1 << (w - 1)) - 64'd1);
    expmask = ((64'd1 << eb) - 64'd1) << fb;
    nan_x = ((mag_x & expmask) == expmask) && ((mag_x & ~expmask) != 0);
    nan_y = ((mag_y & expmask) == expmask) && ((mag_y & ~expmask) != 0);
    if (nan_x || nan_y) return 2'd0;
    if (mag_x == 0 && mag_y == 0) return 2'd2;
    kx = sx ? ((64'd1 << 63) - 64'd1 - mag_x) : (mag_x | (64'd1 << 63));
    ky = sy ? ((64'd1 << 63) - 64'd1 - mag_y) : (mag_y | (64'd1 << 63));
    if (kx == ky) return 2'd2;
    return (kx < ky) ? 2'd1 : 2'd3;
  endfunction

  // ------------------------------------------------------------------
  // R0: input registers
  logic        r0_v;
  instr_t      r0_in;
  logic [63:0] r0_a, r0_b, r0_c;
  tag_t        r0_tag;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) r0_v <= 1'b0;
    else if (fpu_enable_i) r0_v <= valid_i;
  end
  always_ff @(posedge clk_i) begin
    if (fpu_enable_i) begin
      r0_in  <= instr_i;
      r0_a   <= a_i;
      r0_b   <= b_i;
      r0_c   <= c_i;
      r0_tag <= tag_i;
    end
  end

  // ------------------------------------------------------------------
  // S1: instruction decode
  typedef struct packed {
    op_e  op;
    fmt_e fmt;
    logic arith;     // uses multiplier and adder
    logic has_add;   // has an addend (not MUL)
    logic use_acc;   // addend is the accumulated value
    logic neg_prod;  // negate the product
    logic neg_add;   // negate the addend
  } ctrl_t;

  ctrl_t       s1_ctrl;
  logic [63:0] s1_mb, s1_add;

  always_comb begin
    op_e op;
    op = r0_in.base_opcode;
    s1_ctrl.op       = op;
    s1_ctrl.fmt      = r0_in.mode_switch;
    s1_ctrl.arith    = (op <= OP_NMADD2);
    s1_ctrl.has_add  = (op != OP_MUL);
    s1_ctrl.use_acc  = (op == OP_MADD2) || (op == OP_NMADD2);
    s1_ctrl.neg_prod = (op == OP_NMADD3) || (op == OP_NMSUB3) || (op == OP_NMADD2);
    s1_ctrl.neg_add  = (op == OP_SUB) || (op == OP_MSUB3) || (op == OP_NMSUB3);
    // ADD/SUB run as A*1 +/- B
    if (op == OP_ADD || op == OP_SUB) begin
      s1_mb  = one_word(r0_in.mode_switch);
      s1_add = r0_b;
    end else begin
      s1_mb  = r0_b;
      s1_add = r0_c;
    end
  end

  logic        r1_v;
  ctrl_t       r1_ctrl;
  logic [63:0] r1_a, r1_b, r1_mb, r1_add, r1_c;
  tag_t        r1_tag;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) r1_v <= 1'b0;
    else if (fpu_enable_i) r1_v <= r0_v;
  end
  always_ff @(posedge clk_i) begin
    if (fpu_enable_i) begin
      r1_ctrl <= s1_ctrl;
      r1_a    <= r0_a;
      r1_b    <= r0_b;
      r1_mb   <= s1_mb;
      r1_add  <= s1_add;
      r1_c    <= r0_c;
      r1_tag  <= r0_tag;
    end
  end

  // ------------------------------------------------------------------
  // S2: operand decode, multiply, exponent add, special operands
  logic [3:0]  da_s, db_s, dc_s;
  logic [39:0] da_e, db_e, dc_e;
  logic [55:0] da_m, db_m, dc_m;
  logic [3:0]  da_z, db_z, dc_z, da_sub, db_sub, dc_sub, da_i, db_i, dc_i;
  logic [3:0]  da_n, db_n, dc_n, da_sn, db_sn, dc_sn;
  logic [111:0] s2_prod;
  logic [15:0]  s2_pp_en;

  fp_operand_decode u_dec_a (
    .op_i(r1_a), .fmt_i(r1_ctrl.fmt), .sign_o(da_s), .exp_o(da_e), .mant_o(da_m),
    .is_zero_o(da_z), .is_sub_o(da_sub), .is_inf_o(da_i), .is_nan_o(da_n), .is_snan_o(da_sn));
  fp_operand_decode u_dec_b (
    .op_i(r1_mb), .fmt_i(r1_ctrl.fmt), .sign_o(db_s), .exp_o(db_e), .mant_o(db_m),
    .is_zero_o(db_z), .is_sub_o(db_sub), .is_inf_o(db_i), .is_nan_o(db_n), .is_snan_o(db_sn));
  fp_operand_decode u_dec_c (
    .op_i(r1_add), .fmt_i(r1_ctrl.fmt), .sign_o(dc_s), .exp_o(dc_e), .mant_o(dc_m),
    .is_zero_o(dc_z), .is_sub_o(dc_sub), .is_inf_o(dc_i), .is_nan_o(dc_n), .is_snan_o(dc_sn));

  vec_multiplier u_mul (
    .a_i(da_m), .b_i(db_m), .vmode_i(fmt_vmode(r1_ctrl.fmt)), .p_o(s2_prod), .pp_en_o(s2_pp_en));

  exp_t        s2_ep [4], s2_ec [4];
  logic [3:0]  s2_sp, s2_sc, s2_pz, s2_cz;
  logic [3:0]  s2_spec, s2_nv, s2_cmp;
  logic [63:0] s2_spec_w;

  always_comb begin
    int nl, ew, bias;
    logic [63:0] la, lb;
    logic        pinf, cinf, anyn, anys;
    logic [1:0]  cr;
    nl   = fmt_lanes(r1_ctrl.fmt);
    ew   = 40 / nl;
    bias = fmt_bias(r1_ctrl.fmt);
    s2_spec   = '0;
    s2_nv     = '0;
    s2_spec_w = '0;
    s2_cmp    = '0;
    la = '0;
    lb = '0;
    cr = '0;
    for (int l = 0; l < 4; l++) begin
      int ea, eb, ec, si;
      logic [63:0] lw;
      lw = '0;
      si = l * (4 / nl);
      ea = int'((da_e >> (ew * l)) & ((40'd1 << ew) - 40'd1));
      eb = int'((db_e >> (ew * l)) & ((40'd1 << ew) - 40'd1));
      ec = int'((dc_e >> (ew * l)) & ((40'd1 << ew) - 40'd1));
      if (nl == 1) begin
        ea = int'(da_e);
        eb = int'(db_e);
        ec = int'(dc_e);
      end
      s2_sp[l] = da_s[si] ^ db_s[si] ^ r1_ctrl.neg_prod;
      s2_sc[l] = dc_s[si] ^ r1_ctrl.neg_add;
      s2_pz[l] = da_z[l] | db_z[l];
      s2_cz[l] = dc_z[l] | !r1_ctrl.has_add;
      s2_ep[l] = s2_pz[l] ? EZERO : exp_t'(ea + eb - bias);
      s2_ec[l] = s2_cz[l] ? EZERO : exp_t'(ec);
      // special operands
      pinf = da_i[l] | db_i[l];
      cinf = dc_i[l] & r1_ctrl.has_add & !r1_ctrl.use_acc;
      anyn = da_n[l] | db_n[l] | (dc_n[l] & r1_ctrl.has_add & !r1_ctrl.use_acc);
      anys = da_sn[l] | db_sn[l] | (dc_sn[l] & r1_ctrl.has_add & !r1_ctrl.use_acc);
      if (l < nl) begin
        if (anyn || (pinf && s2_pz[l]) || (pinf && cinf && (s2_sp[l] != s2_sc[l]))) begin
          s2_spec[l] = 1'b1;
          s2_nv[l]   = anys || (pinf && s2_pz[l]) || (pinf && cinf && !anyn);
          lw = qnan_lane(r1_ctrl.fmt);
        end else if (pinf) begin
          s2_spec[l] = 1'b1;
          lw = inf_lane(r1_ctrl.fmt, s2_sp[l]);
        end else if (cinf) begin
          s2_spec[l] = 1'b1;
          lw = inf_lane(r1_ctrl.fmt, s2_sc[l]);
        end
        s2_spec_w = s2_spec_w | (lw << ((64 / nl) * l));
        // select condition of MAX3/MIN3/EQ3/NEQ3
        la = lane_bits(r1_a, r1_ctrl.fmt, l);
        lb = lane_bits(r1_b, r1_ctrl.fmt, l);
        cr = fp_cmp(la, lb, r1_ctrl.fmt);
        case (r1_ctrl.op)
          OP_MAX3: s2_cmp[l] = (cr == 2'd3);
          OP_MIN3: s2_cmp[l] = (cr == 2'd1);
          OP_EQ3:  s2_cmp[l] = (cr == 2'd2);
          OP_NEQ3: s2_cmp[l] = (cr != 2'd2);
          default: s2_cmp[l] = 1'b0;
        endcase
      end
    end
  end

  logic         r2_v;
  ctrl_t        r2_ctrl;
  logic [111:0] r2_prod;
  logic [55:0]  r2_cm;
  exp_t         r2_ep [4], r2_ec [4];
  logic [3:0]   r2_sp, r2_sc, r2_pz, r2_cz, r2_spec, r2_nv, r2_cmp;
  logic [63:0]  r2_spec_w, r2_a, r2_c;
  tag_t         r2_tag;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) r2_v <= 1'b0;
    else if (fpu_enable_i) r2_v <= r1_v;
  end
  always_ff @(posedge clk_i) begin
    if (fpu_enable_i) begin
      r2_ctrl   <= r1_ctrl;
      r2_prod   <= s2_prod;
      r2_cm     <= dc_m;
      r2_ep     <= s2_ep;
      r2_ec     <= s2_ec;
      r2_sp     <= s2_sp;
      r2_sc     <= s2_sc;
      r2_pz     <= s2_pz;
      r2_cz     <= s2_cz;
      r2_spec   <= s2_spec;
      r2_nv     <= s2_nv;
      r2_cmp    <= s2_cmp;
      r2_spec_w <= s2_spec_w;
      r2_a      <= r1_a;
      r2_c      <= r1_c;
      r2_tag    <= r1_tag;
    end
  end

  // ------------------------------------------------------------------
  // S3: addend select, exponent compare, align, accumulate
  // accumulated value (per lane): magnitude field, exponent, sign
  logic [127:0] acc_q, acc_fwd, acc_use;
  exp_t         acc_e_q [4], acc_e_fwd [4], acc_e_use [4];
  logic [3:0]   acc_s_q, acc_s_fwd, acc_s_use;
  logic         r3_v;
  ctrl_t        r3_ctrl;

  always_comb begin
    if (r3_v && r3_ctrl.arith) begin
      acc_use   = acc_fwd;
      acc_e_use = acc_e_fwd;
      acc_s_use = acc_s_fwd;
    end else begin
      acc_use   = acc_q;
      acc_e_use = acc_e_q;
      acc_s_use = acc_s_q;
    end
  end

  logic [127:0] s3_x, s3_y, s3_ys, s3_yj, s3_sum;
  logic [3:0][7:0] s3_amt;
  logic [3:0]   s3_ysticky, s3_sub, s3_sx, s3_sy, s3_cout, s3_xz, s3_yz;
  exp_t         s3_emax [4];
  logic [1:0]   s3_vm;

  assign s3_vm = fmt_vmode(r2_ctrl.fmt);

  always_comb begin
    int nl, w, sw;
    nl = fmt_lanes(r2_ctrl.fmt);
    w  = 128 / nl;
    sw = 56 / nl;
    s3_x = '0;
    s3_y = '0;
    s3_amt = '0;
    s3_sub = '0;
    s3_sx = '0;
    s3_sy = '0;
    s3_xz = '0;
    s3_yz = '0;
    for (int l = 0; l < 4; l++) begin
      logic [127:0] pf, af, lmask;
      exp_t ea;
      logic sa, za;
      int d;
      s3_emax[l] = EZERO;
      lmask = '0;
      pf = '0;
      af = '0;
      ea = EZERO;
      sa = 1'b0;
      za = 1'b1;
      d = 0;
      if (l < nl) begin
        lmask = (w == 128) ? '1 : ((128'd1 << w) - 128'd1);
        // product field: slot of 2*sw bits, top bit ends at w-2
        pf = ((128'(r2_prod) >> (2 * sw * l)) & ((128'd1 << (2 * sw)) - 128'd1)) << (w - 2 * sw + 1);
        if (r2_ctrl.use_acc) begin
          af = (acc_use >> (w * l)) & lmask;
          ea = (af == 0) ? EZERO : acc_e_use[l];
          sa = acc_s_use[l] ^ r2_ctrl.neg_add;
          za = (af == 0);
        end else begin
          af = ((128'(r2_cm) >> (sw * l)) & ((128'd1 << sw) - 128'd1)) << (w - sw - 1);
          ea = r2_ec[l];
          sa = r2_sc[l];
          za = r2_cz[l];
          if (za) af = '0;
        end
        d = int'(r2_ep[l]) - int'(ea);
        if (d >= 0) begin
          s3_x = s3_x | (pf << (w * l));
          s3_y = s3_y | (af << (w * l));
          s3_amt[l] = (d > 255) ? 8'd255 : 8'(d);
          s3_emax[l] = r2_ep[l];
          s3_sx[l] = r2_sp[l];
          s3_sy[l] = sa;
          s3_xz[l] = r2_pz[l];
          s3_yz[l] = za;
        end else begin
          s3_x = s3_x | (af << (w * l));
          s3_y = s3_y | (pf << (w * l));
          s3_amt[l] = (-d > 255) ? 8'd255 : 8'(-d);
          s3_emax[l] = ea;
          s3_sx[l] = sa;
          s3_sy[l] = r2_sp[l];
          s3_xz[l] = za;
          s3_yz[l] = r2_pz[l];
        end
        s3_sub[l] = s3_sx[l] ^ s3_sy[l];
      end
    end
  end

  vec_shifter #(.LEFT(1'b0)) u_align (
    .d_i(s3_y), .amt_i(s3_amt), .vmode_i(s3_vm), .d_o(s3_ys), .sticky_o(s3_ysticky));

  // jam the sticky bit into the lane LSB, and invert for effective subtraction
  always_comb begin
    int nl, w;
    nl = fmt_lanes(r2_ctrl.fmt);
    w  = 128 / nl;
    s3_yj = s3_ys;
    for (int l = 0; l < 4; l++)
      if (l < nl) begin
        s3_yj[w * l] = s3_ys[w * l] | s3_ysticky[l];
        if (s3_sub[l])
          for (int b = 0; b < 128; b++)
            if (b >= w * l && b < w * (l + 1)) s3_yj[b] = ~s3_yj[b];
      end
  end

  logic [3:0] s3_cin;
  always_comb begin
    s3_cin = '0;
    for (int l = 0; l < 4; l++) s3_cin[l] = s3_sub[l];
  end

  vec_adder u_acc_add (
    .a_i(s3_x), .b_i(s3_yj), .cin_i(s3_cin), .vmode_i(s3_vm), .s_o(s3_sum), .cout_o(s3_cout));

  // sign logic: a subtraction without carry out went negative
  logic [3:0] s3_neg, s3_rs;
  logic       s3_co;
  always_comb begin
    int nl;
    s3_co = 1'b0;
    nl = fmt_lanes(r2_ctrl.fmt);
    s3_neg = '0;
    s3_rs  = '0;
    for (int l = 0; l < 4; l++)
      if (l < nl) begin
        s3_co = s3_cout[(l + 1) * (4 / nl) - 1];
        s3_neg[l] = s3_sub[l] & !s3_co;
        s3_rs[l]  = s3_neg[l] ? s3_sy[l] : s3_sx[l];
      end
  end

  logic [127:0] r3_sum;
  exp_t         r3_emax [4];
  logic [3:0]   r3_neg, r3_rs, r3_sx, r3_sy, r3_xz, r3_yz, r3_spec, r3_nv, r3_cmp;
  logic [63:0]  r3_spec_w, r3_a, r3_c;
  tag_t         r3_tag;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) r3_v <= 1'b0;
    else if (fpu_enable_i) r3_v <= r2_v;
  end
  always_ff @(posedge clk_i) begin
    if (fpu_enable_i) begin
      r3_ctrl   <= r2_ctrl;
      r3_sum    <= s3_sum;
      r3_emax   <= s3_emax;
      r3_neg    <= s3_neg;
      r3_rs     <= s3_rs;
      r3_sx     <= s3_sx;
      r3_sy     <= s3_sy;
      r3_xz     <= s3_xz;
      r3_yz     <= s3_yz;
      r3_spec   <= r2_spec;
      r3_nv     <= r2_nv;
      r3_cmp    <= r2_cmp;
      r3_spec_w <= r2_spec_w;
      r3_a      <= r2_a;
      r3_c      <= r2_c;
      r3_tag    <= r2_tag;
    end
  end

  // ------------------------------------------------------------------
  // S4: complement, leading-zero count, normalize, round, encode, select
  logic [1:0]   s4_vm;
  logic [127:0] s4_inv, s4_cmpl, s4_mag, s4_nl, s4_nr;
  logic [3:0]   s4_cout_unused, s4_zero, s4_rsticky;
  logic [3:0][7:0] s4_lzc, s4_lamt, s4_ramt;
  logic [3:0]   s4_subn, s4_lsticky_unused;

  assign s4_vm = fmt_vmode(r3_ctrl.fmt);

  // complementer: ~sum + 1 on the lanes that went negative
  logic [3:0] s4_cmpl_cin;
  assign s4_inv = ~r3_sum;
  always_comb
    for (int l = 0; l < 4; l++) s4_cmpl_cin[l] = (l < int'(fmt_lanes(r3_ctrl.fmt))) && r3_neg[l];

  vec_adder u_cmpl (
    .a_i(s4_inv), .b_i('0), .cin_i(s4_cmpl_cin), .vmode_i(s4_vm), .s_o(s4_cmpl),
    .cout_o(s4_cout_unused));

  always_comb begin
    int nl, w;
    nl = fmt_lanes(r3_ctrl.fmt);
    w  = 128 / nl;
    s4_mag = r3_sum;
    for (int b = 0; b < 128; b++)
      if (r3_neg[b / w]) s4_mag[b] = s4_cmpl[b];
  end

  vec_lzc u_lza (.d_i(s4_mag), .vmode_i(s4_vm), .cnt_o(s4_lzc), .zero_o(s4_zero));

  // normalizer shift amounts: left by the leading-zero count, or as far as
  // the minimum exponent allows; right when the result is below it
  always_comb begin
    int nl;
    nl = fmt_lanes(r3_ctrl.fmt);
    s4_lamt = '0;
    s4_ramt = '0;
    s4_subn = '0;
    for (int l = 0; l < 4; l++) begin
      int en, t;
      en = 0;
      t  = 0;
      if (l < nl) begin
        en = int'(r3_emax[l]) + 2 - int'(s4_lzc[l]);
        t  = int'(r3_emax[l]) + 1;
        if (en >= 1) s4_lamt[l] = s4_lzc[l];
        else begin
          s4_subn[l] = 1'b1;
          if (t >= 0) s4_lamt[l] = 8'(t);
          else s4_ramt[l] = (-t > 255) ? 8'd255 : 8'(-t);
        end
      end
    end
  end

  vec_shifter #(.LEFT(1'b1)) u_norm_l (
    .d_i(s4_mag), .amt_i(s4_lamt), .vmode_i(s4_vm), .d_o(s4_nl), .sticky_o(s4_lsticky_unused));
  vec_shifter #(.LEFT(1'b0)) u_norm_r (
    .d_i(s4_mag), .amt_i(s4_ramt), .vmode_i(s4_vm), .d_o(s4_nr), .sticky_o(s4_rsticky));

  // rounding, exponent adjust, output encode, flags
  logic [63:0] s4_arith_w, s4_out;
  status_t     s4_st;
  logic [127:0] s4_acc_next;
  exp_t         s4_acc_e_next [4];

  always_comb begin
    int nl, w, eb, fb, p, ow;
    logic [3:0] nv, of, uf, nx;
    nl   = fmt_lanes(r3_ctrl.fmt);
    w    = 128 / nl;
    eb   = fmt_ebits(r3_ctrl.fmt);
    fb   = fmt_fbits(r3_ctrl.fmt);
    p    = fb + 1;
    ow   = 64 / nl;
    s4_arith_w = '0;
    s4_acc_next = '0;
    nv = '0; of = '0; uf = '0; nx = '0;
    s4_st = '0;
    for (int l = 0; l < 4; l++) begin
      logic [127:0] f, lmask, m;
      logic [63:0]  mant, lw;
      logic         g, st, inc, zs;
      int           en;
      f = '0; lmask = '0; m = '0; mant = '0; lw = '0;
      g = 1'b0; st = 1'b0; inc = 1'b0; zs = 1'b0; en = 0;
      s4_acc_e_next[l] = EZERO;
      if (l < nl) begin
        lmask = (w == 128) ? '1 : ((128'd1 << w) - 128'd1);
        // accumulated value: magnitude kept below 4 units of its exponent
        m = (s4_mag >> (w * l)) & lmask;
        s4_acc_e_next[l] = r3_emax[l];
        if (m[w-1]) begin
          m = (m >> 1) | (m & 128'd1);
          s4_acc_e_next[l] = r3_emax[l] + 14'sd1;
        end
        s4_acc_next = s4_acc_next | (m << (w * l));
        // normalized lane field
        if (s4_subn[l] && s4_ramt[l] != 0) f = (s4_nr >> (w * l)) & lmask;
        else f = (s4_nl >> (w * l)) & lmask;
        mant = 64'(f >> (w - p));
        g    = f[w - p - 1];
        st   = ((f & ((128'd1 << (w - p - 1)) - 128'd1)) != 0) ||
               (s4_subn[l] && s4_rsticky[l]);
        inc  = g & (st | mant[0]);
        en   = s4_subn[l] ? 0 : int'(r3_emax[l]) + 2 - int'(s4_lzc[l]);
        mant = mant + 64'(inc);
        if (mant[p]) begin
          mant = mant >> 1;
          en   = en + 1;
        end else if (s4_subn[l] && mant[p-1]) begin
          en = 1;
        end
        nx[l] = g | st;
        uf[l] = s4_subn[l] & (g | st);
        if (s4_zero[l]) begin
          // exact zero: sign of a sum of two zeros, else +0
          if (r3_xz[l] && r3_yz[l]) zs = r3_sx[l] & r3_sy[l];
          else zs = 1'b0;
          lw = 64'(zs) << (ow - 1);
          nx[l] = 1'b0;
          uf[l] = 1'b0;
        end else if (en >= (1 << eb) - 1) begin
          lw = inf_lane(r3_ctrl.fmt, r3_rs[l]);
          of[l] = 1'b1;
          nx[l] = 1'b1;
        end else begin
          lw = (64'(r3_rs[l]) << (ow - 1)) | (64'(en) << fb) |
               (mant & ((64'd1 << fb) - 64'd1));
        end
        if (r3_spec[l]) begin
          lw = (r3_spec_w >> (ow * l)) & ((ow == 64) ? '1 : ((64'd1 << ow) - 64'd1));
          nv[l] = r3_nv[l];
          of[l] = 1'b0;
          uf[l] = 1'b0;
          nx[l] = 1'b0;
        end
        s4_arith_w = s4_arith_w | (lw << (ow * l));
      end
    end
    s4_st.nv = |nv;
    s4_st.of = |of;
    s4_st.uf = |uf;
    s4_st.nx = |nx;
  end

  // forwarded accumulated value (used when the next operation is in S3)
  assign acc_fwd   = s4_acc_next;
  assign acc_e_fwd = s4_acc_e_next;
  assign acc_s_fwd = r3_rs;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      acc_q   <= '0;
      acc_s_q <= '0;
      for (int l = 0; l < 4; l++) acc_e_q[l] <= EZERO;
    end else if (fpu_enable_i && r3_v && r3_ctrl.arith) begin
      acc_q   <= acc_fwd;
      acc_e_q <= acc_e_fwd;
      acc_s_q <= acc_s_fwd;
    end
  end

  // output select: arithmetic result, A or C, exponent operations, shuffle
  always_comb begin
    int nl, ow, eb, fb, bias, e;
    logic [63:0] la;
    la = '0;
    e  = 0;
    nl   = fmt_lanes(r3_ctrl.fmt);
    ow   = 64 / nl;
    eb   = fmt_ebits(r3_ctrl.fmt);
    fb   = fmt_fbits(r3_ctrl.fmt);
    bias = fmt_bias(r3_ctrl.fmt);
    s4_out = '0;
    case (r3_ctrl.op)
      OP_MAX3, OP_MIN3, OP_EQ3, OP_NEQ3: begin
        for (int l = 0; l < 4; l++)
          if (l < nl)
            s4_out = s4_out | (lane_bits(r3_cmp[l] ? r3_a : r3_c, r3_ctrl.fmt, l) << (ow * l));
      end
      OP_MANT, OP_NEGEXP: begin
        for (int l = 0; l < 4; l++) begin
          if (l < nl) begin
            la = lane_bits(r3_a, r3_ctrl.fmt, l);
            e  = int'((la >> fb) & ((64'd1 << eb) - 64'd1));
            if (e != 0 && e != (1 << eb) - 1) begin
              la = la & ~(((64'd1 << eb) - 64'd1) << fb);
              if (r3_ctrl.op == OP_MANT) la = la | (64'(bias) << fb);
              else la = la | (64'(2 * bias - e) << fb);
            end
            s4_out = s4_out | (la << (ow * l));
          end
        end
      end
      OP_NOPSHF: begin
        for (int l = 0; l < 4; l++)
          if (l < nl)
            s4_out = s4_out | (lane_bits(r3_a, r3_ctrl.fmt, nl - 1 - l) << (ow * l));
      end
      default: s4_out = s4_arith_w;
    endcase
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) valid_o <= 1'b0;
    else if (fpu_enable_i) valid_o <= r3_v;
  end
  always_ff @(posedge clk_i) begin
    if (fpu_enable_i) begin
      result_o <= s4_out;
      status_o <= r3_ctrl.arith ? s4_st : '0;
      fmt_o    <= r3_ctrl.fmt;
      tag_o    <= r3_tag;
    end
  end

endmodule
