// tb_vfpu: self-checking testbench of the vector FPU.
//
// Drives random arithmetic in all five formats (every lane independent),
// directed overflow/underflow/special-value cases, the select, exponent and
// shuffle operations, and MADD2 chains on the accumulated value, one
// operation per cycle. Expected lanes come from SystemVerilog real arithmetic
// rounded to the lane format by the reference functions; operand mantissas
// are chosen so that the real computation is exact before that single
// rounding. Also checks the five-cycle latency and the status flags.
`timescale 1ns/1ps
module tb_vfpu;
  import fpu_pkg::*;
  `include "tb_fp_ref.svh"

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        valid_i = 1'b0, valid_o;
  instr_t      instr;
  logic [63:0] a, b, c, res;
  status_t     st;
  fmt_e        fmt_o;
  tag_t        tag_i, tag_o;

  vfpu dut (
    .clk_i(clk), .rst_ni(rst_n), .fpu_enable_i(1'b1), .valid_i(valid_i), .instr_i(instr),
    .a_i(a), .b_i(b), .c_i(c), .tag_i(tag_i), .valid_o(valid_o), .result_o(res),
    .status_o(st), .fmt_o(fmt_o), .tag_o(tag_o));

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // expected results, in issue order
  logic [63:0] exp_q[$];
  logic [63:0] mask_q[$];  // lanes whose value is checked bit-exactly
  int          issue_q[$];
  int          flag_q[$];  // -1: do not check; else expected {nv,of,uf,nx} subset to see
  string       name_q[$];
  int n_ops[string];

  always @(posedge clk) begin
    if (valid_o) begin
      logic [63:0] e, m;
      int t0, fl;
      string nm;
      e = exp_q.pop_front();
      m = mask_q.pop_front();
      t0 = issue_q.pop_front();
      fl = flag_q.pop_front();
      nm = name_q.pop_front();
      checks++;
      if ((res & m) !== (e & m)) begin
        failures++;
        if (failures < 20) $display("FAIL %s: got %h expected %h (mask %h)", nm, res, e, m);
      end
      checks++;
      if (cycle - t0 != 5) begin
        failures++;
        $display("FAIL latency %0d for %s", cycle - t0, nm);
      end
      if (fl >= 0) begin
        checks++;
        if ((4'(fl) & st) != 4'(fl)) begin
          failures++;
          $display("FAIL flags %s: got %b want at least %b", nm, st, 4'(fl));
        end
      end
    end
  end

  task automatic issue(op_e op, fmt_e f, logic [63:0] va, logic [63:0] vb, logic [63:0] vc,
                       logic [63:0] ve, logic [63:0] vm, int fl, string nm);
    instr.base_opcode = op;
    instr.mode_switch = f;
    a = va; b = vb; c = vc;
    tag_i = '0;
    valid_i = 1'b1;
    exp_q.push_back(ve);
    mask_q.push_back(vm);
    issue_q.push_back(cycle);
    flag_q.push_back(fl);
    name_q.push_back(nm);
    if (nm.len() > 20) nm = "random";
    n_ops[nm] = n_ops.exists(nm) ? n_ops[nm] + 1 : 1;
    @(posedge clk);
    #1;
    valid_i = 1'b0;
  endtask

  function automatic real apply(op_e op, real x, real y, real z);
    case (op)
      OP_MUL:    return x * y;
      OP_ADD:    return x + y;
      OP_SUB:    return x - y;
      OP_MADD3:  return x * y + z;
      OP_MSUB3:  return x * y - z;
      OP_NMADD3: return -(x * y) + z;
      default:   return -(x * y) - z;
    endcase
  endfunction

  // one random vector operation: every lane its own operands
  task automatic rand_op(fmt_e f, op_e op);
    logic [63:0] va, vb, vc, ve, la, lb, lc;
    int nl, w, mb, lo, hi;
    nl = ref_nl(int'(f));
    w  = 64 / nl;
    va = 0; vb = 0; vc = 0; ve = 0;
    // FMA operands keep fewer fraction bits so that the real product is exact
    mb = (op >= OP_MADD3) ? ((f == FMT_DP) ? 20 : (f == FMT_SP) ? 16 : 64) : 64;
    lo = (f == FMT_DP || f == FMT_SP) ? -20 : -3;
    hi = -lo;
    for (int l = 0; l < nl; l++) begin
      real r;
      la = ref_rand_lane(int'(f), lo, hi, mb);
      lb = ref_rand_lane(int'(f), (op == OP_ADD || op == OP_SUB) ? lo : lo / 2,
                         (op == OP_ADD || op == OP_SUB) ? hi : hi / 2, mb);
      lc = ref_rand_lane(int'(f), lo / 2, hi / 2, 64);
      if ($urandom_range(0, 15) == 0) lb = la ^ (64'd1 << (w - 1));  // cancellation
      r = apply(op, ref_to_real(la, int'(f)), ref_to_real(lb, int'(f)), ref_to_real(lc, int'(f)));
      va |= la << (w * l);
      vb |= lb << (w * l);
      vc |= lc << (w * l);
      ve |= ref_from_real(r, int'(f)) << (w * l);
    end
    issue(op, f, va, vb, vc, ve, '1, -1, $sformatf("random f%0d op%0d a=%h b=%h c=%h", f, op, va, vb, vc));
  endtask

  function automatic logic [63:0] splat(logic [63:0] lane, fmt_e f);
    logic [63:0] r;
    int nl;
    nl = ref_nl(int'(f));
    r = 0;
    for (int l = 0; l < nl; l++) r |= lane << ((64 / nl) * l);
    return r;
  endfunction

  function automatic logic [63:0] enc(real r, fmt_e f);
    return splat(ref_from_real(r, int'(f)), f);
  endfunction

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fmt_e fmts[5];
    fmts = '{FMT_DP, FMT_SP, FMT_HP, FMT_BF, FMT_DL};
    instr = '0; a = 0; b = 0; c = 0; tag_i = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;

    // random arithmetic, back to back
    foreach (fmts[i])
      for (int k = 0; k < 300; k++)
        rand_op(fmts[i], op_e'($urandom_range(0, 6)));

    foreach (fmts[i]) begin
      fmt_e f;
      logic [63:0] big, tiny, inf, nan;
      f = fmts[i];
      // overflow: largest finite times two
      big = enc(ref_to_real(((64'd1 << ref_eb(int'(f))) - 2) << ref_fb(int'(f)), int'(f)), f);
      issue(OP_MUL, f, big, enc(2.0, f), 0, enc(1.0e300 * 1.0e300, f), '1, 4'b0101, "overflow");
      // gradual underflow: smallest normal times 0.75 -> subnormal, inexact-free
      tiny = splat(64'd1 << ref_fb(int'(f)), f);
      issue(OP_MUL, f, tiny, enc(0.75, f), 0,
            enc(ref_to_real(64'd1 << ref_fb(int'(f)), int'(f)) * 0.75, f), '1, -1, "subnormal");
      issue(OP_MUL, f, tiny, enc(0.625 / ref_pow2(ref_fb(int'(f)) - 1), f), 0,
            enc(ref_to_real(64'd1 << ref_fb(int'(f)), int'(f)) * 0.625 / ref_pow2(ref_fb(int'(f)) - 1), f),
            '1, 4'b0011, "underflow_round");
      // subnormal operand plus normal
      issue(OP_ADD, f, splat(64'd3, f), enc(1.0, f), 0,
            enc(1.0 + ref_to_real(64'd3, int'(f)), f), '1, -1, "subnormal_in");
      // specials
      inf = enc(1.0e300 * 1.0e300, f);
      nan = splat(ref_from_real($bitstoreal(64'h7FF8000000000000), int'(f)), f);
      issue(OP_MUL, f, inf, 0, 0, nan, '1, 4'b1000, "inf_times_zero");
      issue(OP_SUB, f, inf, inf, 0, nan, '1, 4'b1000, "inf_minus_inf");
      issue(OP_MADD3, f, enc(2.0, f), inf, enc(-3.0, f), inf, '1, -1, "inf_prod");
      issue(OP_ADD, f, nan, enc(1.0, f), 0, nan, '1, -1, "nan_in");
      issue(OP_SUB, f, enc(1.5, f), enc(1.5, f), 0, 0, '1, -1, "exact_zero");
      // selects
      issue(OP_MAX3, f, enc(3.0, f), enc(2.0, f), enc(7.0, f), enc(3.0, f), '1, -1, "max3");
      issue(OP_MAX3, f, enc(1.0, f), enc(2.0, f), enc(7.0, f), enc(7.0, f), '1, -1, "max3");
      issue(OP_MIN3, f, enc(-1.0, f), enc(2.0, f), enc(7.0, f), enc(-1.0, f), '1, -1, "min3");
      issue(OP_EQ3, f, enc(2.5, f), enc(2.5, f), enc(7.0, f), enc(2.5, f), '1, -1, "eq3");
      issue(OP_NEQ3, f, enc(2.5, f), enc(2.5, f), enc(7.0, f), enc(7.0, f), '1, -1, "neq3");
      // exponent operations: 12.5 -> mantissa 1.5625, exponent negated 0.1953125*...
      issue(OP_MANT, f, enc(-12.5, f), 0, 0, enc(-1.5625, f), '1, -1, "mant");
      issue(OP_NEGEXP, f, enc(12.5, f), 0, 0, enc(1.5625 / 8.0, f), '1, -1, "negexp");
      // accumulation: MADD3 then MADD2 back to back and after a gap
      issue(OP_MADD3, f, enc(3.0, f), enc(2.0, f), enc(1.0, f), enc(7.0, f), '1, -1, "madd3");
      issue(OP_MADD2, f, enc(2.0, f), enc(2.0, f), enc(100.0, f), enc(11.0, f), '1, -1, "madd2");
      issue(OP_MADD2, f, enc(1.0, f), enc(5.0, f), 0, enc(16.0, f), '1, -1, "madd2");
      issue(OP_NMADD2, f, enc(4.0, f), enc(0.5, f), 0, enc(14.0, f), '1, -1, "nmadd2");
      repeat (7) @(posedge clk);
      #1;
      issue(OP_MADD2, f, enc(0.5, f), enc(4.0, f), 0, enc(16.0, f), '1, -1, "madd2_gap");
    end
    // shuffle reverses the lanes of 16- and 32-bit words, leaves 64-bit alone
    issue(OP_NOPSHF, FMT_HP, 64'h1111_2222_3333_4444, 0, 0, 64'h4444_3333_2222_1111, '1, -1, "nopshf");
    issue(OP_NOPSHF, FMT_SP, 64'h1111_2222_3333_4444, 0, 0, 64'h3333_4444_1111_2222, '1, -1, "nopshf");
    issue(OP_NOPSHF, FMT_DP, 64'h1111_2222_3333_4444, 0, 0, 64'h1111_2222_3333_4444, '1, -1, "nopshf");
    // mixed formats back to back
    issue(OP_MUL, FMT_HP, enc(1.5, FMT_HP), enc(3.0, FMT_HP), 0, enc(4.5, FMT_HP), '1, -1, "mode_switch");
    issue(OP_MUL, FMT_DP, enc(1.5, FMT_DP), enc(3.0, FMT_DP), 0, enc(4.5, FMT_DP), '1, -1, "mode_switch");
    issue(OP_MUL, FMT_SP, enc(1.5, FMT_SP), enc(3.0, FMT_SP), 0, enc(4.5, FMT_SP), '1, -1, "mode_switch");

    repeat (10) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", exp_q.size());
    end
    foreach (n_ops[k]) $display("  %-16s %0d", k, n_ops[k]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
