// tb_fpu_top: end-to-end test of the transprecision FPU at its default
// parameters.
//
// Runs fixed-precision vector operations in every format, an accumulation
// chain, and sets of four double-precision operand triples under every
// dynamic behaviour: forced half precision (including an overflow that
// becomes infinity), range fallback to DLFloat, bfloat16, single (split into
// two operations) and double (four operations), and autonomous selection of
// bfloat16, half, single and double from the mantissa analysis. Each result
// is compared with a reference that converts the operands to the expected
// format, computes in real arithmetic, rounds to that format and converts
// back. The format reported with each result, the latency (6 cycles for the
// direct path, 8 + groups for a dynamic set) and the back-pressure through
// dcu_rdy are checked too; every mechanism must occur at least once.
`timescale 1ns/1ps
module tb_fpu_top;
  import fpu_pkg::*;
  `include "tb_fp_ref.svh"

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                     valid = 1'b0, rdy, ov;
  instr_t                   opc;
  logic [NDCU_OP-1:0][63:0] ops;
  dc_behav_e                bh;
  logic [NSETS-1:0][63:0]   res;
  status_t                  st;
  fmt_e                     fo;

  fpu_top dut (.clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .opcode_i(opc), .operands_i(ops),
    .dc_behav_i(bh), .dcu_rdy_o(rdy), .o_valid_o(ov), .o_operands_o(res), .o_status_o(st),
    .o_fmt_o(fo));

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct {
    logic [3:0][63:0] exp;
    int               nres;   // 1 for the direct path, 4 for a set
    fmt_e             fmt;
    int               t0, lat;
    string            name;
  } exp_t;
  exp_t q[$];
  int mech[string];
  int stall_cycles = 0;

  always @(posedge clk) if (valid && !rdy) stall_cycles++;

  always @(posedge clk) begin
    if (ov) begin
      exp_t e;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected result");
      end else begin
        e = q.pop_front();
        for (int k = 0; k < e.nres; k++) begin
          checks++;
          if (res[k] !== e.exp[k]) begin
            failures++;
            if (failures < 20) $display("FAIL %s slot %0d: got %h expected %h", e.name, k, res[k], e.exp[k]);
          end
        end
        checks += 2;
        if (fo != e.fmt) begin
          failures++;
          $display("FAIL %s: format %0d expected %0d", e.name, fo, e.fmt);
        end
        if (cycle - e.t0 != e.lat) begin
          failures++;
          $display("FAIL %s: latency %0d expected %0d", e.name, cycle - e.t0, e.lat);
        end
      end
    end
  end

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

  // wait for dcu_rdy, present the operands for one cycle
  task automatic present(op_e op, fmt_e f, dc_behav_e b, logic [NDCU_OP-1:0][63:0] v, output int t0);
    opc = '{base_opcode: op, mode_switch: f};
    bh  = b;
    ops = v;
    valid = 1'b1;
    @(posedge clk);
    while (!rdy) @(posedge clk);
    t0 = cycle;
    #1 valid = 1'b0;
  endtask

  // dynamic set: four triples of doubles, expected working format ef
  task automatic dyn_set(op_e op, fmt_e req, dc_behav_e b, real v[12], fmt_e ef, string nm);
    logic [NDCU_OP-1:0][63:0] w;
    exp_t e;
    int t0;
    for (int k = 0; k < 12; k++) w[k] = $realtobits(v[k]);
    for (int k = 0; k < 4; k++) begin
      real x, y, z, r;
      x = ref_to_real(ref_from_real(v[3 * k], int'(ef)), int'(ef));
      y = ref_to_real(ref_from_real(v[3 * k + 1], int'(ef)), int'(ef));
      z = ref_to_real(ref_from_real(v[3 * k + 2], int'(ef)), int'(ef));
      r = apply(op, x, y, z);
      e.exp[k] = $realtobits(ref_to_real(ref_from_real(r, int'(ef)), int'(ef)));
    end
    e.nres = 4;
    e.fmt  = ef;
    e.name = nm;
    e.lat  = 8 + 4 / ref_nl(int'(ef));
    mech[nm] = mech.exists(nm) ? mech[nm] + 1 : 1;
    present(op, req, b, w, t0);
    e.t0 = t0;
    q.push_back(e);
  endtask

  // fixed-precision vector operation on random lanes
  task automatic fixed_op(op_e op, fmt_e f, string nm);
    logic [NDCU_OP-1:0][63:0] w;
    exp_t e;
    int nl, lw, t0;
    nl = ref_nl(int'(f));
    lw = 64 / nl;
    w = '0;
    e.exp = '0;
    for (int l = 0; l < nl; l++) begin
      logic [63:0] la, lb, lc;
      int mb;
      mb = (op >= OP_MADD3) ? ((f == FMT_DP) ? 20 : (f == FMT_SP) ? 16 : 64) : 64;
      la = ref_rand_lane(int'(f), -3, 3, mb);
      lb = ref_rand_lane(int'(f), -3, 3, mb);
      lc = ref_rand_lane(int'(f), -2, 2, 64);
      w[0] |= la << (lw * l);
      w[1] |= lb << (lw * l);
      w[2] |= lc << (lw * l);
      e.exp[0] |= ref_from_real(apply(op, ref_to_real(la, int'(f)), ref_to_real(lb, int'(f)),
                                      ref_to_real(lc, int'(f))), int'(f)) << (lw * l);
    end
    e.nres = 1;
    e.fmt  = f;
    e.name = nm;
    e.lat  = 6;
    mech[nm] = mech.exists(nm) ? mech[nm] + 1 : 1;
    present(op, f, DC_FIXED, w, t0);
    e.t0 = t0;
    q.push_back(e);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v[12];
    real bfmax_edge;
    valid = 0; opc = '0; ops = '0; bh = DC_FIXED;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;

    // fixed precision, every format, back to back
    for (int n = 0; n < 40; n++)
      fixed_op(op_e'($urandom_range(0, 6)), fmt_e'(n % 5), "fixed");

    // accumulation through the direct path: 3*2+1, then +2*2, then +1*5
    begin
      logic [NDCU_OP-1:0][63:0] w;
      exp_t e;
      int t0;
      real seq_a[3] = '{3.0, 2.0, 1.0};
      real seq_b[3] = '{2.0, 2.0, 5.0};
      real seq_r[3] = '{7.0, 11.0, 16.0};
      for (int i = 0; i < 3; i++) begin
        w = '0;
        w[0] = $realtobits(seq_a[i]);
        w[1] = $realtobits(seq_b[i]);
        w[2] = $realtobits(1.0);
        e.exp = '0;
        e.exp[0] = $realtobits(seq_r[i]);
        e.nres = 1; e.fmt = FMT_DP; e.name = "accumulate"; e.lat = 6;
        mech["accumulate"] = mech.exists("accumulate") ? mech["accumulate"] + 1 : 1;
        present((i == 0) ? OP_MADD3 : OP_MADD2, FMT_DP, DC_FIXED, w, t0);
        e.t0 = t0;
        q.push_back(e);
      end
    end

    // forced half precision
    v = '{1.5, 2.0, 0.25, -3.0, 1.25, 4.0, 0.5, 0.5, -1.0, 6.0, 7.0, 8.0};
    dyn_set(OP_MADD3, FMT_HP, DC_FORCED, v, FMT_HP, "forced_hp");
    // forced half precision with an operand beyond its range: infinity
    v = '{1.0e6, 2.0, 0.25, -3.0, 1.25, 4.0, 0.5, 0.5, -1.0, 6.0, 7.0, 8.0};
    dyn_set(OP_MUL, FMT_HP, DC_FORCED, v, FMT_HP, "forced_overflow");
    // range fallback: half overflows -> DLFloat; -> bfloat16
    dyn_set(OP_MUL, FMT_HP, DC_RANGE, v, FMT_DL, "range_to_dl");
    v[0] = 1.0e20;
    dyn_set(OP_MADD3, FMT_HP, DC_RANGE, v, FMT_BF, "range_to_bf");
    // bfloat16 rounding overflows, single does not: split into two operations
    bfmax_edge = (2.0 - ref_pow2(-10)) * ref_pow2(127);
    v[0] = bfmax_edge;
    v[1] = 0.5;
    dyn_set(OP_MUL, FMT_HP, DC_RANGE, v, FMT_SP, "range_split_sp");
    // beyond single: four double operations
    v[0] = 1.0e40;
    dyn_set(OP_MUL, FMT_BF, DC_RANGE, v, FMT_DP, "range_split_dp");
    // requested format fits
    v = '{1.5, 2.0, 0.25, -3.0, 1.25, 4.0, 0.5, 0.5, -1.0, 6.0, 7.0, 8.0};
    dyn_set(OP_NMSUB3, FMT_SP, DC_RANGE, v, FMT_SP, "range_sp");
    // autonomous: short mantissas -> bfloat16
    dyn_set(OP_MADD3, FMT_DP, DC_AUTO, v, FMT_BF, "auto_bf");
    // ten fraction bits -> half
    v[4] = 1.0 + ref_pow2(-10);
    dyn_set(OP_MSUB3, FMT_DP, DC_AUTO, v, FMT_HP, "auto_hp");
    // twenty fraction bits -> single
    v[4] = 1.0 + ref_pow2(-20);
    dyn_set(OP_ADD, FMT_DP, DC_AUTO, v, FMT_SP, "auto_sp");
    // a full-precision mantissa -> double
    v[4] = 1.0 / 3.0;
    dyn_set(OP_MUL, FMT_DP, DC_AUTO, v, FMT_DP, "auto_dp");
    // random sets under the autonomous behaviour, mixed with direct operations
    for (int n = 0; n < 20; n++) begin
      fmt_e ef;
      int   bits;
      bits = $urandom_range(0, 3);
      for (int k = 0; k < 12; k++) begin
        // small integers and halves: at most 7 fraction bits
        v[k] = real'($urandom_range(1, 255)) * ((k % 2) ? 0.5 : 1.0) * (($urandom_range(0, 1) == 1) ? -1.0 : 1.0);
      end
      ef = FMT_BF;
      if (bits == 1) begin v[7] = 1.0 + ref_pow2(-9); ef = FMT_DL; end
      if (bits == 2) begin v[7] = 1.0 + ref_pow2(-16); ef = FMT_SP; end
      dyn_set(OP_MADD3, FMT_DP, DC_AUTO, v, ef, "auto_random");
      fixed_op(OP_MUL, fmt_e'(n % 5), "fixed");
    end

    repeat (30) @(posedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", q.size());
    end
    mech["backpressure"] = stall_cycles;
    foreach (mech[k]) begin
      $display("  %-16s %0d", k, mech[k]);
      checks++;
      if (mech[k] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
