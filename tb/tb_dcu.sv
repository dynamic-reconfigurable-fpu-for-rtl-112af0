// tb_dcu: checks the Downcast Unit: mantissa analysis (bits needed, with the
// default threshold of 8 zeros), per-format overflow detection, and the
// rounding and packing of every issue group in every format against the
// reference conversion. Also checks that packed words appear one cycle
// after issue.
`timescale 1ns/1ps
module tb_dcu;
  import fpu_pkg::*;
  `include "tb_fp_ref.svh"

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic load = 1'b0, issue = 1'b0, vo;
  logic [NDCU_OP-1:0][63:0] ops_in;
  logic [4:0] ovf;
  logic [5:0] need;
  fmt_e fmt, fmt_o;
  tag_t tag, tag_o;
  logic [2:0][63:0] ops_o;
  int checks = 0, failures = 0;

  dcu dut (.clk_i(clk), .rst_ni(rst_n), .load_i(load), .operands_i(ops_in), .ovf_o(ovf),
    .need_bits_o(need), .issue_i(issue), .fmt_i(fmt), .tag_i(tag), .valid_o(vo), .ops_o(ops_o),
    .tag_o(tag_o), .fmt_o(fmt_o));

  task automatic expect_eq(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 15) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // bits needed: scan the fraction from its MSB; the first one followed by
  // 8 or more zeros (or by nothing but zeros) ends the needed bits
  function automatic int ref_need(logic [63:0] x);
    logic [51:0] f;
    f = x[51:0];
    if (x[62:52] == 0 || x[62:52] == 11'h7FF) return 0;
    for (int i = 0; i < 52; i++)
      if (f[51 - i]) begin
        int z;
        logic more;
        z = 0;
        more = 1'b0;
        for (int j = i + 1; j < 52; j++) begin
          if (f[51 - j]) begin more = 1'b1; break; end
          z++;
        end
        if (z >= 8 || !more) return i + 1;
      end
    return 0;
  endfunction

  function automatic int ref_need_set(real v[12]);
    int m;
    m = 0;
    foreach (v[k]) if (ref_need($realtobits(v[k])) > m) m = ref_need($realtobits(v[k]));
    return m;
  endfunction

  task automatic load_set(real v[12]);
    for (int k = 0; k < 12; k++) ops_in[k] = $realtobits(v[k]);
    load = 1'b1;
    @(posedge clk); #1;
    load = 1'b0;
  endtask

  // issue every group of format f and compare the packed words
  task automatic check_pack(real v[12], fmt_e f);
    int nl, w;
    nl = ref_nl(int'(f));
    w  = 64 / nl;
    for (int g = 0; g < 4 / nl; g++) begin
      fmt = f;
      tag = '{dyn: 1'b1, group: 2'(g), last: (g == 4 / nl - 1)};
      issue = 1'b1;
      @(posedge clk); #1;
      issue = 1'b0;
      checks++;
      if (!vo || tag_o.group != 2'(g) || fmt_o != f) failures++;
      for (int o = 0; o < 3; o++) begin
        logic [63:0] e;
        e = 0;
        for (int l = 0; l < nl; l++) e |= ref_from_real(v[3 * (g * nl + l) + o], int'(f)) << (w * l);
        expect_eq(ops_o[o], e, $sformatf("pack f%0d g%0d op%0d", f, g, o));
      end
      @(posedge clk); #1;
      checks++;
      if (vo) failures++;
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v[12];
    issue = 0; load = 0; fmt = FMT_DP; tag = '0; ops_in = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // set 1: small values, exact in every format; 10.0 needs two fraction bits
    v = '{1.5, -2.0, 0.25, 3.0, 10.0, -0.75, 6.0, 1.0, 2.0, 0.5, -4.0, 8.0};
    load_set(v);
    expect_eq(64'(ovf), 0, "ovf set1");
    expect_eq(64'(need), 2, "need set1");
    check_pack(v, FMT_HP);
    check_pack(v, FMT_BF);
    check_pack(v, FMT_DL);
    check_pack(v, FMT_SP);
    check_pack(v, FMT_DP);

    // set 2: 1e6 overflows half only; 1+2^-9 needs 9 bits
    v = '{1.5, 1.0e6, 1.001953125, 3.0, -10.0, 0.75, 6.0, 1.0, 2.0, 0.5, -4.0, 8.0};
    load_set(v);
    expect_eq(64'(ovf), 64'(5'b00100), "ovf set2");
    expect_eq(64'(need), 64'(ref_need_set(v)), "need set2");  // 1e6 needs 13 bits
    check_pack(v, FMT_DL);
    check_pack(v, FMT_SP);

    // set 3: 1e40 overflows every format but double; 1+2^-1+2^-20 needs 1 bit
    v = '{1.0e40, 1.5000009536743164, 2.0, 3.0, -10.0, 0.75, 6.0, 1.0, 2.0, 0.5, -4.0, 8.0};
    load_set(v);
    expect_eq(64'(ovf), 64'(5'b11110), "ovf set3");
    expect_eq(64'(need), 64'(ref_need_set(v)), "need set3");
    check_pack(v, FMT_DP);
    check_pack(v, FMT_HP);  // overflow packs an infinity

    // set 4: alternating fraction bits need all 52
    v = '{$bitstoreal(64'h3FF5_5555_5555_5555), 1.0, 1.0, 1.0, 1.0, 1.0, 1.0, 1.0, 1.0, 1.0, 1.0, 1.0};
    load_set(v);
    expect_eq(64'(need), 52, "need set4");
    check_pack(v, FMT_SP);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
