// tb_precision_ctrl: checks the Precision Controller's choice of format in
// the forced, range-fallback and autonomous behaviours for given DCU
// analysis results, the number of issued groups with their tags, the
// ready/load handshake, and that the fixed behaviour never loads the DCU.
`timescale 1ns/1ps
module tb_precision_ctrl;
  import fpu_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic valid = 1'b0, dcu_v = 1'b0, rdy, load, issue;
  dc_behav_e behav;
  instr_t instr;
  logic [4:0] ovf;
  logic [5:0] need;
  fmt_e fmt;
  tag_t tag;
  op_e op;
  int checks = 0, failures = 0;

  precision_ctrl dut (.clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .dc_behav_i(behav),
    .instr_i(instr), .dcu_valid_i(dcu_v), .ovf_i(ovf), .need_bits_i(need), .rdy_o(rdy),
    .load_o(load), .issue_o(issue), .fmt_o(fmt), .tag_o(tag), .op_o(op));

  // the DCU output register follows issue by one cycle
  always_ff @(posedge clk) dcu_v <= issue;

  task automatic run(dc_behav_e bh, fmt_e req, logic [4:0] ov, int nb, fmt_e exp_fmt, string nm);
    int groups;
    groups = 0;
    while (!rdy) @(posedge clk);
    #1;
    behav = bh;
    instr = '{base_opcode: OP_MADD3, mode_switch: req};
    ovf = ov;
    need = 6'(nb);
    valid = 1'b1;
    #1;
    checks++;
    if (!load) begin failures++; $display("FAIL %s: no load", nm); end
    @(posedge clk); #1;
    valid = 1'b0;
    checks++;
    if (rdy) failures++;  // busy while analysing
    @(posedge clk); #1;   // analysis done
    while (issue) begin
      checks++;
      if (fmt != exp_fmt || int'(tag.group) != groups || !tag.dyn || op != OP_MADD3) begin
        failures++;
        $display("FAIL %s: fmt %0d expected %0d, group %0d", nm, fmt, exp_fmt, tag.group);
      end
      groups++;
      checks++;
      if (tag.last != (groups == 4 / int'(fmt_lanes(exp_fmt)))) failures++;
      @(posedge clk); #1;
    end
    checks++;
    if (groups != 4 / int'(fmt_lanes(exp_fmt))) begin
      failures++;
      $display("FAIL %s: %0d groups", nm, groups);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    behav = DC_FIXED; instr = '0; ovf = '0; need = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    // fixed precision: the DCU is left alone
    behav = DC_FIXED; valid = 1'b1;
    #1;
    checks++;
    if (load || !rdy) failures++;
    @(posedge clk); #1; valid = 1'b0;
    checks++;
    if (issue || !rdy) failures++;

    run(DC_FORCED, FMT_HP, 5'b11111, 52, FMT_HP, "forced_hp");
    run(DC_FORCED, FMT_SP, 5'b00000, 0, FMT_SP, "forced_sp");
    run(DC_RANGE, FMT_HP, 5'b00000, 52, FMT_HP, "range_hp");
    run(DC_RANGE, FMT_HP, 5'b00100, 52, FMT_DL, "range_hp_dl");
    run(DC_RANGE, FMT_HP, 5'b10100, 52, FMT_BF, "range_hp_bf");
    run(DC_RANGE, FMT_HP, 5'b11100, 52, FMT_SP, "range_split_sp");
    run(DC_RANGE, FMT_BF, 5'b11110, 0, FMT_DP, "range_dp");
    run(DC_RANGE, FMT_SP, 5'b00000, 0, FMT_SP, "range_sp");
    run(DC_AUTO, FMT_DP, 5'b00000, 3, FMT_BF, "auto_bf");
    run(DC_AUTO, FMT_DP, 5'b00000, 8, FMT_DL, "auto_dl");
    run(DC_AUTO, FMT_DP, 5'b00000, 10, FMT_HP, "auto_hp");
    run(DC_AUTO, FMT_DP, 5'b00000, 11, FMT_SP, "auto_sp");
    run(DC_AUTO, FMT_DP, 5'b00000, 30, FMT_DP, "auto_dp");
    run(DC_AUTO, FMT_DP, 5'b01000, 5, FMT_DL, "auto_bf_ovf");
    run(DC_AUTO, FMT_DP, 5'b11110, 0, FMT_DP, "auto_all_ovf");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
