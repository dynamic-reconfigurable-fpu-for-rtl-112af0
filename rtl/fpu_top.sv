// fpu_top: dynamically reconfigurable transprecision FPU.
//
// Wraps the vector FPU with the precision-adaptation path:
//   - fixed precision (dc_behav = DC_FIXED): operands_i[0..2] are the A, B, C
//     words of one vector operation in the format given by the opcode's
//     mode_switch; the result appears in o_operands[0], one register after
//     the vector FPU (six cycles after acceptance).
//   - dynamic precision (any other dc_behav): operands_i[0..11] are four
//     double-precision triples (A,B,C) = (op[3k], op[3k+1], op[3k+2]). The
//     precision controller and the DCU choose a format, convert and pack the
//     triples into 1, 2 or 4 vector operations, the vector FPU computes them
//     and the UCU turns the lanes back into doubles. o_operands[k] is the
//     result of triple k, all four delivered together with one o_valid.
// The input multiplexers give the DCU the vector FPU's inputs whenever it
// issues (use_dcu); new operands of either kind are accepted only while
// dcu_rdy is high. The output multiplexer selects the UCU result or the
// direct result by the tag that travels with each operation. Both output
// paths end in a register, so their results can never collide. o_fmt tells
// the format the vector FPU used. The pipeline enable of the vector FPU is
// held high here: the DCU sequence cannot pause.
// An assertion checks that the two output paths never complete together;
// because its disable condition samples rst_ni on the clock, Verilator's
// lint reports rst_ni as used both synchronously and asynchronously. In
// the logic itself rst_ni is only an asynchronous reset.
module fpu_top
  import fpu_pkg::*;
#(
  parameter int unsigned THRESH = 8
) (
  input  logic                     clk_i,
  input  logic                     rst_ni,
  input  logic                     valid_i,
  input  instr_t                   opcode_i,
  input  logic [NDCU_OP-1:0][63:0] operands_i,
  input  dc_behav_e                dc_behav_i,
  output logic                     dcu_rdy_o,
  output logic                     o_valid_o,
  output logic [NSETS-1:0][63:0]   o_operands_o,
  output status_t                  o_status_o,
  output fmt_e                     o_fmt_o
);

  // precision controller <-> DCU
  logic       pc_load, pc_issue, pc_rdy;
  fmt_e       pc_fmt;
  tag_t       pc_tag;
  op_e        pc_op;
  logic [4:0] dcu_ovf;
  logic [5:0] dcu_need;
  logic       valid_dcu;
  logic [2:0][63:0] dcu_ops;
  tag_t       dcu_tag;
  fmt_e       dcu_fmt;

  precision_ctrl u_pc (
    .clk_i, .rst_ni, .valid_i, .dc_behav_i, .instr_i(opcode_i), .dcu_valid_i(valid_dcu),
    .ovf_i(dcu_ovf), .need_bits_i(dcu_need), .rdy_o(pc_rdy), .load_o(pc_load),
    .issue_o(pc_issue), .fmt_o(pc_fmt), .tag_o(pc_tag), .op_o(pc_op));

  dcu #(.THRESH(THRESH)) u_dcu (
    .clk_i, .rst_ni, .load_i(pc_load), .operands_i, .ovf_o(dcu_ovf), .need_bits_o(dcu_need),
    .issue_i(pc_issue), .fmt_i(pc_fmt), .tag_i(pc_tag), .valid_o(valid_dcu), .ops_o(dcu_ops),
    .tag_o(dcu_tag), .fmt_o(dcu_fmt));

  // input multiplexers
  logic        use_dcu, v_valid;
  instr_t      v_opcode;
  logic [63:0] v_a, v_b, v_c;
  tag_t        v_tag;

  // the controller holds its decoded opcode until the set is issued
  op_e op_hold_q;
  always_ff @(posedge clk_i) if (pc_issue) op_hold_q <= pc_op;

  assign use_dcu = valid_dcu;
  always_comb begin
    if (use_dcu) begin
      v_valid  = 1'b1;
      v_opcode = '{base_opcode: op_hold_q, mode_switch: dcu_fmt};
      v_a      = dcu_ops[0];
      v_b      = dcu_ops[1];
      v_c      = dcu_ops[2];
      v_tag    = dcu_tag;
    end else begin
      v_valid  = valid_i && pc_rdy && (dc_behav_i == DC_FIXED);
      v_opcode = opcode_i;
      v_a      = operands_i[0];
      v_b      = operands_i[1];
      v_c      = operands_i[2];
      v_tag    = '0;
    end
  end

  logic        valid_o;
  logic [63:0] result_o;
  status_t     st_o;
  fmt_e        fmt_o;
  tag_t        tag_o;

  vfpu u_vfpu (
    .clk_i, .rst_ni, .fpu_enable_i(1'b1), .valid_i(v_valid), .instr_i(v_opcode),
    .a_i(v_a), .b_i(v_b), .c_i(v_c), .tag_i(v_tag), .valid_o(valid_o), .result_o(result_o),
    .status_o(st_o), .fmt_o(fmt_o), .tag_o(tag_o));

  logic             valid_uc;
  logic [3:0][63:0] result_uc;
  status_t          st_uc;

  ucu u_ucu (
    .clk_i, .rst_ni, .valid_i(valid_o && tag_o.dyn), .result_i(result_o), .fmt_i(fmt_o),
    .tag_i(tag_o), .status_i(st_o), .valid_o(valid_uc), .operands_o(result_uc),
    .status_o(st_uc));

  // direct path register and output multiplexer
  logic        fix_v_q;
  logic [63:0] fix_r_q;
  status_t     fix_st_q;
  fmt_e        fix_fmt_q, dyn_fmt_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) fix_v_q <= 1'b0;
    else fix_v_q <= valid_o && !tag_o.dyn;
  end
  always_ff @(posedge clk_i) begin
    fix_r_q   <= result_o;
    fix_st_q  <= st_o;
    fix_fmt_q <= fmt_o;
    if (valid_o && tag_o.dyn) dyn_fmt_q <= fmt_o;
  end

  assign dcu_rdy_o = pc_rdy;
  always_comb begin
    o_valid_o = valid_uc | fix_v_q;
    if (valid_uc) begin
      o_operands_o = result_uc;
      o_status_o   = st_uc;
      o_fmt_o      = dyn_fmt_q;
    end else begin
      o_operands_o = '{default: 64'd0};
      o_operands_o[0] = fix_r_q;
      o_status_o   = fix_st_q;
      o_fmt_o      = fix_fmt_q;
    end
  end

  // the two output paths never deliver in the same cycle
  assert property (@(posedge clk_i) disable iff (!rst_ni) !(valid_uc && fix_v_q));

endmodule
