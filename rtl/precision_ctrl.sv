// precision_ctrl: Precision Controller of the transprecision FPU.
//
// A three-state machine (IDLE, ANALYZE, ISSUE) that drives the Downcast Unit.
// In IDLE it accepts a set of twelve double operands (valid_i with a
// dynamic-precision behaviour) and has the DCU load them. In ANALYZE it picks
// the working format from the DCU's analysis, according to dc_behav:
//   DC_FORCED - the format in mode_switch, whatever the range
//   DC_RANGE  - mode_switch if no operand overflows it, else the next wider
//               format that does not: the 16-bit formats in order of
//               exponent range (half, DLFloat, bfloat16), then single, then
//               double; single splits the set into two FPU operations
//   DC_AUTO   - the format with the narrowest fraction (bfloat16 7, DLFloat
//               9, half 10, single 23, double 52 bits) that holds the
//               fraction bits the mantissa analysis found necessary and does
//               not overflow
// In ISSUE it issues one operand group per cycle - one for a 16-bit format,
// two for single, four for double - tagging each with its group number and
// the last one as last, then returns to IDLE. rdy_o is high in IDLE once the
// DCU's output register is free, so a set takes 2 + groups cycles to issue.
// The ordering of the 16-bit formats in DC_RANGE and the encoding of
// dc_behav are choices of this design.
module precision_ctrl
  import fpu_pkg::*;
(
  input  logic       clk_i,
  input  logic       rst_ni,
  input  logic       valid_i,
  input  dc_behav_e  dc_behav_i,
  input  instr_t     instr_i,
  input  logic       dcu_valid_i,  // DCU output register busy
  input  logic [4:0] ovf_i,        // per format, from the DCU
  input  logic [5:0] need_bits_i,  // from the DCU mantissa analysis
  output logic       rdy_o,
  output logic       load_o,
  output logic       issue_o,
  output fmt_e       fmt_o,
  output tag_t       tag_o,
  output op_e        op_o
);

  typedef enum logic [1:0] {S_IDLE, S_ANALYZE, S_ISSUE} state_e;

  state_e    state_q;
  dc_behav_e behav_q;
  fmt_e      req_q, fmt_q;
  op_e       op_q;
  logic [1:0] grp_q;

  function automatic fmt_e choose(dc_behav_e bh, fmt_e req, logic [4:0] ovf, logic [5:0] need);
    fmt_e chain [5];
    fmt_e r;
    int   start;
    r = FMT_DP;
    chain = '{FMT_HP, FMT_DL, FMT_BF, FMT_SP, FMT_DP};
    case (bh)
      DC_FORCED: r = req;
      DC_RANGE: begin
        start = (req == FMT_HP) ? 0 : (req == FMT_DL) ? 1 : (req == FMT_BF) ? 2 :
                (req == FMT_SP) ? 3 : 4;
        r = FMT_DP;
        for (int i = 4; i >= 0; i--)
          if (i >= start && !ovf[chain[i]]) r = chain[i];
      end
      default: begin
        fmt_e byw [5];
        byw = '{FMT_BF, FMT_DL, FMT_HP, FMT_SP, FMT_DP};
        r = FMT_DP;
        for (int i = 4; i >= 0; i--)
          if (int'(need) <= int'(fmt_fbits(byw[i])) && !ovf[byw[i]]) r = byw[i];
      end
    endcase
    return r;
  endfunction

  logic [1:0] last_grp;
  assign last_grp = 2'(4 / fmt_lanes(fmt_q) - 1);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q <= S_IDLE;
      behav_q <= DC_FIXED;
      req_q   <= FMT_DP;
      fmt_q   <= FMT_DP;
      op_q    <= OP_MUL;
      grp_q   <= '0;
    end else begin
      case (state_q)
        S_IDLE:
          if (rdy_o && valid_i && dc_behav_i != DC_FIXED) begin
            behav_q <= dc_behav_i;
            req_q   <= instr_i.mode_switch;
            op_q    <= instr_i.base_opcode;
            state_q <= S_ANALYZE;
          end
        S_ANALYZE: begin
          fmt_q   <= choose(behav_q, req_q, ovf_i, need_bits_i);
          grp_q   <= '0;
          state_q <= S_ISSUE;
        end
        default: begin
          grp_q <= grp_q + 2'd1;
          if (grp_q == last_grp) state_q <= S_IDLE;
        end
      endcase
    end
  end

  assign rdy_o      = (state_q == S_IDLE) && !dcu_valid_i;
  assign load_o     = rdy_o && valid_i && (dc_behav_i != DC_FIXED);
  assign issue_o    = (state_q == S_ISSUE);
  assign fmt_o      = fmt_q;
  assign op_o       = op_q;
  assign tag_o.dyn  = 1'b1;
  assign tag_o.group = grp_q;
  assign tag_o.last = (grp_q == last_grp);

endmodule
