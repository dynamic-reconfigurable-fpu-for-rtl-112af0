// vec_multiplier: 56x56-bit vectorized mantissa multiplier.
//
// The 56-bit operands are cut into four 14-bit digits a[i], b[j]. Partial
// multiplier number 4*i+j forms a[i]*b[j], weighted by 2^(14*(i+j)), which
// reproduces the published layout of the 16 partial products (pp0 at bits
// 27:0, pp5 at 55:28, pp10 at 83:56, pp15 at 111:84, and so on). Which partial
// multipliers are enabled depends on the vector mode, as the design states:
//   4x16 (vmode 2): pp0, pp5, pp10, pp15 - lane l product at bits 28l+27:28l
//   2x32 (vmode 1): additionally pp1, pp4, pp11, pp14 - lane l at 56l+55:56l
//   1x64 (vmode 0): all sixteen - one 112-bit product
// Disabled partial multipliers get zero operands (operand isolation), so the
// lanes never disturb each other. The unit is purely combinational.
module vec_multiplier
  import fpu_pkg::*;
(
  input  logic [55:0]  a_i,
  input  logic [55:0]  b_i,
  input  logic [1:0]   vmode_i,  // 0 = 1x64, 1 = 2x32, 2 = 4x16
  output logic [111:0] p_o,
  output logic [15:0]  pp_en_o   // enabled partial multipliers, for visibility
);

  logic [15:0] en;
  logic [27:0] pp [16];

  always_comb begin
    en = 16'hFFFF;
    if (vmode_i == 2'd2)      en = 16'b1000_0100_0010_0001;  // 15,10,5,0
    else if (vmode_i == 2'd1) en = 16'b1100_1100_0011_0011;  // + 1,4,11,14
  end

  for (genvar i = 0; i < 4; i++) begin : g_a
    for (genvar j = 0; j < 4; j++) begin : g_b
      logic [13:0] da, db;
      assign da = en[4*i+j] ? a_i[14*i +: 14] : 14'd0;
      assign db = en[4*i+j] ? b_i[14*j +: 14] : 14'd0;
      assign pp[4*i+j] = da * db;
    end
  end

  always_comb begin
    p_o = '0;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        p_o = p_o + ({84'd0, pp[4*i+j]} << (14 * (i + j)));
  end

  assign pp_en_o = en;

endmodule
