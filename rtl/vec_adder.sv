// vec_adder: 128-bit vectorized adder.
//
// Computes a + b + cin per lane, where the 128-bit word holds one 128-bit
// lane (vmode 0), two 64-bit lanes (vmode 1) or four 32-bit lanes (vmode 2).
// It is built from four 32-bit segments; the carry between segments is passed
// on only where the segments belong to the same lane, and otherwise replaced
// by that lane's own carry-in. The carry out of each lane is reported at the
// index of the lane's top segment (cout_o[3] for vmode 0, cout_o[1] and
// cout_o[3] for vmode 1). The same unit serves as accumulator (a + b) and as
// complementer (~x + 1). Purely combinational.
module vec_adder (
  input  logic [127:0] a_i,
  input  logic [127:0] b_i,
  input  logic [3:0]   cin_i,   // carry-in per lane, indexed by lane number
  input  logic [1:0]   vmode_i, // 0 = 1x128, 1 = 2x64, 2 = 4x32
  output logic [127:0] s_o,
  output logic [3:0]   cout_o   // carry out of each 32-bit segment
);

  always_comb begin
    logic        c;
    logic [32:0] seg;
    c = 1'b0;
    for (int k = 0; k < 4; k++) begin
      // start of a lane: take the lane's carry-in
      if (k == 0 || vmode_i == 2'd2 || (vmode_i == 2'd1 && k == 2))
        c = cin_i[(vmode_i == 2'd2) ? k : (vmode_i == 2'd1) ? k / 2 : 0];
      seg = {1'b0, a_i[32*k +: 32]} + {1'b0, b_i[32*k +: 32]} + {32'd0, c};
      s_o[32*k +: 32] = seg[31:0];
      cout_o[k] = seg[32];
      c = seg[32];
    end
  end

endmodule
