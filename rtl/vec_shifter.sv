// vec_shifter: 128-bit vectorized logarithmic barrel shifter.
//
// The word holds 1, 2 or 4 lanes (vmode 0/1/2, lanes of 128/64/32 bits) and
// every lane is shifted by its own amount; bits never cross a lane boundary.
// Each of the seven stages moves a bit by 2^k positions when bit k of its
// lane's amount is set, and fills with zeros at the lane edge. Amounts of the
// lane width or more clear the lane. For right shifts the bits that fall out
// of a lane are ORed into sticky_o (one bit per lane), which the aligner and
// the subnormal path of the normalizer use for rounding. The aligner (right
// shift) and the normalizer (left shift) are two instances of this module.
// Purely combinational.
module vec_shifter #(
  parameter bit LEFT = 1'b0
) (
  input  logic [127:0]   d_i,
  input  logic [3:0][7:0] amt_i,  // shift amount per lane, by lane number
  input  logic [1:0]     vmode_i,
  output logic [127:0]   d_o,
  output logic [3:0]     sticky_o
);

  function automatic int lane_of(int p, logic [1:0] vm);
    return (vm == 2'd2) ? p / 32 : (vm == 2'd1) ? p / 64 : 0;
  endfunction

  function automatic int lane_w(logic [1:0] vm);
    return (vm == 2'd2) ? 32 : (vm == 2'd1) ? 64 : 128;
  endfunction

  always_comb begin
    logic [127:0] cur, nxt;
    logic [3:0][7:0] amt;
    int w;
    w = lane_w(vmode_i);
    sticky_o = '0;
    // amounts at or above the lane width clear the whole lane
    for (int l = 0; l < 4; l++) amt[l] = (int'(amt_i[l]) >= w) ? 8'(w) : amt_i[l];
    cur = d_i;
    for (int k = 0; k < 8; k++) begin
      for (int p = 0; p < 128; p++) begin
        int l, src;
        l = lane_of(p, vmode_i);
        src = LEFT ? p - (1 << k) : p + (1 << k);
        if (amt[l][k]) begin
          if (src >= 0 && src < 128 && lane_of(src, vmode_i) == l) nxt[p] = cur[src];
          else nxt[p] = 1'b0;
        end else begin
          nxt[p] = cur[p];
        end
      end
      // bits leaving the lane at its low end (right shift only)
      if (!LEFT)
        for (int p = 0; p < 128; p++) begin
          int l;
          l = lane_of(p, vmode_i);
          if (amt[l][k] && (p - l * w) < (1 << k)) sticky_o[l] = sticky_o[l] | cur[p];
        end
      cur = nxt;
    end
    d_o = cur;
  end

endmodule
