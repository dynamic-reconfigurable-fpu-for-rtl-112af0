// vec_lzc: leading-zero counter of the 128-bit vectorized sum, one count per
// lane (vmode 0: one 128-bit lane, 1: two 64-bit lanes, 2: four 32-bit lanes).
//
// It counts the zeros above the leading one of every 32-bit segment and then
// chains the segment counts inside each lane: a segment contributes only if
// all segments above it in the same lane are zero. An all-zero lane counts
// its full width. The count is exact and is taken from the finished sum; it
// feeds the normalizer's shift and the exponent correction. Combinational.
module vec_lzc (
  input  logic [127:0]    d_i,
  input  logic [1:0]      vmode_i,
  output logic [3:0][7:0] cnt_o,    // leading zeros per lane, by lane number
  output logic [3:0]      zero_o    // lane is all zero
);

  logic [3:0][5:0] seg_cnt;
  logic [3:0]      seg_zero;

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      seg_cnt[k]  = 6'd32;
      seg_zero[k] = 1'b1;
      for (int b = 0; b < 32; b++)
        if (d_i[32*k + b]) begin
          seg_cnt[k]  = 6'(31 - b);
          seg_zero[k] = 1'b0;
        end
    end
  end

  always_comb begin
    cnt_o  = '0;
    zero_o = '0;
    case (vmode_i)
      2'd2: for (int l = 0; l < 4; l++) begin
        cnt_o[l]  = 8'(seg_cnt[l]);
        zero_o[l] = seg_zero[l];
      end
      2'd1: for (int l = 0; l < 2; l++) begin
        cnt_o[l]  = seg_zero[2*l+1] ? 8'(32 + seg_cnt[2*l]) : 8'(seg_cnt[2*l+1]);
        zero_o[l] = seg_zero[2*l+1] & seg_zero[2*l];
      end
      default: begin
        cnt_o[0] = 8'd128;
        for (int k = 0; k < 4; k++)
          if (!seg_zero[k]) cnt_o[0] = 8'(32 * (3 - k) + seg_cnt[k]);
        zero_o[0] = &seg_zero;
      end
    endcase
  end

endmodule
