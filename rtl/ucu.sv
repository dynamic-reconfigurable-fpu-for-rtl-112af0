// ucu: Upcast Unit.
//
// Receives the result words of operations issued by the DCU (with their
// format and issue group) and converts every lane back to IEEE double:
// input decode (sign, exponent, fraction, special values), exponent process
// (bias_DP - bias_fmt added back; subnormal lanes, which are normal in
// double, are normalized first), mantissa padding (fraction extended with
// zeros to 52 bits), packing, and the output registers. Lane l of group g
// goes to output slot g*lanes + l, so a set of four results is complete when
// the group marked last arrives: valid_o then rises for one cycle, one clock
// after that last result, with all four doubles and the OR of the set's
// status flags. Infinities and zeros keep their sign, NaNs become the quiet
// double NaN. The conversion is exact.
module ucu
  import fpu_pkg::*;
(
  input  logic             clk_i,
  input  logic             rst_ni,
  input  logic             valid_i,
  input  logic [63:0]      result_i,
  input  fmt_e             fmt_i,
  input  tag_t             tag_i,
  input  status_t          status_i,
  output logic             valid_o,
  output logic [3:0][63:0] operands_o,
  output status_t          status_o
);

  function automatic logic [63:0] upcast(logic [63:0] x, fmt_e f);
    int          eb, fb, bias, e, lz;
    logic        s;
    logic [63:0] m;
    eb   = fmt_ebits(f);
    fb   = fmt_fbits(f);
    bias = fmt_bias(f);
    if (f == FMT_DP) return x;
    s = x[eb + fb];
    e = int'((x >> fb) & ((64'd1 << eb) - 64'd1));
    m = x & ((64'd1 << fb) - 64'd1);
    if (e == (1 << eb) - 1) begin
      if (m != 0) return 64'h7FF8_0000_0000_0000;
      return {s, 11'h7FF, 52'd0};
    end
    if (e == 0) begin
      if (m == 0) return {s, 63'd0};
      // subnormal: normalize
      lz = 0;
      for (int b = 0; b < 64; b++) if (m[b]) lz = fb - b;
      m = (m << lz) & ((64'd1 << fb) - 64'd1);
      e = 1 - lz;
    end
    return {s, 11'(e - bias + 1023), 52'(m << (52 - fb))};
  endfunction

  logic [3:0][63:0] acc_q, acc_d;
  status_t          st_q;

  // lane l of group g lands in slot g*lanes + l
  always_comb begin
    int nl, w;
    nl    = fmt_lanes(fmt_i);
    w     = 64 / nl;
    acc_d = acc_q;
    for (int l = 0; l < 4; l++)
      if (l < nl)
        acc_d[int'(tag_i.group) * nl + l] =
          upcast((w == 64) ? result_i : ((result_i >> (w * l)) & ((64'd1 << w) - 64'd1)), fmt_i);
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      valid_o <= 1'b0;
      st_q    <= '0;
      acc_q   <= '0;
    end else begin
      valid_o <= valid_i && tag_i.last;
      if (valid_i) begin
        acc_q <= acc_d;
        st_q  <= (tag_i.group == 2'd0) ? status_i : (st_q | status_i);
      end
    end
  end

  assign operands_o = acc_q;
  assign status_o   = st_q;

endmodule
