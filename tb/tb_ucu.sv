// tb_ucu: checks the Upcast Unit: every format's lanes (normal, subnormal,
// zero, infinity, NaN) converted to double against the exact reference
// value, results gathered into the right slots over one, two or four
// groups, valid_o one cycle after the last group only, and the ORed flags.
`timescale 1ns/1ps
module tb_ucu;
  import fpu_pkg::*;
  `include "tb_fp_ref.svh"

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic vi = 1'b0, vo;
  logic [63:0] r;
  fmt_e f;
  tag_t tag;
  status_t st, sto;
  logic [3:0][63:0] outs;
  int checks = 0, failures = 0;

  ucu dut (.clk_i(clk), .rst_ni(rst_n), .valid_i(vi), .result_i(r), .fmt_i(f), .tag_i(tag),
    .status_i(st), .valid_o(vo), .operands_o(outs), .status_o(sto));

  // send one set in format fm, lanes given as right-aligned values
  task automatic send_set(fmt_e fm, logic [63:0] lanes[4]);
    int nl, w;
    nl = ref_nl(int'(fm));
    w  = 64 / nl;
    for (int g = 0; g < 4 / nl; g++) begin
      r = 0;
      for (int l = 0; l < nl; l++) r |= lanes[g * nl + l] << (w * l);
      f = fm;
      tag = '{dyn: 1'b1, group: 2'(g), last: (g == 4 / nl - 1)};
      st = (g == 0) ? status_t'(4'b0001) : status_t'(4'b0100);
      vi = 1'b1;
      @(posedge clk); #1;
      vi = 1'b0;
      checks++;
      if (vo !== (g == 4 / nl - 1)) begin
        failures++;
        $display("FAIL valid timing fmt %0d group %0d", fm, g);
      end
    end
    for (int k = 0; k < 4; k++) begin
      logic [63:0] e;
      e = (fm == 0) ? lanes[k] :  // double lanes pass unchanged
          ref_is_nan(lanes[k], int'(fm)) ? 64'h7FF8_0000_0000_0000 :
          $realtobits(ref_to_real(lanes[k], int'(fm)));
      checks++;
      if (outs[k] !== e) begin
        failures++;
        if (failures < 15) $display("FAIL fmt %0d slot %0d: got %h expected %h", fm, k, outs[k], e);
      end
    end
    checks++;
    if (sto !== ((4 / nl == 1) ? status_t'(4'b0001) : status_t'(4'b0101))) failures++;
    @(posedge clk); #1;
    checks++;
    if (vo) failures++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] lanes[4];
    vi = 0; r = 0; f = FMT_DP; tag = '0; st = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int fm = 0; fm < 5; fm++) begin
      int eb, fb, w;
      eb = ref_eb(fm);
      fb = ref_fb(fm);
      w  = 1 + eb + fb;
      // special lanes: subnormal, -inf, NaN, -0
      lanes[0] = 64'd5;
      lanes[1] = (64'd1 << (w - 1)) | (((64'd1 << eb) - 1) << fb);
      lanes[2] = (((64'd1 << eb) - 1) << fb) | 64'd1;
      lanes[3] = 64'd1 << (w - 1);
      send_set(fmt_e'(fm), lanes);
      for (int n = 0; n < 100; n++) begin
        for (int k = 0; k < 4; k++) lanes[k] = ref_rand_lane(fm, -(1 << (eb - 1)) + 2, (1 << (eb - 1)) - 1, 64);
        if (n % 4 == 0) lanes[n % 3] = 64'($urandom_range(1, 200));  // subnormal
        send_set(fmt_e'(fm), lanes);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
