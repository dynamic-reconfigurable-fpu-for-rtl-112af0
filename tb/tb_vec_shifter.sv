// tb_vec_shifter: checks the vectorized barrel shifter, left and right
// variants, with an independent amount per lane, against lane-wise shifts of
// the extracted lanes; also the sticky bit of the right shifter.
`timescale 1ns/1ps
module tb_vec_shifter;
  logic [127:0] d, qr, ql;
  logic [3:0][7:0] amt;
  logic [1:0] vm;
  logic [3:0] str, stl;
  int checks = 0, failures = 0;

  vec_shifter #(.LEFT(1'b0)) dut_r (.d_i(d), .amt_i(amt), .vmode_i(vm), .d_o(qr), .sticky_o(str));
  vec_shifter #(.LEFT(1'b1)) dut_l (.d_i(d), .amt_i(amt), .vmode_i(vm), .d_o(ql), .sticky_o(stl));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int nl, w;
      d  = {$urandom, $urandom, $urandom, $urandom};
      vm = 2'(n % 3);
      nl = (vm == 0) ? 1 : (vm == 1) ? 2 : 4;
      w  = 128 / nl;
      for (int l = 0; l < 4; l++) amt[l] = 8'($urandom_range(0, (n % 11 == 0) ? 255 : w));
      #1;
      for (int l = 0; l < nl; l++) begin
        logic [255:0] x, er, el, lost;
        x  = (256'(d) >> (w * l)) & ((256'd1 << w) - 1);
        er = (int'(amt[l]) >= w) ? 256'd0 : (x >> amt[l]);
        el = (int'(amt[l]) >= w) ? 256'd0 : ((x << amt[l]) & ((256'd1 << w) - 1));
        lost = (int'(amt[l]) >= w) ? x : (x & ((256'd1 << amt[l]) - 1));
        checks += 3;
        if (((256'(qr) >> (w * l)) & ((256'd1 << w) - 1)) !== er) begin
          failures++;
          if (failures < 10) $display("FAIL right vm=%0d lane %0d amt %0d", vm, l, amt[l]);
        end
        if (((256'(ql) >> (w * l)) & ((256'd1 << w) - 1)) !== el) begin
          failures++;
          if (failures < 10) $display("FAIL left vm=%0d lane %0d amt %0d", vm, l, amt[l]);
        end
        if (str[l] !== (lost != 0)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
