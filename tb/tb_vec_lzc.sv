// tb_vec_lzc: checks the per-lane leading-zero count (and zero flag) on
// words with a random number of leading zeros per lane, in all three modes.
`timescale 1ns/1ps
module tb_vec_lzc;
  logic [127:0] d;
  logic [1:0]   vm;
  logic [3:0][7:0] cnt;
  logic [3:0]   z;
  int checks = 0, failures = 0;

  vec_lzc dut (.d_i(d), .vmode_i(vm), .cnt_o(cnt), .zero_o(z));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int nl, w;
      vm = 2'(n % 3);
      nl = (vm == 0) ? 1 : (vm == 1) ? 2 : 4;
      w  = 128 / nl;
      d  = {$urandom, $urandom, $urandom, $urandom};
      // give each lane a random number of leading zeros (possibly all)
      for (int l = 0; l < nl; l++) begin
        int k;
        k = $urandom_range(0, w);
        for (int b = 0; b < k; b++) d[w * l + w - 1 - b] = 1'b0;
      end
      #1;
      for (int l = 0; l < nl; l++) begin
        int e;
        e = w;
        for (int b = w - 1; b >= 0; b--) if (d[w * l + b] && e == w) e = w - 1 - b;
        checks += 2;
        if (int'(cnt[l]) != e) begin
          failures++;
          if (failures < 10) $display("FAIL vm=%0d lane %0d cnt %0d exp %0d", vm, l, cnt[l], e);
        end
        if (z[l] !== (e == w)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
