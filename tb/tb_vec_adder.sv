// tb_vec_adder: checks the segmented 128-bit adder lane by lane against
// independent wide additions, in all three vector modes, including carries
// that must stop at lane boundaries.
`timescale 1ns/1ps
module tb_vec_adder;
  logic [127:0] a, b, s;
  logic [3:0]   cin, cout;
  logic [1:0]   vm;
  int checks = 0, failures = 0;

  vec_adder dut (.a_i(a), .b_i(b), .cin_i(cin), .vmode_i(vm), .s_o(s), .cout_o(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int nl, w;
      a   = {$urandom, $urandom, $urandom, $urandom};
      b   = {$urandom, $urandom, $urandom, $urandom};
      if (n % 5 == 0) begin a = '1; b = 128'd0; end  // carry ripples to every lane edge
      cin = 4'($urandom);
      vm  = 2'(n % 3);
      nl  = (vm == 0) ? 1 : (vm == 1) ? 2 : 4;
      w   = 128 / nl;
      #1;
      for (int l = 0; l < nl; l++) begin
        logic [128:0] x, y, z;
        x = (129'(a) >> (w * l)) & ((129'd1 << w) - 1);
        y = (129'(b) >> (w * l)) & ((129'd1 << w) - 1);
        z = x + y + 129'(cin[l]);
        checks++;
        if (((129'(s) >> (w * l)) & ((129'd1 << w) - 1)) !== (z & ((129'd1 << w) - 1))) begin
          failures++;
          if (failures < 10) $display("FAIL vm=%0d lane %0d", vm, l);
        end
        checks++;
        if (cout[(l + 1) * (4 / nl) - 1] !== z[w]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
