// tb_vec_multiplier: checks the 16-partial-product multiplier in its three
// vector modes against lane-wise products computed with plain wide
// multiplication, and the set of partial multipliers enabled in each mode.
`timescale 1ns/1ps
module tb_vec_multiplier;
  logic [55:0]  a, b;
  logic [1:0]   vm;
  logic [111:0] p, e;
  logic [15:0]  en;
  int checks = 0, failures = 0;

  vec_multiplier dut (.a_i(a), .b_i(b), .vmode_i(vm), .p_o(p), .pp_en_o(en));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      a  = {$urandom, $urandom};
      b  = {$urandom, $urandom};
      if (n % 7 == 0) begin a = '1; b = '1; end
      vm = 2'(n % 3);
      #1;
      case (vm)
        2'd0: e = 112'(a) * 112'(b);
        2'd1: e = {56'(a[55:28]) * 56'(b[55:28]), 56'(a[27:0]) * 56'(b[27:0])};
        default: e = {28'(a[55:42]) * 28'(b[55:42]), 28'(a[41:28]) * 28'(b[41:28]),
                      28'(a[27:14]) * 28'(b[27:14]), 28'(a[13:0]) * 28'(b[13:0])};
      endcase
      checks++;
      if (p !== e) begin
        failures++;
        if (failures < 10) $display("FAIL vm=%0d a=%h b=%h p=%h exp=%h", vm, a, b, p, e);
      end
      checks++;
      if ($countones(en) != ((vm == 0) ? 16 : (vm == 1) ? 8 : 4)) failures++;
    end
    // 16-bit mode uses exactly pp0, pp5, pp10, pp15
    vm = 2'd2; #1;
    checks++;
    if (en !== 16'h8421) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
