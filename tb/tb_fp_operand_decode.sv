// tb_fp_operand_decode: checks the unified sign/exponent/mantissa
// representation produced for every format against the field layout written
// out explicitly per format (slot widths 10/20/40 exponent and 14/28/56
// mantissa bits; overflow bit, implicit bit, fraction, zero padding), and the
// special-value flags.
`timescale 1ns/1ps
module tb_fp_operand_decode;
  import fpu_pkg::*;
  logic [63:0] op;
  fmt_e        f;
  logic [3:0]  s, z, sub, inf, nan, snan;
  logic [39:0] e;
  logic [55:0] m;
  int checks = 0, failures = 0;

  fp_operand_decode dut (.op_i(op), .fmt_i(f), .sign_o(s), .exp_o(e), .mant_o(m),
    .is_zero_o(z), .is_sub_o(sub), .is_inf_o(inf), .is_nan_o(nan), .is_snan_o(snan));

  task automatic chk(logic [3:0] es, logic [39:0] ee, logic [55:0] em, logic [3:0] ez,
                     logic [3:0] ei, logic [3:0] en);
    checks++;
    if (s !== es || e !== ee || m !== em || z !== ez || inf !== ei || nan !== en) begin
      failures++;
      if (failures < 10)
        $display("FAIL f=%0d op=%h s=%b/%b e=%h/%h m=%h/%h z=%b/%b", f, op, s, es, e, ee, m, em, z, ez);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [3:0] es, ez, ei, en;
      logic [39:0] ee;
      logic [55:0] em;
      op = {$urandom, $urandom};
      if (n % 13 == 0) op = 64'h7FF0_0000_0000_0000;
      if (n % 17 == 0) op = 64'h8000_0000_7F80_0000;
      if (n % 19 == 0) op = 64'h0000_7C00_0001_FC01;
      f = fmt_e'(n % 5);
      #1;
      es = 0; ee = 0; em = 0; ez = 0; ei = 0; en = 0;
      case (f)
        FMT_DP: begin
          es = {4{op[63]}};
          ee = {29'd0, (op[62:52] == 0) ? 11'd1 : op[62:52]};
          em = {1'b0, op[62:52] != 0, op[51:0], 2'b00};
          ez[0] = op[62:0] == 0;
          ei[0] = op[62:52] == 11'h7FF && op[51:0] == 0;
          en[0] = op[62:52] == 11'h7FF && op[51:0] != 0;
        end
        FMT_SP: for (int l = 0; l < 2; l++) begin
          logic [31:0] x;
          x = op[32*l +: 32];
          es[2*l] = x[31]; es[2*l+1] = x[31];
          ee[20*l +: 20] = {12'd0, (x[30:23] == 0) ? 8'd1 : x[30:23]};
          em[28*l +: 28] = {1'b0, x[30:23] != 0, x[22:0], 3'b000};
          ez[l] = x[30:0] == 0;
          ei[l] = x[30:23] == 8'hFF && x[22:0] == 0;
          en[l] = x[30:23] == 8'hFF && x[22:0] != 0;
        end
        FMT_HP: for (int l = 0; l < 4; l++) begin
          logic [15:0] x;
          x = op[16*l +: 16];
          es[l] = x[15];
          ee[10*l +: 10] = {5'd0, (x[14:10] == 0) ? 5'd1 : x[14:10]};
          em[14*l +: 14] = {1'b0, x[14:10] != 0, x[9:0], 2'b00};
          ez[l] = x[14:0] == 0;
          ei[l] = x[14:10] == 5'h1F && x[9:0] == 0;
          en[l] = x[14:10] == 5'h1F && x[9:0] != 0;
        end
        FMT_BF: for (int l = 0; l < 4; l++) begin
          logic [15:0] x;
          x = op[16*l +: 16];
          es[l] = x[15];
          ee[10*l +: 10] = {2'd0, (x[14:7] == 0) ? 8'd1 : x[14:7]};
          em[14*l +: 14] = {1'b0, x[14:7] != 0, x[6:0], 5'b00000};
          ez[l] = x[14:0] == 0;
          ei[l] = x[14:7] == 8'hFF && x[6:0] == 0;
          en[l] = x[14:7] == 8'hFF && x[6:0] != 0;
        end
        default: for (int l = 0; l < 4; l++) begin
          logic [15:0] x;
          x = op[16*l +: 16];
          es[l] = x[15];
          ee[10*l +: 10] = {4'd0, (x[14:9] == 0) ? 6'd1 : x[14:9]};
          em[14*l +: 14] = {1'b0, x[14:9] != 0, x[8:0], 3'b000};
          ez[l] = x[14:0] == 0;
          ei[l] = x[14:9] == 6'h3F && x[8:0] == 0;
          en[l] = x[14:9] == 6'h3F && x[8:0] != 0;
        end
      endcase
      chk(es, ee, em, ez, ei, en);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
