// tb_oh_exp_add - exhaustive check of the one-hot multiplier.
//
// Applies every pair of 16-bit one-hot codes (4-bit exponent) and compares
// the decoded product with the integer product of the decoded operands.
module tb_oh_exp_add;
  import tb_ohn_util::*;

  localparam int EW = 4;
  logic [EW+1:0] w, a;
  logic [EW:0]   p_exp;
  logic          p_neg, p_nz;
  int checks = 0, failures = 0;

  oh_exp_add #(.EW(EW)) dut (.w_code(w), .a_code(a), .p_exp(p_exp), .p_neg(p_neg), .p_nz(p_nz));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exp_v, got_v;
    for (int i = 0; i < (1 << (EW + 2)); i++) begin
      for (int j = 0; j < (1 << (EW + 2)); j++) begin
        w = (EW+2)'(i);
        a = (EW+2)'(j);
        #1;
        exp_v = oh_val(8'(w), EW) * oh_val(8'(a), EW);
        got_v = p_nz ? (p_neg ? -(longint'(1) << p_exp) : (longint'(1) << p_exp)) : 0;
        checks++;
        if (exp_v != got_v) begin
          failures++;
          if (failures < 10) $display("mismatch w=%h a=%h exp=%0d got=%0d", w, a, exp_v, got_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
