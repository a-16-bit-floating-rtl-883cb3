// tb_nm_sign_exp_logic: random inputs to the exponent/sign stage. The expected result
// is built from the meaning of the inputs: the value of a normalised mantissa with its
// leading one at bit `lead` is 2**(lead - 24) times the binary16 significand, so the
// unbiased exponent of an addition is e(BO) - 15 + lead - 23 and that of a product
// e(BO) + e(SO) - 30 + lead - 20, each plus the rounding carry. Out-of-range exponents
// must give infinity or zero, and the special and zero inputs must take precedence.
module tb_nm_sign_exp_logic;
  import nm_pkg::*;

  fp_op_e     op;
  logic [4:0] bo_exp, so_exp, lead;
  logic       rnd_ovf, res_sign, sum_zero, special;
  logic [9:0] rnd_frac;
  fp16_t      special_res, result;
  int checks = 0, failures = 0;

  nm_sign_exp_logic dut (.op, .bo_exp, .so_exp, .lead, .rnd_ovf, .rnd_frac, .res_sign,
                         .sum_zero, .special, .special_res, .result);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 20000; k++) begin
      int    e_unb;
      fp16_t exp_r;
      op       = fp_op_e'($urandom_range(0, 1));
      bo_exp   = 5'($urandom_range(1, 30));
      so_exp   = 5'($urandom_range(1, 30));
      lead     = (op == FP_MUL) ? 5'($urandom_range(20, 21)) : 5'($urandom_range(12, 24));
      rnd_ovf  = 1'($urandom);
      rnd_frac = rnd_ovf ? 10'd0 : 10'($urandom);
      res_sign = 1'($urandom);
      sum_zero = ($urandom_range(0, 19) == 0);
      special  = ($urandom_range(0, 19) == 0);
      special_res = 16'($urandom);
      #1;
      if (op == FP_MUL) e_unb = (int'(bo_exp) - 15) + (int'(so_exp) - 15) + int'(lead) - 20;
      else              e_unb = int'(bo_exp) - 15 + int'(lead) - 23;
      e_unb += int'(rnd_ovf);
      if (special)            exp_r = special_res;
      else if (sum_zero)      exp_r = 16'h0000;
      else if (e_unb > 15)    exp_r = {res_sign, 15'h7C00};
      else if (e_unb < -14)   exp_r = {res_sign, 15'h0000};
      else                    exp_r = {res_sign, 5'(e_unb + 15), rnd_frac};
      checks++;
      if (result !== exp_r) begin
        failures++;
        if (failures < 20) $display("op %0d bo %0d so %0d lead %0d: got %h expected %h",
                                    op, bo_exp, so_exp, lead, result, exp_r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
