// tb_nm_fpu_comparator: random and special operand pairs through the comparator, in
// all three operations (a subtraction is checked as an addition of -b).
// The bigger/smaller operand choice is checked against the real-valued magnitudes,
// the exponent difference and effective-subtraction flag against the operand fields,
// and the special-case detection and result against the reference arithmetic.
module tb_nm_fpu_comparator;
  import nm_pkg::*;
  import fp16_ref_pkg::*;

  fp16_t            a, b;
  fp_op_e           op;
  logic [4:0]       bo_exp, so_exp, exp_diff;
  logic [10:0]      bo_sig, so_sig;
  logic             eff_sub, res_sign, special;
  fp16_t            special_res;
  int checks = 0, failures = 0;

  nm_fpu_comparator dut (.a, .b, .op, .bo_exp, .bo_sig, .so_exp, .so_sig, .exp_diff,
                         .eff_sub, .res_sign, .special, .special_res);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%s: a=%h b=%h op=%0d", what, a, b, op);
    end
  endtask

  initial begin
    fp16_t specials[] = '{16'h0000, 16'h8000, 16'h7C00, 16'hFC00, 16'h7E01, 16'h0200, 16'h3C00, 16'hC500};
    for (int k = 0; k < 20000; k++) begin
      bit spec_a, spec_b, exp_special;
      fp16_t bb;
      a  = (k % 5 == 0) ? specials[$urandom_range(0, 7)] : 16'($urandom);
      b  = (k % 7 == 0) ? specials[$urandom_range(0, 7)] : 16'($urandom);
      op = fp_op_e'(k % 3);
      bb = (op == FP_SUB) ? {~b[15], b[14:0]} : b;
      #1;
      spec_a = is_zero16(a) || is_inf16(a) || is_nan16(a);
      spec_b = is_zero16(b) || is_inf16(b) || is_nan16(b);
      exp_special = spec_a || spec_b;
      check(special == exp_special, "special flag");
      if (exp_special) begin
        check(same16(special_res, (op == FP_MUL) ? ref_mul(a, b) : ref_add(a, bb)), "special result");
      end else begin
        real ra, rb;
        fp16_t bigger, smaller;
        ra = to_real(a); rb = to_real(bb);
        bigger   = ((ra < 0 ? -ra : ra) >= (rb < 0 ? -rb : rb)) ? a : bb;
        smaller = (bigger == a) ? bb : a;
        check(bo_exp == bigger[14:10] && bo_sig == {1'b1, bigger[9:0]}, "bigger operand");
        check(so_exp == smaller[14:10] && so_sig == {1'b1, smaller[9:0]}, "smaller operand");
        check(exp_diff == bigger[14:10] - smaller[14:10], "exponent difference");
        check(eff_sub == (op != FP_MUL && a[15] != bb[15]), "effective subtraction");
        check(res_sign == ((op == FP_MUL) ? (a[15] ^ b[15]) : bigger[15]), "result sign");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
