// nm_fpu_comparator: first stage of the near-SRAM FPU (the "data comparator").
//
// Combinational. It unpacks both binary16 operands (subnormals are flushed to zero),
// orders them by magnitude into the bigger operand (BO) and the smaller operand (SO),
// and computes the exponent difference that the mantissa logic uses to align SO with
// BO in an addition. It also resolves the special cases on its own: NaN, infinity and
// zero operands produce the final result directly (special = 1) and the rest of the
// datapath is bypassed for that operation.
//
// Ordering by magnitude, special-value handling and the result sign follow the
// paper. Flushing subnormals, returning the quiet NaN 0x7E00 and the sign rules
// for zero results (IEEE round-to-nearest rules) are this design's choices.
//
// A subtraction is an addition with the sign of b inverted at the input.
//
// Ports: a, b operands; op selects add, subtract or multiply. Outputs are the BO/SO fields,
// exp_diff = exp(BO) - exp(SO), eff_sub (operands of opposite effective signs), res_sign
// (sign of a regular result) and the special result.
module nm_fpu_comparator
  import nm_pkg::*;
(
  input  fp16_t            a,
  input  fp16_t            b,
  input  fp_op_e           op,
  output logic [EXP_W-1:0] bo_exp,
  output logic [SIG_W-1:0] bo_sig,
  output logic [EXP_W-1:0] so_exp,
  output logic [SIG_W-1:0] so_sig,
  output logic [EXP_W-1:0] exp_diff,
  output logic             eff_sub,
  output logic             res_sign,
  output logic             special,
  output fp16_t            special_res
);

  fp_unpacked_t ua, ub;
  logic         a_bigger;
  fp16_t        bx;      // b with its sign inverted for a subtraction

  always_comb begin
    bx = (op == FP_SUB) ? {~b[15], b[14:0]} : b;
    ua = fp_unpack(a);
    ub = fp_unpack(bx);
    // Magnitude comparison on {exponent, significand}; ties pick a.
    a_bigger = {ua.exp, ua.sig} >= {ub.exp, ub.sig};

    bo_exp   = a_bigger ? ua.exp : ub.exp;
    bo_sig   = a_bigger ? ua.sig : ub.sig;
    so_exp   = a_bigger ? ub.exp : ua.exp;
    so_sig   = a_bigger ? ub.sig : ua.sig;
    exp_diff = bo_exp - so_exp;

    eff_sub  = (op != FP_MUL) && (ua.sign != ub.sign);
    res_sign = (op == FP_MUL) ? (ua.sign ^ ub.sign) : (a_bigger ? ua.sign : ub.sign);

    special     = 1'b0;
    special_res = '0;
    if (op != FP_MUL) begin
      if (ua.is_nan || ub.is_nan || (ua.is_inf && ub.is_inf && ua.sign != ub.sign)) begin
        special = 1'b1; special_res = FP_QNAN;
      end else if (ua.is_inf) begin
        special = 1'b1; special_res = {ua.sign, 15'h7C00};
      end else if (ub.is_inf) begin
        special = 1'b1; special_res = {ub.sign, 15'h7C00};
      end else if (ua.is_zero && ub.is_zero) begin
        special = 1'b1; special_res = {ua.sign & ub.sign, 15'h0};
      end else if (ua.is_zero) begin
        special = 1'b1; special_res = bx;
      end else if (ub.is_zero) begin
        special = 1'b1; special_res = a;
      end
    end else begin
      if (ua.is_nan || ub.is_nan || (ua.is_inf && ub.is_zero) || (ua.is_zero && ub.is_inf)) begin
        special = 1'b1; special_res = FP_QNAN;
      end else if (ua.is_inf || ub.is_inf) begin
        special = 1'b1; special_res = {ua.sign ^ ub.sign, 15'h7C00};
      end else if (ua.is_zero || ub.is_zero) begin
        special = 1'b1; special_res = {ua.sign ^ ub.sign, 15'h0};
      end
    end
  end

endmodule
