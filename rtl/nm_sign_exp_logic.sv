// nm_sign_exp_logic: exponent, sign and result packing of the near-SRAM FPU.
//
// Combinational. A three-input adder forms the biased result exponent:
//   addition       : exp(BO) + 0       + (lead - 23 + rnd_ovf)
//   multiplication : exp(BO) + exp(SO) + (lead - 35 + rnd_ovf)
// where lead is the position of the leading one of the mantissa adder output (the
// normalisation value) and rnd_ovf the carry out of rounding. The constants fold in the
// exponent bias and the fixed-point position of the 25-bit mantissa value. An exponent
// of 31 or more gives infinity; 0 or less gives a zero of the result's sign (no
// subnormal results). An exact zero from a cancelling addition is +0. A special result
// from the comparator overrides everything.
//
// The three-input adder and its operands follow the paper; the range handling and
// the packing are this design's choices.
module nm_sign_exp_logic
  import nm_pkg::*;
(
  input  fp_op_e            op,
  input  logic [EXP_W-1:0]  bo_exp,
  input  logic [EXP_W-1:0]  so_exp,
  input  logic [LEAD_W-1:0] lead,
  input  logic              rnd_ovf,
  input  logic [FRAC_W-1:0] rnd_frac,
  input  logic              res_sign,
  input  logic              sum_zero,
  input  logic              special,
  input  fp16_t             special_res,
  output fp16_t             result
);

  // Leading-one position of a value 1.0 in the mantissa path: bit 23 for a sum (significand
  // moved up by the guard bits), bit 20 for a product of two significands; the product also
  // carries the exponent bias twice, so one bias is taken off.
  localparam int signed ADD_REF = SIG_W - 1 + GUARD_W;          // 23
  localparam int signed MUL_REF = 2 * FRAC_W + EXP_BIAS;        // 35

  logic signed [7:0] opnd_x, opnd_y, norm, exp_sum;

  always_comb begin
    opnd_x  = 8'(bo_exp);
    opnd_y  = (op == FP_MUL) ? 8'(so_exp) : 8'sd0;
    norm    = $signed(8'(lead)) + $signed(8'(rnd_ovf))
            - ((op == FP_MUL) ? 8'(MUL_REF) : 8'(ADD_REF));
    exp_sum = opnd_x + opnd_y + norm;

    if (special)                 result = special_res;
    else if (sum_zero)           result = 16'h0000;
    else if (exp_sum >= 8'sd31)  result = {res_sign, 5'h1F, 10'h0};
    else if (exp_sum <= 8'sd0)   result = {res_sign, 15'h0};
    else                         result = {res_sign, exp_sum[EXP_W-1:0], rnd_frac};
  end

endmodule
