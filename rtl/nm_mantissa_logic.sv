// nm_mantissa_logic: the mantissa datapath of the near-SRAM FPU.
//
// Combinational. Its core is one multiplier that doubles as a shifter (multiplying by
// a one-hot code shifts left by the code's position) and one adder. Multiplexers in
// front of the multiplier select its operands for the two rounds of an operation:
//   R1, addition       : SO significand x one-hot(13 - exp_diff)  -> SO aligned to BO
//                        (exp_diff > 13: SO is folded into a sticky 1 x one-hot(0))
//   R1, multiplication : BO significand x SO significand          -> full product
//   R2, both           : looped-back value x one-hot(24 - lead)   -> leading one at bit 24
// The adder adds or subtracts the aligned SO to BO (placed 13 bits up); in a
// multiplication it is bypassed and passes the R1 product on. A leading-one detector
// on the adder output gives the normalisation amount. The rounding incrementer turns
// the normalised value into an 11-bit significand with round-to-nearest-even.
//
// The shared multiplier, its R1/R2 multiplexers, the bypassed adder in multiplication
// and the normalisation by the multiplier follow the paper. The paper's
// multiplier is 11 bits wide for the significand product; here its first operand is
// widened to 25 bits so that the same unit can shift the 13-bit guard-extended sum in
// R2, which is what makes the rounding exact. Guard width, rounding mode and the
// leading-one detector are this design's choices.
module nm_mantissa_logic
  import nm_pkg::*;
(
  input  logic              round_r2,   // 0: round R1, 1: round R2
  input  fp_op_e            op,
  input  logic              so_far,     // addition with exp_diff > GUARD_W
  input  logic [SIG_W-1:0]  bo_sig,
  input  logic [SIG_W-1:0]  so_sig,
  input  logic [SH_W-1:0]   shift_code, // one-hot shift code
  input  logic [WIDE_W-1:0] loop_val,   // value looped back for R2
  output logic [WIDE_W-1:0] mul_out,    // multiplier/shifter result
  // adder
  input  logic [WIDE_W-1:0] r1_val,     // registered R1 result
  input  logic              eff_sub,
  output logic [WIDE_W-1:0] sum,
  output logic [LEAD_W-1:0] lead,       // position of the leading one of sum
  output logic              sum_zero,
  output logic [SHAMT_W-1:0] norm_amt,  // left shift that brings the leading one to bit 24
  // rounding
  input  logic [WIDE_W-1:0] norm_val,   // registered R2 result, leading one at bit 24
  output logic [FRAC_W-1:0] rnd_frac,
  output logic              rnd_ovf     // rounding carried into a new leading bit
);

  logic [WIDE_W-1:0] mul_a;
  logic [SH_W-1:0]   mul_b;
  logic [WIDE_W+SH_W-1:0] mul_full;
  logic [WIDE_W-1:0] bo_al;
  logic              guard, sticky, lsb, up;
  logic [SIG_W:0]    sig_inc;

  // Operand multiplexers of the multiplier/shifter.
  always_comb begin
    if (round_r2) begin
      mul_a = loop_val;
      mul_b = shift_code;
    end else if (op == FP_MUL) begin
      mul_a = WIDE_W'(so_sig);
      mul_b = SH_W'(bo_sig);
    end else begin
      mul_a = so_far ? WIDE_W'(1) : WIDE_W'(so_sig);
      mul_b = shift_code;
    end
  end

  assign mul_full = mul_a * mul_b;
  assign mul_out  = mul_full[WIDE_W-1:0];

  // Mantissa adder, bypassed in a multiplication.
  assign bo_al = WIDE_W'(bo_sig) << GUARD_W;
  always_comb begin
    if (op == FP_MUL) sum = r1_val;
    else if (eff_sub) sum = bo_al - r1_val;
    else              sum = bo_al + r1_val;
  end

  // Leading-one detector.
  always_comb begin
    lead = '0;
    for (int unsigned k = 0; k < WIDE_W; k++) begin
      if (sum[k]) lead = LEAD_W'(k);
    end
  end
  assign sum_zero = (sum == '0);
  assign norm_amt = SHAMT_W'((WIDE_W - 1) - lead);

  // Round to nearest, ties to even.
  assign guard   = norm_val[WIDE_W-1-SIG_W];
  assign sticky  = |norm_val[WIDE_W-2-SIG_W:0];
  assign lsb     = norm_val[WIDE_W-SIG_W];
  assign up      = guard & (sticky | lsb);
  assign sig_inc = {1'b0, norm_val[WIDE_W-1 -: SIG_W]} + (SIG_W+1)'(up);
  assign rnd_ovf  = sig_inc[SIG_W];
  assign rnd_frac = rnd_ovf ? '0 : sig_inc[FRAC_W-1:0];

endmodule
