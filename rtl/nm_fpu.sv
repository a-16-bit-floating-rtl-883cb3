// nm_fpu: near-SRAM 16-bit floating-point unit (binary16 add, subtract and multiply).
//
// One operation at a time, five cycles each. The comparator, the mantissa logic (one
// multiplier/shifter and one adder) and the sign/exponent logic are used in sequence:
//   cycle 0  start: the comparator orders the operands, its outputs are registered
//   cycle 1  R1: multiplier aligns SO (add) or multiplies the significands (mul)
//   cycle 2  the mantissa adder adds/subtracts (bypassed for mul); leading one found
//   cycle 3  R2: multiplier shifts the sum/product so that its leading one is at bit 24
//   cycle 4  rounding and the three-input exponent adder; result registered
//   cycle 5  done = 1 for one cycle, result valid (it stays until the next start)
// Because R1 and R2 share the multiplier, the unit is not pipelined: start is only
// accepted while busy is low. A start may be given in the cycle done is high.
//
// The five-cycle latency, the unit split and the reuse of the multiplier in two rounds
// follow the paper. The assignment of work to cycles, round-to-nearest-even,
// flushing subnormals to zero and the start/done handshake are this design's choices.
module nm_fpu
  import nm_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  fp_op_e op,
  input  fp16_t  a,
  input  fp16_t  b,
  output logic   busy,
  output logic   done,
  output fp16_t  result
);

  typedef enum logic [2:0] {S_IDLE, S_R1, S_ADD, S_R2, S_EXP} state_e;
  state_e state_q;

  // comparator outputs and their registers
  logic [EXP_W-1:0] c_bo_exp, c_so_exp, c_diff;
  logic [SIG_W-1:0] c_bo_sig, c_so_sig;
  logic             c_eff_sub, c_sign, c_special;
  fp16_t            c_special_res;

  fp_op_e           op_q;
  logic [EXP_W-1:0] bo_exp_q, so_exp_q, diff_q;
  logic [SIG_W-1:0] bo_sig_q, so_sig_q;
  logic             eff_sub_q, sign_q, special_q;
  fp16_t            special_res_q;

  // mantissa path
  logic [SHAMT_W-1:0] sh_amt, norm_amt, norm_amt_q;
  logic [SH_W-1:0]    sh_code;
  logic [WIDE_W-1:0]  mul_out, sum, r1_q, sum_q, norm_q;
  logic [LEAD_W-1:0]  lead, lead_q;
  logic               sum_zero, sum_zero_q, so_far, rnd_ovf, round_r2;
  logic [FRAC_W-1:0]  rnd_frac;
  fp16_t              res_d;

  nm_fpu_comparator u_cmp (
    .a, .b, .op,
    .bo_exp(c_bo_exp), .bo_sig(c_bo_sig), .so_exp(c_so_exp), .so_sig(c_so_sig),
    .exp_diff(c_diff), .eff_sub(c_eff_sub), .res_sign(c_sign),
    .special(c_special), .special_res(c_special_res)
  );

  assign round_r2 = (state_q == S_R2);
  assign so_far   = diff_q > EXP_W'(GUARD_W);
  assign sh_amt   = round_r2 ? norm_amt_q
                  : (so_far ? '0 : SHAMT_W'(EXP_W'(GUARD_W) - diff_q));

  nm_shift_onehot #(.W(SH_W), .AMT_W(SHAMT_W)) u_onehot (
    .amt(sh_amt), .onehot(sh_code)
  );

  nm_mantissa_logic u_mant (
    .round_r2, .op(op_q), .so_far,
    .bo_sig(bo_sig_q), .so_sig(so_sig_q), .shift_code(sh_code),
    .loop_val(sum_q), .mul_out,
    .r1_val(r1_q), .eff_sub(eff_sub_q), .sum, .lead, .sum_zero, .norm_amt,
    .norm_val(norm_q), .rnd_frac, .rnd_ovf
  );

  nm_sign_exp_logic u_sexp (
    .op(op_q), .bo_exp(bo_exp_q), .so_exp(so_exp_q), .lead(lead_q),
    .rnd_ovf, .rnd_frac, .res_sign(sign_q), .sum_zero(sum_zero_q),
    .special(special_q), .special_res(special_res_q), .result(res_d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q       <= S_IDLE;
      op_q          <= FP_ADD;
      bo_exp_q      <= '0;
      so_exp_q      <= '0;
      diff_q        <= '0;
      bo_sig_q      <= '0;
      so_sig_q      <= '0;
      eff_sub_q     <= 1'b0;
      sign_q        <= 1'b0;
      special_q     <= 1'b0;
      special_res_q <= '0;
      r1_q          <= '0;
      sum_q         <= '0;
      lead_q        <= '0;
      sum_zero_q    <= 1'b0;
      norm_amt_q    <= '0;
      norm_q        <= '0;
      result        <= '0;
      done          <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          op_q          <= op;
          bo_exp_q      <= c_bo_exp;
          so_exp_q      <= c_so_exp;
          diff_q        <= c_diff;
          bo_sig_q      <= c_bo_sig;
          so_sig_q      <= c_so_sig;
          eff_sub_q     <= c_eff_sub;
          sign_q        <= c_sign;
          special_q     <= c_special;
          special_res_q <= c_special_res;
          state_q       <= S_R1;
        end
        S_R1: begin
          r1_q    <= mul_out;
          state_q <= S_ADD;
        end
        S_ADD: begin
          sum_q      <= sum;
          lead_q     <= lead;
          sum_zero_q <= sum_zero;
          norm_amt_q <= norm_amt;
          state_q    <= S_R2;
        end
        S_R2: begin
          norm_q  <= mul_out;
          state_q <= S_EXP;
        end
        S_EXP: begin
          result  <= res_d;
          done    <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy = (state_q != S_IDLE);

  // A start while an operation is in flight would be lost.
  a_no_start_when_busy: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !start);

endmodule
