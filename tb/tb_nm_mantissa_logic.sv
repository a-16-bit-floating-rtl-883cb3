// tb_nm_mantissa_logic: checks each function of the mantissa datapath with random
// operands: the R1 significand product, the R1 alignment shift (and the sticky
// substitute for far operands), the R2 shift of a looped-back value, the adder with its
// bypass, the leading-one position and normalisation amount, and round-to-nearest-even
// (computed here from the real value of the normalised number).
module tb_nm_mantissa_logic;
  import nm_pkg::*;

  logic        round_r2, so_far, eff_sub, sum_zero, rnd_ovf;
  fp_op_e      op;
  logic [10:0] bo_sig, so_sig;
  logic [13:0] shift_code;
  logic [24:0] loop_val, mul_out, r1_val, sum, norm_val;
  logic [4:0]  lead;
  logic [3:0]  norm_amt;
  logic [9:0]  rnd_frac;
  int checks = 0, failures = 0;

  nm_mantissa_logic dut (.round_r2, .op, .so_far, .bo_sig, .so_sig, .shift_code, .loop_val,
                         .mul_out, .r1_val, .eff_sub, .sum, .lead, .sum_zero, .norm_amt,
                         .norm_val, .rnd_frac, .rnd_ovf);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    for (int k = 0; k < 5000; k++) begin
      int sh;
      longint exp_v;
      real    v, fl, rem;
      longint q;
      bo_sig = {1'b1, 10'($urandom)};
      so_sig = {1'b1, 10'($urandom)};
      sh     = $urandom_range(0, 13);
      shift_code = 14'(1 << sh);
      loop_val   = 25'($urandom) >> $urandom_range(0, 12);
      r1_val     = 25'($urandom) & 25'hFFFFFF;
      norm_val   = {1'b1, 24'($urandom)};
      if (k % 4 == 0) norm_val[13:0] = 14'h2000;   // exact tie between two significands
      so_far   = 1'b0;
      eff_sub  = 1'b0;
      // R1 multiplication
      round_r2 = 1'b0; op = FP_MUL; #1;
      check(mul_out == 25'(longint'(bo_sig) * longint'(so_sig)), "R1 product");
      check(sum == r1_val, "adder bypass");
      // R1 alignment
      op = FP_ADD; #1;
      check(mul_out == 25'(longint'(so_sig) << sh), "R1 alignment");
      so_far = 1'b1; shift_code = 14'h1; #1;
      check(mul_out == 25'd1, "sticky substitute");
      // R2
      so_far = 1'b0; round_r2 = 1'b1; shift_code = 14'(1 << sh); #1;
      check(mul_out == 25'(longint'(loop_val) << sh), "R2 shift");
      // adder
      eff_sub = k[0];
      r1_val  = r1_val % (25'(bo_sig) << 13);
      #1;
      exp_v = eff_sub ? (longint'(bo_sig) << 13) - longint'(r1_val)
                      : (longint'(bo_sig) << 13) + longint'(r1_val);
      check(sum == 25'(exp_v), "adder");
      check(sum_zero == (exp_v == 0), "zero flag");
      if (exp_v != 0) begin
        check((sum >> lead) == 25'd1, "leading one");
        check(norm_amt == 4'(24 - int'(lead)) || int'(lead) < 11, "normalisation amount");
      end
      // rounding: value = norm_val / 2^14, round to an integer, ties to even
      v   = real'(norm_val) / 16384.0;
      fl  = real'(longint'(norm_val) >> 14);
      rem = v - fl;
      q   = longint'(norm_val) >> 14;
      if (rem > 0.5 || (rem == 0.5 && q[0])) q++;
      check(rnd_ovf == (q == 2048), "rounding overflow");
      check(rnd_frac == ((q == 2048) ? 10'd0 : 10'(q)), "rounded fraction");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
