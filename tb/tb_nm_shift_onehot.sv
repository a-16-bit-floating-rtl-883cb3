// tb_nm_shift_onehot: exhaustive check of the one-hot shift coder (all 16 amounts):
// the code must be 2**amt for amt < 14 and zero above.
module tb_nm_shift_onehot;
  logic [3:0]  amt;
  logic [13:0] onehot;
  int checks = 0, failures = 0;

  nm_shift_onehot #(.W(14), .AMT_W(4)) dut (.amt, .onehot);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 16; k++) begin
      logic [13:0] exp_code;
      amt = 4'(k);
      #1;
      exp_code = (k < 14) ? 14'(1 << k) : 14'h0;
      checks++;
      if (onehot !== exp_code) begin
        failures++;
        $display("amt %0d: got %b expected %b", k, onehot, exp_code);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
