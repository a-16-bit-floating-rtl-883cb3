// nm_shift_onehot: one-hot coder for the shift amount of the multiplier/shifter.
//
// The FPU performs shifts by multiplying a value with a power of two, so a binary
// shift amount is turned into a one-hot word: bit k of onehot is set when amt == k,
// and multiplying by that word shifts left by k. Amounts of W or more give an
// all-zero code. The paper names this coder but leaves its insides out; this is
// the plain decoder. Combinational.
module nm_shift_onehot #(
  parameter int unsigned W     = 14,
  parameter int unsigned AMT_W = 4
) (
  input  logic [AMT_W-1:0] amt,
  output logic [W-1:0]     onehot
);

  always_comb begin
    onehot = '0;
    for (int unsigned k = 0; k < W; k++) begin
      if (amt == AMT_W'(k)) onehot[k] = 1'b1;
    end
  end

endmodule
