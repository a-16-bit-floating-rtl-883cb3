// tb_nm_fpu: self-checking testbench of the FP16 unit.
//
// Runs directed corner cases (specials, cancellation, carry-out, far alignment,
// overflow to infinity, underflow to zero, rounding ties) and random operand pairs in
// all three operations, compares each result with the double-precision reference and checks
// that every result arrives exactly five cycles after start.
module tb_nm_fpu;
  import nm_pkg::*;
  import fp16_ref_pkg::*;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   start = 1'b0;
  fp_op_e op = FP_ADD;
  fp16_t  a = '0, b = '0;
  logic   busy, done;
  fp16_t  result;
  int     checks = 0, failures = 0;
  int     cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  nm_fpu dut (.clk, .rst_n, .start, .op, .a, .b, .busy, .done, .result);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input fp_op_e o, input fp16_t x, input fp16_t y);
    fp16_t exp_r;
    int    t0;
    exp_r = (o == FP_MUL) ? ref_mul(x, y) : ref_add(x, (o == FP_SUB) ? {~y[15], y[14:0]} : y);
    @(negedge clk);
    op = o; a = x; b = y; start = 1'b1;
    t0 = cycle;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    checks++;
    if (cycle - t0 != FPU_LATENCY) begin
      failures++;
      $display("latency %0d for %s %h %h", cycle - t0, o.name(), x, y);
    end
    checks++;
    if (!same16(result, exp_r)) begin
      failures++;
      if (failures < 20)
        $display("MISMATCH %s %h %h: got %h expected %h", o.name(), x, y, result, exp_r);
    end
  endtask

  fp16_t corner[] = '{16'h0000, 16'h8000, 16'h3C00, 16'hBC00, 16'h7C00, 16'hFC00, 16'h7E00,
                      16'h0001, 16'h03FF, 16'h0400, 16'h8400, 16'h7BFF, 16'hFBFF, 16'h3C01,
                      16'hBBFF, 16'h4000, 16'h1400, 16'h0800, 16'h5BFF, 16'h3555};

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    foreach (corner[i]) foreach (corner[j]) begin
      run(FP_ADD, corner[i], corner[j]);
      run(FP_SUB, corner[i], corner[j]);
      run(FP_MUL, corner[i], corner[j]);
    end
    // rounding ties and far alignment
    run(FP_ADD, 16'h3C00, 16'h1000);   // 1 + 2^-11 : tie, stays 1
    run(FP_ADD, 16'h3C01, 16'h1000);   // tie, rounds to even upwards
    run(FP_ADD, 16'h3C00, 16'h9000);   // 1 - 2^-11
    run(FP_ADD, 16'h3C00, 16'h0C00);   // exponent difference 13
    run(FP_ADD, 16'h3C00, 16'h8800);   // exponent difference 13, subtraction
    run(FP_ADD, 16'h3C00, 16'h8400);   // exponent difference 14: sticky only
    run(FP_ADD, 16'h4000, 16'hBFFF);   // massive cancellation
    for (int k = 0; k < 20000; k++) begin
      fp16_t x, y;
      x = 16'($urandom);
      y = 16'($urandom);
      if (k % 3 == 0) y = {y[15], x[14:10] - 5'($urandom_range(0, 2)), y[9:0]};
      if (k % 3 == 1) y = {y[15], x[14:10] - 5'($urandom_range(0, 15)), y[9:0]};
      run(FP_ADD, x, y);
      run(FP_SUB, x, y);
      run(FP_MUL, x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
