// tb_nm_sram: writes a random image into a 2048 x 16 sub-array, reads it back in
// random order and checks that data appears one cycle after the read, that it holds
// while the SRAM is idle, and that a disabled write does not change memory.
module tb_nm_sram;
  logic        clk = 1'b0;
  logic        en = 1'b0, we = 1'b0;
  logic [10:0] addr = '0;
  logic [15:0] wdata = '0, rdata;
  logic [15:0] image [2048];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  nm_sram #(.WORDS(2048), .DW(16)) dut (.clk, .en, .we, .addr, .wdata, .rdata);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2048; i++) begin
      image[i] = 16'($urandom);
      @(negedge clk); en = 1'b1; we = 1'b1; addr = 11'(i); wdata = image[i];
    end
    // a write with en low must be ignored
    @(negedge clk); en = 1'b0; we = 1'b1; addr = 11'd5; wdata = ~image[5];
    for (int k = 0; k < 4000; k++) begin
      automatic int a = $urandom_range(0, 2047);
      @(negedge clk); en = 1'b1; we = 1'b0; addr = 11'(a);
      @(negedge clk); en = 1'b0;
      checks++;
      if (rdata !== image[a]) begin failures++; $display("addr %0d: %h vs %h", a, rdata, image[a]); end
      @(negedge clk);
      checks++;
      if (rdata !== image[a]) begin failures++; $display("rdata not held at %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
