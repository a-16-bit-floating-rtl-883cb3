// tb_nm_spmv_cu: the SpMV control unit with a 2048-word SRAM and the FPU.
//
// The testbench writes a tile straight into the SRAM (16 outputs at 0, 40 inputs at 16,
// 80 random COO triplets after them, rows repeating in random order), programs the
// three pointer registers, starts the unit and checks: every output word against a
// reference sequence of rounded binary16 multiply-accumulates, that the k-th result is
// written exactly 14*k cycles after the start, the status bits, the final pointer,
// that pointer writes are ignored while busy, and that an empty tile finishes at once.
module tb_nm_spmv_cu;
  import nm_pkg::*;
  import fp16_ref_pkg::*;

  localparam int H = 16, W = 40, NNZ = 80;
  localparam int COO0 = H + W;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        reg_we = 1'b0;
  logic [1:0]  reg_sel = '0;
  logic [15:0] reg_wdata = '0, reg_rdata;
  logic        cu_req, cu_we;
  logic [10:0] cu_addr;
  logic [15:0] cu_wdata, mem_rdata;
  logic        fpu_start, fpu_busy, fpu_done, busy, done;
  fp_op_e      fpu_op;
  fp16_t       fpu_a, fpu_b, fpu_result;
  // testbench access to the SRAM while the unit is idle
  logic        tb_en = 1'b0, tb_we = 1'b0;
  logic [10:0] tb_addr = '0;
  logic [15:0] tb_wdata = '0;

  int checks = 0, failures = 0;
  int cycle = 0, t_start = 0, n_writes = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  nm_sram #(.WORDS(2048)) u_sram (
    .clk, .en(cu_req | tb_en), .we(cu_req ? cu_we : tb_we), .addr(cu_req ? cu_addr : tb_addr),
    .wdata(cu_req ? cu_wdata : tb_wdata), .rdata(mem_rdata));

  nm_fpu u_fpu (.clk, .rst_n, .start(fpu_start), .op(fpu_op), .a(fpu_a), .b(fpu_b),
                .busy(fpu_busy), .done(fpu_done), .result(fpu_result));

  nm_spmv_cu #(.WORDS(2048)) dut (
    .clk, .rst_n, .reg_we, .reg_sel, .reg_wdata, .reg_rdata,
    .mem_req(cu_req), .mem_we(cu_we), .mem_addr(cu_addr), .mem_wdata(cu_wdata), .mem_rdata,
    .fpu_start, .fpu_op, .fpu_a, .fpu_b, .fpu_done, .fpu_result, .busy, .done);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Each result write must come 14 cycles after the previous one.
  always @(posedge clk) if (cu_req && cu_we) begin
    n_writes <= n_writes + 1;
    checks++;
    if (cycle - t_start != MAC_CYCLES * (n_writes + 1)) begin
      failures++;
      $display("write %0d at cycle %0d after start, expected %0d", n_writes + 1,
               cycle - t_start, MAC_CYCLES * (n_writes + 1));
    end
  end

  task automatic mem_write(int a, logic [15:0] d);
    @(negedge clk); tb_en = 1'b1; tb_we = 1'b1; tb_addr = 11'(a); tb_wdata = d;
    @(negedge clk); tb_en = 1'b0; tb_we = 1'b0;
  endtask

  task automatic mem_read(int a, output logic [15:0] d);
    @(negedge clk); tb_en = 1'b1; tb_we = 1'b0; tb_addr = 11'(a);
    @(negedge clk); tb_en = 1'b0; d = mem_rdata;
  endtask

  task automatic reg_write(int r, logic [15:0] d);
    @(negedge clk); reg_we = 1'b1; reg_sel = 2'(r); reg_wdata = d;
    @(negedge clk); reg_we = 1'b0;
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [15:0] cref [H];
  logic [15:0] vin [W];

  initial begin
    logic [15:0] d;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < H; r++) begin cref[r] = 16'h0; mem_write(r, 16'h0); end
    for (int j = 0; j < W; j++) begin
      vin[j] = {1'($urandom), 5'($urandom_range(12, 16)), 10'($urandom)};
      mem_write(H + j, vin[j]);
    end
    for (int k = 0; k < NNZ; k++) begin
      automatic int n = $urandom_range(0, W - 1), m = $urandom_range(0, H - 1);
      automatic logic [15:0] nz = {1'($urandom), 5'($urandom_range(12, 16)), 10'($urandom)};
      mem_write(COO0 + 3*k, 16'(n));
      mem_write(COO0 + 3*k + 1, nz);
      mem_write(COO0 + 3*k + 2, 16'(m));
      cref[m] = ref_add(cref[m], ref_mul(nz, vin[n]));
    end
    reg_write(1, 16'(COO0));
    reg_write(2, 16'(H));
    reg_write(3, 16'(COO0 + 3*NNZ - 2));
    @(negedge clk); reg_we = 1'b1; reg_sel = 2'd0; reg_wdata = 16'h1;
    t_start = cycle;
    @(negedge clk); reg_we = 1'b0;
    check(busy && reg_rdata[1:0] == 2'b01, "busy after start");
    reg_write(1, 16'h0);                       // ignored while busy
    while (!done) @(negedge clk);
    check(n_writes == NNZ, "one write per non-zero");
    check(cycle - t_start == MAC_CYCLES * NNZ + 1, "run length");
    reg_sel = 2'd0; #1;
    check(reg_rdata[1:0] == 2'b10, "status done");
    reg_sel = 2'd1; #1;
    check(reg_rdata == 16'(COO0 + 3*NNZ), "final coo pointer");
    for (int r = 0; r < H; r++) begin
      mem_read(r, d);
      check(same16(d, cref[r]), $sformatf("C[%0d] = %h, expected %h", r, d, cref[r]));
    end
    // empty tile: coo_addr beyond last_addr
    reg_write(1, 16'd100);
    reg_write(3, 16'd50);
    reg_write(0, 16'h1);
    check(done && !busy && n_writes == NNZ, "empty tile finishes at once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
