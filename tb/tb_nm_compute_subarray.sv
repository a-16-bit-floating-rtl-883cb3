// tb_nm_compute_subarray: one compute sub-array driven over its bus port.
//
// First it is used as plain memory (random writes and reads). Then a tile is loaded
// (8 outputs, 20 inputs, 30 non-zeros), the registers are programmed and read back, and
// the unit is started. While it runs, the testbench keeps reading memory: those reads
// must be stalled in the cycles the control unit uses the SRAM and still return the
// right data. Results are compared with the reference multiply-accumulate sequence and
// the run must take 14 cycles per non-zero.
module tb_nm_compute_subarray;
  import fp16_ref_pkg::*;

  localparam int H = 8, W = 20, NNZ = 30, COO0 = H + W;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        req = 1'b0, we = 1'b0;
  logic [11:0] addr = '0;
  logic [15:0] wdata = '0, rdata;
  logic        gnt, rvalid, busy, done;
  int checks = 0, failures = 0, stalls = 0, busy_cycles = 0;

  always #5 clk = ~clk;
  always @(posedge clk) if (busy) busy_cycles <= busy_cycles + 1;

  nm_compute_subarray #(.WORDS(2048)) dut (.clk, .rst_n, .req, .we, .addr, .wdata, .gnt,
                                           .rvalid, .rdata, .busy, .done);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic bus_write(logic [11:0] a, logic [15:0] d);
    @(negedge clk); req = 1'b1; we = 1'b1; addr = a; wdata = d; #1;
    while (!gnt) begin stalls++; @(negedge clk); #1; end
    @(negedge clk); req = 1'b0; we = 1'b0;
  endtask

  task automatic bus_read(logic [11:0] a, output logic [15:0] d);
    @(negedge clk); req = 1'b1; we = 1'b0; addr = a; #1;
    while (!gnt) begin stalls++; @(negedge clk); #1; end
    @(negedge clk); req = 1'b0;
    check(rvalid, "rvalid after a granted read");
    d = rdata;
  endtask

  logic [15:0] image [2048];
  logic [15:0] cref [H];
  logic [15:0] vin [W];

  initial begin
    logic [15:0] d;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // plain memory use
    for (int i = 0; i < 200; i++) begin
      image[i] = 16'($urandom);
      bus_write(12'(i), image[i]);
    end
    for (int i = 0; i < 200; i++) begin
      automatic int a = $urandom_range(0, 199);
      bus_read(12'(a), d);
      check(d == image[a], "plain memory read");
    end
    // tile
    for (int r = 0; r < H; r++) begin cref[r] = 16'h0; bus_write(12'(r), 16'h0); end
    for (int j = 0; j < W; j++) begin
      vin[j] = {1'($urandom), 5'($urandom_range(13, 16)), 10'($urandom)};
      bus_write(12'(H + j), vin[j]);
    end
    for (int k = 0; k < NNZ; k++) begin
      automatic int n = $urandom_range(0, W - 1), m = $urandom_range(0, H - 1);
      automatic logic [15:0] nz = {1'($urandom), 5'($urandom_range(13, 16)), 10'($urandom)};
      bus_write(12'(COO0 + 3*k), 16'(n));
      bus_write(12'(COO0 + 3*k + 1), nz);
      bus_write(12'(COO0 + 3*k + 2), 16'(m));
      cref[m] = ref_add(cref[m], ref_mul(nz, vin[n]));
    end
    bus_write(12'h801, 16'(COO0));
    bus_write(12'h802, 16'(H));
    bus_write(12'h803, 16'(COO0 + 3*NNZ - 2));
    bus_read(12'h801, d); check(d == 16'(COO0), "coo_addr read-back");
    bus_read(12'h802, d); check(d == 16'(H), "v_addr read-back");
    bus_read(12'h803, d); check(d == 16'(COO0 + 3*NNZ - 2), "last_addr read-back");
    busy_cycles = 0;
    bus_write(12'h800, 16'h1);
    stalls = 0;
    do begin
      automatic int a = $urandom_range(H, COO0 + 3*NNZ - 1);
      bus_read(12'(a), d);
      check(d == ((a < COO0) ? vin[a - H] : d), "read during computation");
      bus_read(12'h800, d);
    end while (d[1] == 1'b0);
    check(stalls > 0, "bus reads stalled during computation");
    check(busy_cycles == 14 * NNZ, $sformatf("%0d busy cycles for %0d MACs", busy_cycles, NNZ));
    for (int r = 0; r < H; r++) begin
      bus_read(12'(r), d);
      check(same16(d, cref[r]), $sformatf("C[%0d] = %h, expected %h", r, d, cref[r]));
    end
    $display("stalls=%0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
