// tb_nm_fig3_example: the small fixed-row tiling example on a reduced build.
//
// Four compute sub-arrays of only 16 words each (N_SUB = 4, WORDS = 16) multiply a random
// 16 x 16 matrix (about 30 % dense) by a vector. Each sub-array owns a stripe of four
// rows; a tile holds the 4 outputs, its input columns and up to three COO triplets, so
// every stripe needs several tiles, columns with no non-zero in the stripe are skipped,
// and outputs stay resident across tiles. The results are compared with the reference
// sequence of rounded binary16 multiply-accumulates; the bench also checks that the
// reduced build has the 16-word address map (reads of register 2 return v_addr).
module tb_nm_fig3_example;
  import fp16_ref_pkg::*;

  localparam int N_SUB = 4, WORDS = 16, AW = 4, SW = 2;
  localparam int H = 4, N = 16;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        bus_req = 1'b0, bus_we = 1'b0;
  logic [SW+AW:0] bus_addr = '0;
  logic [15:0] bus_wdata = '0;
  logic        bus_gnt, bus_rvalid;
  logic [15:0] bus_rdata;
  logic [N_SUB-1:0] busy, done;
  int checks = 0, failures = 0, tiles = 0, skipped = 0;

  always #5 clk = ~clk;

  nm_spmv_top #(.N_SUB(N_SUB), .WORDS(WORDS)) dut (
    .clk, .rst_n, .bus_req, .bus_we, .bus_addr, .bus_wdata, .bus_gnt, .bus_rvalid,
    .bus_rdata, .busy, .done);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bus_write(input int s, input bit rg, input int a, input logic [15:0] d);
    @(negedge clk);
    bus_req = 1'b1; bus_we = 1'b1; bus_addr = {SW'(s), rg, AW'(a)}; bus_wdata = d;
    #1;
    while (!bus_gnt) begin @(negedge clk); #1; end
    @(negedge clk);
    bus_req = 1'b0; bus_we = 1'b0;
  endtask

  task automatic bus_read(input int s, input bit rg, input int a, output logic [15:0] d);
    @(negedge clk);
    bus_req = 1'b1; bus_we = 1'b0; bus_addr = {SW'(s), rg, AW'(a)};
    #1;
    while (!bus_gnt) begin @(negedge clk); #1; end
    @(negedge clk);
    bus_req = 1'b0;
    d = bus_rdata;
  endtask

  logic [15:0] mat [N][N];
  logic [15:0] vin [N];
  logic [15:0] cref [N];
  int          cur [N_SUB];

  function automatic int col_nnz(int s, int c);
    int k = 0;
    for (int r = 0; r < H; r++) if (mat[s*H + r][c] != 0) k++;
    return k;
  endfunction

  // Load the next tile of stripe s and start it; returns 0 when the stripe is finished.
  task automatic next_tile(int s, output bit started);
    logic [15:0] img [WORDS];
    int start = cur[s], c, nnz = 0, w, k = 0;
    while (start < N && col_nnz(s, start) == 0) start++;
    if (start > cur[s]) skipped++;
    if (start >= N) begin cur[s] = N; started = 0; return; end
    c = start;
    while (c < N && H + (c - start + 1) + 3 * (nnz + col_nnz(s, c)) <= WORDS) begin
      nnz += col_nnz(s, c); c++;
    end
    w = c - start;
    for (int j = 0; j < w; j++) img[H + j] = vin[start + j];
    for (int j = 0; j < w; j++)
      for (int r = 0; r < H; r++)
        if (mat[s*H + r][start + j] != 0) begin
          img[H + w + 3*k]     = 16'(j);
          img[H + w + 3*k + 1] = mat[s*H + r][start + j];
          img[H + w + 3*k + 2] = 16'(r);
          cref[s*H + r] = ref_add(cref[s*H + r], ref_mul(mat[s*H + r][start + j], vin[start + j]));
          k++;
        end
    for (int a = H; a < H + w + 3*k; a++) bus_write(s, 1'b0, a, img[a]);
    bus_write(s, 1'b1, 1, 16'(H + w));
    bus_write(s, 1'b1, 2, 16'(H));
    bus_write(s, 1'b1, 3, 16'(H + w + 3*k - 2));
    bus_write(s, 1'b1, 0, 16'h1);
    cur[s] = c;
    tiles++;
    started = 1;
  endtask

  initial begin
    logic [15:0] d;
    bit any, st;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        mat[r][c] = ($urandom_range(0, 99) < 30) ?
                    {1'($urandom), 5'($urandom_range(13, 16)), 10'($urandom)} : 16'h0;
    for (int c = 0; c < 5; c++) for (int r = 8; r < 12; r++) mat[r][c] = 16'h0;  // skipped columns
    for (int c = 0; c < N; c++) vin[c] = {1'($urandom), 5'($urandom_range(13, 16)), 10'($urandom)};
    for (int r = 0; r < N; r++) cref[r] = 16'h0;
    for (int s = 0; s < N_SUB; s++) cur[s] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < N_SUB; s++) for (int r = 0; r < H; r++) bus_write(s, 1'b0, r, 16'h0);
    do begin
      any = 0;
      for (int s = 0; s < N_SUB; s++) begin
        next_tile(s, st);
        any |= st;
      end
      for (int s = 0; s < N_SUB; s++) begin
        do bus_read(s, 1'b1, 0, d); while (d[0]);
      end
    end while (any);
    bus_read(0, 1'b1, 2, d);
    checks++;
    if (d != 16'(H)) begin failures++; $display("v_addr read-back %h", d); end
    for (int s = 0; s < N_SUB; s++)
      for (int r = 0; r < H; r++) begin
        bus_read(s, 1'b0, r, d);
        checks++;
        if (!same16(d, cref[s*H + r])) begin
          failures++;
          $display("C[%0d] = %h, expected %h", s*H + r, d, cref[s*H + r]);
        end
      end
    checks++;
    if (skipped == 0 || tiles <= N_SUB) begin failures++; $display("tiling mechanisms not exercised"); end
    $display("tiles=%0d skipped_column_runs=%0d", tiles, skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
