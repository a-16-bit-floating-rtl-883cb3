// tb_nm_workload_table1: SpMV of benchmark sizes on the full compute memory.
//
// For each of the nine benchmark matrices the design is evaluated on (c-61, roadNet-TX,
// delaunay_n19, fe_ocean, gridgena, k49_norm_10NN, worms20_10NN, amazon0601,
// webbase-1M) it runs one complete SpMV on a matrix with that benchmark's dimensions
// and non-zero count. The real matrices are not reproduced: each row gets
// floor(nnz/rows) or one more non-zeros at random distinct columns within +-300 of the
// diagonal, the locally dense shape that the fixed-row mapping favours. Values are
// binary16 of magnitude 1/8..4 with random signs.
//
// The host is modelled here: stripes of H = 128 rows are dealt round-robin to the eight
// sub-arrays; each stripe is cut into tiles that fill a 2048-word sub-array (output
// slice, input slice, COO triplets; leading all-zero columns skipped); every sub-array
// is loaded with burst writes (one word per cycle) and started as soon as it is free,
// and its output slice is read back and cleared when it moves to its next stripe. All
// 20,055 outputs are compared with a reference that performs the same sequence of
// rounded binary16 multiply-accumulates in double precision. The testbench prints the
// cycle count and the resulting MFLOPS at 1 GHz (two operations per non-zero), host
// transfers included.
module tb_nm_workload_table1;
  import fp16_ref_pkg::*;

  localparam int N_SUB = 8;
  localparam int WORDS = 2048;
  localparam int NBENCH = 9;
  localparam int MAXROW = 1393383;
  localparam int MAXNNZ = 3843320;
  localparam string BNAME [NBENCH] = '{"c-61", "roadNet-TX", "delaunay_n19", "fe_ocean",
      "gridgena", "k49_norm_10NN", "worms20_10NN", "amazon0601", "webbase-1M"};
  localparam int BROWS [NBENCH] = '{43618, 1393383, 524288, 143437, 48962, 38547, 20055,
                                    403394, 1000005};
  localparam int BNNZ  [NBENCH] = '{310016, 3843320, 3145646, 819186, 512084, 618158, 240826,
                                    3387388, 3105536};
  localparam int BAND  = 300;
  localparam int H     = 128;
  localparam int MAXS  = H * 17;                 // non-zeros per stripe at most
  int NROW, NNZ, NSTRIPE;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        bus_req = 1'b0, bus_we = 1'b0;
  logic [14:0] bus_addr = '0;
  logic [15:0] bus_wdata = '0;
  logic        bus_gnt, bus_rvalid;
  logic [15:0] bus_rdata;
  logic [N_SUB-1:0] busy, done;
  int checks = 0, failures = 0;
  longint cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  nm_spmv_top dut (.clk, .rst_n, .bus_req, .bus_we, .bus_addr, .bus_wdata, .bus_gnt,
                   .bus_rvalid, .bus_rdata, .busy, .done);

  initial begin
    repeat (200000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- matrix in row-major COO, vectors, reference ----
  int          row_start [MAXROW + 1];
  int          col_of [MAXNNZ];
  logic [15:0] val_of [MAXNNZ];
  logic [15:0] vin [MAXROW];
  logic [15:0] cref [MAXROW];

  function automatic logic [15:0] rand_val();
    return {1'($urandom), 5'($urandom_range(12, 16)), 10'($urandom)};
  endfunction

  function automatic void gen_matrix();
    int k = 0, base = NNZ / NROW;
    for (int r = 0; r < NROW; r++) begin
      int cnt = (r < NNZ - base * NROW) ? base + 1 : base;
      row_start[r] = k;
      for (int j = 0; j < cnt; j++) begin
        int c;
        bit dup;
        do begin
          c = r + $urandom_range(0, 2 * BAND) - BAND;
          if (c < 0) c = -c;
          if (c >= NROW) c = 2 * (NROW - 1) - c;
          dup = 0;
          for (int i = row_start[r]; i < k; i++) if (col_of[i] == c) dup = 1;
        end while (dup);
        col_of[k] = c;
        val_of[k] = rand_val();
        k++;
      end
    end
    row_start[NROW] = k;
    for (int c = 0; c < NROW; c++) vin[c] = rand_val();
    for (int r = 0; r < NROW; r++) cref[r] = 16'h0;
  endfunction

  // ---- per-stripe column-sorted list (counting sort over the stripe's column range) ----
  int          s_col [N_SUB][MAXS];
  int          s_row [N_SUB][MAXS];
  logic [15:0] s_val [N_SUB][MAXS];
  int          s_cnt [N_SUB];
  int          s_pos [N_SUB];         // next entry to place in a tile
  int          s_stripe [N_SUB];      // stripe being processed, -1 when finished
  int          bucket [MAXROW + 1];

  function automatic void load_stripe(int s, int st);
    int r0 = st * H, r1 = (st + 1) * H, cmin = NROW, cmax = 0, k = 0;
    if (r1 > NROW) r1 = NROW;
    for (int r = r0; r < r1; r++)
      for (int i = row_start[r]; i < row_start[r + 1]; i++) begin
        if (col_of[i] < cmin) cmin = col_of[i];
        if (col_of[i] > cmax) cmax = col_of[i];
      end
    for (int c = cmin; c <= cmax + 1; c++) bucket[c] = 0;
    for (int r = r0; r < r1; r++)
      for (int i = row_start[r]; i < row_start[r + 1]; i++) bucket[col_of[i] + 1]++;
    for (int c = cmin + 1; c <= cmax + 1; c++) bucket[c] += bucket[c - 1];
    for (int r = r0; r < r1; r++)
      for (int i = row_start[r]; i < row_start[r + 1]; i++) begin
        int p = bucket[col_of[i]]++;
        s_col[s][p] = col_of[i];
        s_row[s][p] = r - r0;
        s_val[s][p] = val_of[i];
        k++;
      end
    s_cnt[s] = k;
    s_pos[s] = 0;
    s_stripe[s] = st;
  endfunction

  // ---- host bus ----
  task automatic bus_burst_write(input int s, input int a0, ref logic [15:0] d [WORDS], input int n);
    int i = 0;
    while (i < n) begin
      @(negedge clk);
      bus_req = 1'b1; bus_we = 1'b1; bus_addr = {3'(s), 1'b0, 11'(a0 + i)}; bus_wdata = d[a0 + i];
      #1;
      if (bus_gnt) i++;
    end
    @(negedge clk);
    bus_req = 1'b0; bus_we = 1'b0;
  endtask

  task automatic bus_write(input logic [14:0] a, input logic [15:0] d);
    @(negedge clk);
    bus_req = 1'b1; bus_we = 1'b1; bus_addr = a; bus_wdata = d;
    #1;
    while (!bus_gnt) begin @(negedge clk); #1; end
    @(negedge clk);
    bus_req = 1'b0; bus_we = 1'b0;
  endtask

  task automatic bus_read(input logic [14:0] a, output logic [15:0] d);
    @(negedge clk);
    bus_req = 1'b1; bus_we = 1'b0; bus_addr = a;
    #1;
    while (!bus_gnt) begin @(negedge clk); #1; end
    @(negedge clk);
    bus_req = 1'b0;
    d = bus_rdata;
  endtask

  // ---- tiles ----
  logic [15:0] img [WORDS];

  // Build the next tile of sub-array s into img, update the reference, load and start it.
  task automatic run_tile(int s);
    int p0 = s_pos[s], p = s_pos[s], c0, w, n = 0, words;
    if (s_cnt[s] == 0) begin                    // empty stripe: an empty tile
      bus_write({3'(s), 1'b1, 11'd1}, 16'(H));
      bus_write({3'(s), 1'b1, 11'd3}, 16'(H - 1));
      bus_write({3'(s), 1'b1, 11'd0}, 16'h1);
      return;
    end
    c0 = s_col[s][p0];
    // grow column by column while the tile fits
    while (p < s_cnt[s]) begin
      int c = s_col[s][p], q = p;
      while (q < s_cnt[s] && s_col[s][q] == c) q++;
      if (H + (c - c0 + 1) + 3 * (q - p0) > WORDS) break;
      p = q;
    end
    w = s_col[s][p - 1] - c0 + 1;
    for (int j = 0; j < w; j++) img[H + j] = vin[c0 + j];
    for (int i = p0; i < p; i++) begin
      img[H + w + 3*n]     = 16'(s_col[s][i] - c0);
      img[H + w + 3*n + 1] = s_val[s][i];
      img[H + w + 3*n + 2] = 16'(s_row[s][i]);
      cref[s_stripe[s] * H + s_row[s][i]] =
        ref_add(cref[s_stripe[s] * H + s_row[s][i]], ref_mul(s_val[s][i], vin[s_col[s][i]]));
      n++;
    end
    words = H + w + 3 * n;
    s_pos[s] = p;
    bus_burst_write(s, H, img, words - H);
    bus_write({3'(s), 1'b1, 11'd1}, 16'(H + w));
    bus_write({3'(s), 1'b1, 11'd2}, 16'(H));
    bus_write({3'(s), 1'b1, 11'd3}, 16'(words - 2));
    bus_write({3'(s), 1'b1, 11'd0}, 16'h1);
  endtask

  // Read back the finished stripe of sub-array s and compare.
  task automatic collect(int s);
    logic [15:0] d;
    int r0 = s_stripe[s] * H;
    for (int r = 0; r < H && r0 + r < NROW; r++) begin
      bus_read({3'(s), 1'b0, 11'(r)}, d);
      checks++;
      if (!same16(d, cref[r0 + r])) begin
        failures++;
        if (failures < 10) $display("C[%0d] = %h, expected %h", r0 + r, d, cref[r0 + r]);
      end
    end
  endtask

  task automatic clear_outputs(int s);
    for (int r = 0; r < H; r++) img[r] = 16'h0;
    bus_burst_write(s, 0, img, H);
  endtask

  initial begin
    longint t0;
    int active, tiles;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < NBENCH; b++) begin
      int fails0 = failures;
      NROW = BROWS[b]; NNZ = BNNZ[b]; NSTRIPE = (NROW + H - 1) / H;
      gen_matrix();
      @(negedge clk);
      t0 = cycle;
      tiles = 0;
      for (int s = 0; s < N_SUB; s++) begin
        load_stripe(s, s);
        clear_outputs(s);
        run_tile(s);
        tiles++;
      end
      active = N_SUB;
      while (active > 0) begin
        for (int s = 0; s < N_SUB; s++) begin
          if (s_stripe[s] >= 0 && !busy[s]) begin
            if (s_pos[s] < s_cnt[s]) begin
              run_tile(s); tiles++;
            end else begin
              collect(s);
              if (s_stripe[s] + N_SUB < NSTRIPE) begin
                load_stripe(s, s_stripe[s] + N_SUB);
                clear_outputs(s);
                run_tile(s); tiles++;
              end else begin
                s_stripe[s] = -1;
                active--;
              end
            end
          end
        end
        @(negedge clk);
      end
      checks++;
      if (row_start[NROW] != NNZ) failures++;
      $display("%-14s %8d rows %8d non-zeros %7d tiles %9d cycles %4d MFLOPS at 1 GHz, %0d output errors",
               BNAME[b], NROW, NNZ, tiles, cycle - t0, (2 * longint'(NNZ) * 1000) / (cycle - t0),
               failures - fails0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
