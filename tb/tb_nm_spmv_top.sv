// tb_nm_spmv_top: end-to-end SpMV on the full compute memory (default parameters).
//
// Acts as the host. It generates a random sparse matrix of 8 stripes x 32 rows by 1024
// columns (about 3 % dense, values of magnitude 1/8..4) plus an input vector, splits
// every stripe into fixed-row tiles that fill a sub-array (output slice at 0, input
// slice next, then the COO triplets; leading all-zero columns skipped), and runs the
// tiles round by round on all eight sub-arrays in parallel. Output slices stay in the
// sub-arrays across rounds and accumulate. A few rows are planted to overflow to
// infinity, to cancel exactly to zero and to underflow to zero; the last stripe is
// empty. The result vector is read back and compared with a reference that performs
// the same sequence of rounded binary16 multiply-accumulates in double precision.
//
// Also checked: each run keeps its sub-array busy exactly 14 cycles per non-zero, bus
// reads of a busy sub-array's memory are stalled and then return correct data, and
// every mechanism above happens at least once.
module tb_nm_spmv_top;
  import fp16_ref_pkg::*;

  localparam int N_SUB = 8;
  localparam int WORDS = 2048;
  localparam int AW    = 11;
  localparam int H     = 32;             // stripe height (rows per sub-array)
  localparam int ROWS  = N_SUB * H;
  localparam int COLS  = 1024;
  localparam int DENS_PERMILLE = 30;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        bus_req = 1'b0, bus_we = 1'b0;
  logic [14:0] bus_addr = '0;
  logic [15:0] bus_wdata = '0;
  logic        bus_gnt, bus_rvalid;
  logic [15:0] bus_rdata;
  logic [N_SUB-1:0] busy, done;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_stall = 0, n_multi_tile = 0, n_skip_cols = 0, n_empty_run = 0, n_overflow = 0,
      n_cancel = 0, n_underflow = 0, n_inf_acc = 0, n_all_busy = 0;

  always #5 clk = ~clk;

  nm_spmv_top dut (.clk, .rst_n, .bus_req, .bus_we, .bus_addr, .bus_wdata, .bus_gnt,
                   .bus_rvalid, .bus_rdata, .busy, .done);

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- host bus accesses ----
  function automatic logic [14:0] mem_addr(int s, int a);
    return {3'(s), 1'b0, 11'(a)};
  endfunction
  function automatic logic [14:0] reg_addr(int s, int r);
    return {3'(s), 1'b1, 11'(r)};
  endfunction

  task automatic bus_write(input logic [14:0] a, input logic [15:0] d);
    @(negedge clk);
    bus_req = 1'b1; bus_we = 1'b1; bus_addr = a; bus_wdata = d;
    #1;
    while (!bus_gnt) begin n_stall++; @(negedge clk); #1; end
    @(negedge clk);
    bus_req = 1'b0; bus_we = 1'b0;
  endtask

  task automatic bus_read(input logic [14:0] a, output logic [15:0] d);
    @(negedge clk);
    bus_req = 1'b1; bus_we = 1'b0; bus_addr = a;
    #1;
    while (!bus_gnt) begin n_stall++; @(negedge clk); #1; end
    @(negedge clk);
    bus_req = 1'b0;
    checks++;
    if (!bus_rvalid) begin failures++; $display("no rvalid for read of %h", a); end
    d = bus_rdata;
  endtask

  // ---- busy-cycle monitor: 14 cycles per MAC ----
  int busy_cycles [N_SUB];
  always @(posedge clk) begin
    for (int s = 0; s < N_SUB; s++) if (busy[s]) busy_cycles[s] <= busy_cycles[s] + 1;
    if ($countones(busy) >= N_SUB - 1) n_all_busy <= n_all_busy + 1;   // stripe 7 is empty
  end

  // ---- matrix, vectors and reference ----
  logic [15:0] mat [ROWS][COLS];
  logic [15:0] vin [COLS];
  logic [15:0] cref [ROWS];
  int          cur [N_SUB];       // next column of each stripe
  int          ntiles [N_SUB];
  int          nnz_run [N_SUB];
  logic [15:0] first_in [N_SUB];   // first input word written to each sub-array
  bit          have_first [N_SUB] = '{default: 1'b0};

  function automatic logic [15:0] rand_val();
    return {1'($urandom), 5'($urandom_range(12, 16)), 10'($urandom)};
  endfunction

  function automatic int stripe_col_nnz(int s, int c);
    int k = 0;
    for (int r = 0; r < H; r++) if (mat[s*H + r][c] != 0) k++;
    return k;
  endfunction

  // Reference multiply-accumulate with mechanism counting.
  function automatic void ref_mac(int row, logic [15:0] nz, logic [15:0] v);
    logic [15:0] p, s;
    p = ref_mul(nz, v);
    s = ref_add(cref[row], p);
    if (is_inf16(p) || (is_inf16(s) && !is_inf16(cref[row]))) n_overflow++;
    if (is_zero16(p)) n_underflow++;
    if (is_zero16(s) && !is_zero16(p) && !is_zero16(cref[row])) n_cancel++;
    if (is_inf16(cref[row])) n_inf_acc++;
    cref[row] = s;
  endfunction

  // Build the next tile of stripe s into a word image; returns the number of words used.
  logic [15:0] img [WORDS];
  int          img_words, img_w, img_nnz;

  function automatic void build_tile(int s);
    int start, c, nnz, w;
    start = cur[s];
    while (start < COLS && stripe_col_nnz(s, start) == 0) start++;
    if (start > cur[s] && start < COLS) n_skip_cols++;
    nnz = 0; c = start;
    while (c < COLS) begin
      int k = stripe_col_nnz(s, c);
      if (H + (c - start + 1) + 3 * (nnz + k) > WORDS) break;
      nnz += k; c++;
    end
    w = c - start;
    // input slice and COO triplets, column by column
    for (int j = 0; j < w; j++) img[H + j] = vin[start + j];
    img_nnz = 0;
    for (int j = 0; j < w; j++)
      for (int r = 0; r < H; r++)
        if (mat[s*H + r][start + j] != 0) begin
          img[H + w + 3*img_nnz]     = 16'(j);
          img[H + w + 3*img_nnz + 1] = mat[s*H + r][start + j];
          img[H + w + 3*img_nnz + 2] = 16'(r);
          ref_mac(s*H + r, mat[s*H + r][start + j], vin[start + j]);
          img_nnz++;
        end
    img_w     = w;
    img_words = H + w + 3 * img_nnz;
    cur[s]    = c;
    if (w > 0) ntiles[s]++;
  endfunction

  initial begin
    logic [15:0] d;
    int round;
    bit pending;
    int cnt_list [9];

    // matrix and vector
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        mat[r][c] = (r < (N_SUB-1)*H && $urandom_range(0, 999) < DENS_PERMILLE) ? rand_val() : 16'h0;
    for (int c = 0; c < COLS; c++) vin[c] = rand_val();
    for (int c = 0; c < 40; c++) mat[H + 5][c] = 16'h0;     // stripe 1 starts with a skipped column run
    for (int c = 0; c < COLS; c++) begin mat[0][c] = 16'h0; mat[1][c] = 16'h0; mat[2][c] = 16'h0; end
    mat[0][10] = 16'h7800; mat[0][11] = 16'h7800;           // overflow to infinity
    vin[10] = 16'h7800; vin[11] = 16'h4000; mat[0][900] = 16'h3C00;
    vin[21] = vin[20];
    mat[1][20] = 16'h3E00; mat[1][21] = 16'hBE00;           // exact cancellation
    vin[30] = 16'h3400; mat[2][30] = 16'h0800;              // underflow to zero
    for (int r = 0; r < ROWS; r++) cref[r] = 16'h0;
    for (int s = 0; s < N_SUB; s++) begin cur[s] = 0; ntiles[s] = 0; end

    repeat (4) @(negedge clk);
    rst_n = 1'b1;

    // clear all output slices
    for (int s = 0; s < N_SUB; s++)
      for (int r = 0; r < H; r++) bus_write(mem_addr(s, r), 16'h0);

    round = 0;
    pending = 1;
    while (pending) begin
      pending = 0;
      for (int s = 0; s < N_SUB; s++) begin
        build_tile(s);
        for (int a = H; a < img_words; a++) bus_write(mem_addr(s, a), img[a]);
        if (img_words > H) begin first_in[s] = img[H]; have_first[s] = 1'b1; end
        bus_write(reg_addr(s, 1), 16'(H + img_w));          // coo_addr
        bus_write(reg_addr(s, 2), 16'(H));                  // v_addr
        bus_write(reg_addr(s, 3), 16'(img_words - 2));      // last_addr: last value word
        if (img_nnz == 0) n_empty_run++;
        nnz_run[s]     = img_nnz;
        if (cur[s] < COLS && img_w > 0) pending = 1;
      end
      // start all sub-arrays, then they compute in parallel
      for (int s = 0; s < N_SUB; s++) begin
        busy_cycles[s] = 0;
        bus_write(reg_addr(s, 0), 16'h1);
      end
      // poll; meanwhile read memory words of running sub-arrays (stalled while in use)
      for (int s = 0; s < N_SUB; s++) begin
        do begin
          if (have_first[s]) begin
            bus_read(mem_addr(s, H), d);                    // first input word of the tile
            checks++;
            if (d != first_in[s]) begin
              failures++; $display("transparent read of sub-array %0d gave %h", s, d);
            end
          end
          bus_read(reg_addr(s, 0), d);
        end while (d[1] != 1'b1);
        checks++;
        if (busy_cycles[s] != 14 * nnz_run[s]) begin
          failures++;
          $display("sub-array %0d: %0d busy cycles for %0d MACs", s, busy_cycles[s], nnz_run[s]);
        end
      end
      round++;
    end
    for (int s = 0; s < N_SUB; s++) if (ntiles[s] > 1) n_multi_tile++;

    // read back the results
    for (int s = 0; s < N_SUB; s++)
      for (int r = 0; r < H; r++) begin
        bus_read(mem_addr(s, r), d);
        checks++;
        if (!same16(d, cref[s*H + r])) begin
          failures++;
          if (failures < 20) $display("C[%0d] = %h, expected %h", s*H + r, d, cref[s*H + r]);
        end
      end

    $display("rounds=%0d stalls=%0d multi_tile_stripes=%0d skipped_col_runs=%0d empty_runs=%0d",
             round, n_stall, n_multi_tile, n_skip_cols, n_empty_run);
    $display("overflows=%0d cancellations=%0d underflows=%0d inf_accumulations=%0d parallel_cycles=%0d",
             n_overflow, n_cancel, n_underflow, n_inf_acc, n_all_busy);
    cnt_list = '{n_stall, n_multi_tile, n_skip_cols, n_empty_run, n_overflow,
                 n_cancel, n_underflow, n_inf_acc, n_all_busy};
    foreach (cnt_list[i]) begin
      checks++;
      if (cnt_list[i] == 0) begin failures++; $display("mechanism %0d never happened", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
