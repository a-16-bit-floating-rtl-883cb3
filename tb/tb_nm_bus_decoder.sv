// tb_nm_bus_decoder: the bus decoder with four simple memory slaves written here.
// Each slave grants at random and answers a granted read one cycle later with its own
// memory. Random writes and reads from the host must reach only the addressed slave,
// be held until granted, and return the addressed slave's data.
module tb_nm_bus_decoder;
  localparam int N = 4, LW = 6, SW = 2;

  logic               clk = 1'b0, rst_n = 1'b0;
  logic               m_req = 1'b0, m_we = 1'b0;
  logic [SW+LW-1:0]   m_addr = '0;
  logic [15:0]        m_wdata = '0;
  logic               m_gnt, m_rvalid;
  logic [15:0]        m_rdata;
  logic [N-1:0]       s_req, s_gnt, s_rvalid;
  logic               s_we;
  logic [LW-1:0]      s_addr;
  logic [15:0]        s_wdata;
  logic [N-1:0][15:0] s_rdata;
  logic [15:0]        smem [N][1 << LW];
  logic [15:0]        model [N * (1 << LW)];
  int checks = 0, failures = 0, stalls = 0;

  always #5 clk = ~clk;

  nm_bus_decoder #(.N(N), .LW(LW), .SW(SW)) dut (.clk, .rst_n, .m_req, .m_we, .m_addr,
    .m_wdata, .m_gnt, .m_rvalid, .m_rdata, .s_req, .s_we, .s_addr, .s_wdata, .s_gnt,
    .s_rvalid, .s_rdata);

  // slaves
  always @(negedge clk) for (int i = 0; i < N; i++) s_gnt[i] = ($urandom_range(0, 2) != 0);
  always @(posedge clk) for (int i = 0; i < N; i++) begin
    s_rvalid[i] <= s_req[i] && s_gnt[i] && !s_we;
    if (s_req[i] && s_gnt[i]) begin
      if (s_we) smem[i][s_addr] <= s_wdata;
      else      s_rdata[i] <= smem[i][s_addr];
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic xfer(bit w, int a, logic [15:0] d, output logic [15:0] q);
    @(negedge clk); #1; m_req = 1'b1; m_we = w; m_addr = (SW+LW)'(a); m_wdata = d; #1;
    while (!m_gnt) begin stalls++; @(negedge clk); #2; end
    @(negedge clk); m_req = 1'b0; #1;
    if (!w) begin
      checks++;
      if (!m_rvalid) begin failures++; $display("no rvalid at %0d", a); end
    end
    q = m_rdata;
  endtask

  initial begin
    logic [15:0] q;
    s_rvalid = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < N * (1 << LW); a++) begin
      model[a] = 16'($urandom);
      xfer(1'b1, a, model[a], q);
    end
    for (int k = 0; k < 2000; k++) begin
      automatic int a = $urandom_range(0, N * (1 << LW) - 1);
      if ($urandom_range(0, 3) == 0) begin
        model[a] = 16'($urandom);
        xfer(1'b1, a, model[a], q);
      end else begin
        xfer(1'b0, a, 16'h0, q);
        checks++;
        if (q !== model[a]) begin failures++; $display("addr %0d: %h vs %h", a, q, model[a]); end
      end
    end
    for (int i = 0; i < N; i++)
      for (int a = 0; a < (1 << LW); a++) begin
        checks++;
        if (smem[i][a] !== model[i * (1 << LW) + a]) failures++;
      end
    checks++;
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
