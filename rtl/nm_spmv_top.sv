// nm_spmv_top: near-SRAM floating-point SpMV compute memory.
//
// N_SUB compute sub-arrays of WORDS 16-bit words each (default 8 x 2048 words =
// 8 x 4 kB = 32 kB), every one with its own binary16 FPU and SpMV control unit, sit
// behind one system-bus port. The host loads each sub-array with an output slice, an
// input slice and a COO tile, programs its pointer registers, starts it, and reads the
// results back; the sub-arrays compute in parallel, one 14-cycle multiply-accumulate
// at a time each. Without a running computation the whole block is plain memory.
//
// Host address (word granularity): {sub-array index, window bit, offset}; window 0 is
// the SRAM, window 1 the four registers of the control unit. busy and done give each
// sub-array's status (also readable in its CTRL register).
//
// The organisation (total 32 kB, 8 sub-arrays of 4 kB, one FPU and CU per sub-array)
// follows the paper's largest configuration; the bus and address map are this
// design's choices.
module nm_spmv_top #(
  parameter int unsigned N_SUB = 8,
  parameter int unsigned WORDS = 2048,
  parameter int unsigned AW    = $clog2(WORDS),
  parameter int unsigned SW    = (N_SUB > 1) ? $clog2(N_SUB) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bus_req,
  input  logic             bus_we,
  input  logic [SW+AW:0]   bus_addr,
  input  logic [15:0]      bus_wdata,
  output logic             bus_gnt,
  output logic             bus_rvalid,
  output logic [15:0]      bus_rdata,
  output logic [N_SUB-1:0] busy,
  output logic [N_SUB-1:0] done
);

  logic [N_SUB-1:0]        s_req, s_gnt, s_rvalid;
  logic                    s_we;
  logic [AW:0]             s_addr;
  logic [15:0]             s_wdata;
  logic [N_SUB-1:0][15:0]  s_rdata;

  nm_bus_decoder #(.N(N_SUB), .LW(AW + 1), .SW(SW)) u_dec (
    .clk, .rst_n,
    .m_req(bus_req), .m_we(bus_we), .m_addr(bus_addr), .m_wdata(bus_wdata),
    .m_gnt(bus_gnt), .m_rvalid(bus_rvalid), .m_rdata(bus_rdata),
    .s_req, .s_we, .s_addr, .s_wdata, .s_gnt, .s_rvalid, .s_rdata
  );

  for (genvar i = 0; i < N_SUB; i++) begin : g_sub
    nm_compute_subarray #(.WORDS(WORDS)) u_sub (
      .clk, .rst_n,
      .req(s_req[i]), .we(s_we), .addr(s_addr), .wdata(s_wdata),
      .gnt(s_gnt[i]), .rvalid(s_rvalid[i]), .rdata(s_rdata[i]),
      .busy(busy[i]), .done(done[i])
    );
  end

endmodule
