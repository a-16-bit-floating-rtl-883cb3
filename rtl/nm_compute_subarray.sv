// nm_compute_subarray: one SRAM sub-array with its near-memory FPU and control unit.
//
// The sub-array answers the system bus as plain memory and, in a second window, as the
// control unit's configuration registers. Bus address bit AW selects the window:
// 0 = SRAM word addr[AW-1:0], 1 = register addr[1:0] (see nm_spmv_cu). The SRAM has a
// single port; the control unit has priority on it, and a bus SRAM access in a cycle
// the control unit uses the port is held off (gnt low) until the port is free.
// Register accesses are always granted. When no computation runs the sub-array behaves
// as an ordinary memory.
//
// Bus protocol: the master holds req, we, addr, wdata until gnt; a granted read
// returns rdata with rvalid one cycle later. The per-sub-array FPU and control unit and
// the bus programming follow the paper; the arbitration and bus signals are this
// design's choices.
module nm_compute_subarray
  import nm_pkg::*;
#(
  parameter int unsigned WORDS = 2048,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req,
  input  logic        we,
  input  logic [AW:0] addr,
  input  logic [15:0] wdata,
  output logic        gnt,
  output logic        rvalid,
  output logic [15:0] rdata,
  output logic        busy,
  output logic        done
);

  logic          cu_req, cu_we;
  logic [AW-1:0] cu_addr;
  logic [15:0]   cu_wdata, cu_reg_rdata, mem_rdata;
  logic          sel_reg, bus_mem, bus_reg;
  logic          sram_en, sram_we;
  logic [AW-1:0] sram_addr;
  logic [15:0]   sram_wdata;
  logic          fpu_start, fpu_busy, fpu_done;
  fp_op_e        fpu_op;
  fp16_t         fpu_a, fpu_b, fpu_result;
  logic          rd_reg_q;
  logic [15:0]   reg_rdata_q;

  assign sel_reg = addr[AW];
  assign bus_mem = req && !sel_reg && !cu_req;
  assign bus_reg = req && sel_reg;
  assign gnt     = bus_mem || bus_reg;

  // Single SRAM port: control unit first, then the bus.
  assign sram_en    = cu_req || bus_mem;
  assign sram_we    = cu_req ? cu_we    : we;
  assign sram_addr  = cu_req ? cu_addr  : addr[AW-1:0];
  assign sram_wdata = cu_req ? cu_wdata : wdata;

  nm_sram #(.WORDS(WORDS), .DW(16)) u_sram (
    .clk, .en(sram_en), .we(sram_we), .addr(sram_addr), .wdata(sram_wdata), .rdata(mem_rdata)
  );

  nm_spmv_cu #(.WORDS(WORDS)) u_cu (
    .clk, .rst_n,
    .reg_we(bus_reg && we), .reg_sel(addr[1:0]), .reg_wdata(wdata), .reg_rdata(cu_reg_rdata),
    .mem_req(cu_req), .mem_we(cu_we), .mem_addr(cu_addr), .mem_wdata(cu_wdata),
    .mem_rdata,
    .fpu_start, .fpu_op, .fpu_a, .fpu_b, .fpu_done, .fpu_result,
    .busy, .done
  );

  nm_fpu u_fpu (
    .clk, .rst_n, .start(fpu_start), .op(fpu_op), .a(fpu_a), .b(fpu_b),
    .busy(fpu_busy), .done(fpu_done), .result(fpu_result)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rvalid      <= 1'b0;
      rd_reg_q    <= 1'b0;
      reg_rdata_q <= '0;
    end else begin
      rvalid      <= gnt && !we;
      rd_reg_q    <= sel_reg;
      reg_rdata_q <= cu_reg_rdata;
    end
  end

  assign rdata = rd_reg_q ? reg_rdata_q : mem_rdata;

  // The control unit only starts the FPU when it is idle.
  a_fpu_free: assert property (@(posedge clk) disable iff (!rst_n) fpu_start |-> !fpu_busy);

endmodule
