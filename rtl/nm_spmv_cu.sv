// nm_spmv_cu: SpMV control unit of one compute sub-array.
//
// It walks the COO list of one matrix tile stored in its sub-array and performs, for
// each non-zero, C[m] <- C[m] + NZ[m][n] * V[n] with the FPU. The sub-array holds the
// output slice C from address 0, the input slice V from v_addr, and the non-zeros as
// word triplets (column n, value, row m) from coo_addr to last_addr (the address of
// the last value word). The loop runs while coo_addr <= last_addr; a start with
// coo_addr > last_addr finishes at once.
//
// One multiply-accumulate takes 14 cycles, with one SRAM access per cycle:
//   c0  read n           (coo_addr++)
//   c1  read V[n+v_addr]
//   c2  read NZ          (coo_addr++)           V arrives
//   c3  read m           (coo_addr++)           NZ arrives, FPU multiply starts
//   c4  read C[m]                               m arrives
//   c5  -                                       C[m] arrives
//   c8  FPU add starts (product + C[m])         product ready
//   c13 write C[m]                              sum ready; next MAC or finish
// The SRAM is free in c5..c12, when the bus may use it.
//
// Configuration registers (reg_sel): 0 CTRL (write bit0 = start, read {done, busy}),
// 1 coo_addr, 2 v_addr, 3 last_addr. Writes to 1..3 are ignored while busy; reading 1
// returns the running pointer. done is set at the end of a run and cleared by start.
//
// The three pointer registers, the memory layout, the read order of Algorithm 1 and the
// 14-cycle MAC follow the paper; the loop test (the printed comparison is read as
// "coo_addr <= last_addr"), the register map and the cycle plan are this design's.
module nm_spmv_cu
  import nm_pkg::*;
#(
  parameter int unsigned WORDS = 2048,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // configuration registers
  input  logic          reg_we,
  input  logic [1:0]    reg_sel,
  input  logic [15:0]   reg_wdata,
  output logic [15:0]   reg_rdata,
  // SRAM port (read data one cycle after the read)
  output logic          mem_req,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output logic [15:0]   mem_wdata,
  input  logic [15:0]   mem_rdata,
  // FPU
  output logic          fpu_start,
  output fp_op_e        fpu_op,
  output fp16_t         fpu_a,
  output fp16_t         fpu_b,
  input  logic          fpu_done,
  input  fp16_t         fpu_result,
  // status
  output logic          busy,
  output logic          done
);

  typedef enum logic [3:0] {
    C_IDLE, C_RD_N, C_RD_V, C_RD_NZ, C_RD_M, C_RD_C, C_LD_C, C_WAIT_MUL, C_WAIT_ADD
  } cu_state_e;

  cu_state_e   state_q;
  logic [15:0] coo_q, v_addr_q, last_q;
  fp16_t       v_q, c_q;
  logic [15:0] m_q;
  logic        start_req;

  assign start_req = reg_we && (reg_sel == REG_CTRL) && reg_wdata[0] && (state_q == C_IDLE);
  assign busy      = (state_q != C_IDLE);

  always_comb begin
    unique case (reg_sel)
      REG_CTRL: reg_rdata = {14'b0, done, busy};
      REG_COO:  reg_rdata = coo_q;
      REG_V:    reg_rdata = v_addr_q;
      default:  reg_rdata = last_q;
    endcase
  end

  // SRAM and FPU requests for the current cycle.
  always_comb begin
    mem_req   = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = '0;
    mem_wdata = fpu_result;
    fpu_start = 1'b0;
    fpu_op    = FP_MUL;
    fpu_a     = mem_rdata;
    fpu_b     = v_q;
    unique case (state_q)
      C_RD_N, C_RD_NZ: begin
        mem_req  = 1'b1;
        mem_addr = AW'(coo_q);
      end
      C_RD_V: begin
        mem_req  = 1'b1;
        mem_addr = AW'(mem_rdata + v_addr_q);
      end
      C_RD_M: begin
        mem_req   = 1'b1;
        mem_addr  = AW'(coo_q);
        fpu_start = 1'b1;               // NZ on mem_rdata times V
      end
      C_RD_C: begin
        mem_req  = 1'b1;
        mem_addr = AW'(mem_rdata);      // output slice starts at address 0
      end
      C_WAIT_MUL: begin
        fpu_start = fpu_done;
        fpu_op    = FP_ADD;
        fpu_a     = c_q;
        fpu_b     = fpu_result;
      end
      C_WAIT_ADD: begin
        mem_req  = fpu_done;
        mem_we   = fpu_done;
        mem_addr = AW'(m_q);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= C_IDLE;
      coo_q    <= '0;
      v_addr_q <= '0;
      last_q   <= '0;
      v_q      <= '0;
      c_q      <= '0;
      m_q      <= '0;
      done     <= 1'b0;
    end else begin
      unique case (state_q)
        C_IDLE: begin
          if (reg_we) begin
            unique case (reg_sel)
              REG_COO:  coo_q    <= reg_wdata;
              REG_V:    v_addr_q <= reg_wdata;
              REG_LAST: last_q   <= reg_wdata;
              default: ;
            endcase
          end
          if (start_req) begin
            done <= 1'b0;
            if (coo_q <= last_q) state_q <= C_RD_N;
            else                 done    <= 1'b1;
          end
        end
        C_RD_N: begin
          coo_q   <= coo_q + 16'd1;
          state_q <= C_RD_V;
        end
        C_RD_V:  state_q <= C_RD_NZ;
        C_RD_NZ: begin
          v_q     <= mem_rdata;
          coo_q   <= coo_q + 16'd1;
          state_q <= C_RD_M;
        end
        C_RD_M: begin
          coo_q   <= coo_q + 16'd1;
          state_q <= C_RD_C;
        end
        C_RD_C: begin
          m_q     <= mem_rdata;
          state_q <= C_LD_C;
        end
        C_LD_C: begin
          c_q     <= mem_rdata;
          state_q <= C_WAIT_MUL;
        end
        C_WAIT_MUL: if (fpu_done) state_q <= C_WAIT_ADD;
        C_WAIT_ADD: if (fpu_done) begin
          if (coo_q <= last_q) state_q <= C_RD_N;
          else begin
            state_q <= C_IDLE;
            done    <= 1'b1;
          end
        end
        default: state_q <= C_IDLE;
      endcase
    end
  end

endmodule
