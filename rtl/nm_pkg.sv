// nm_pkg: types and constants shared by the near-SRAM SpMV design.
//
// The arithmetic format is IEEE-754 binary16 (1 sign bit, 5 exponent bits with bias 15,
// 10 fraction bits, 11-bit significand with the hidden one). The FPU works on the
// significand with 13 extra fraction bits so that alignment is exact up to a 13-bit
// exponent difference; wider differences fold the smaller operand into a sticky bit.
// The one-hot shift code therefore has 14 positions (shifts 0..13) and the widest
// intermediate value (aligned sum, normalised result) is 25 bits.
//
// Register map of one compute sub-array (word offsets inside its register window):
//   0 CTRL/STATUS  write bit0 = start; read {14'b0, done, busy}
//   1 COO_ADDR     first word of the COO region (reads back the running pointer)
//   2 V_ADDR       base address of the input-vector slice
//   3 LAST_ADDR    address of the value word of the last non-zero
// The output-vector slice starts at address 0 of the sub-array.
package nm_pkg;

  localparam int unsigned FP_W      = 16;
  localparam int unsigned EXP_W     = 5;
  localparam int unsigned FRAC_W    = 10;
  localparam int unsigned SIG_W     = FRAC_W + 1;   // 11-bit significand
  localparam int unsigned EXP_BIAS  = 15;
  localparam int unsigned GUARD_W   = 13;           // extra fraction bits kept on alignment
  localparam int unsigned SH_W      = GUARD_W + 1;  // one-hot shift code width (0..13)
  localparam int unsigned SHAMT_W   = 4;            // binary shift amount width
  localparam int unsigned WIDE_W    = SIG_W + GUARD_W + 1; // 25-bit aligned sum / normalised value
  localparam int unsigned LEAD_W    = 5;            // leading-one position 0..24

  // Cycles from the start of an FPU operation to its result.
  localparam int unsigned FPU_LATENCY = 5;
  // Cycles of one multiply-accumulate in the control unit.
  localparam int unsigned MAC_CYCLES  = 14;

  localparam logic [FP_W-1:0] FP_QNAN = 16'h7E00;

  typedef logic [FP_W-1:0] fp16_t;

  typedef enum logic [1:0] {
    FP_ADD = 2'd0,
    FP_MUL = 2'd1,
    FP_SUB = 2'd2    // a - b: an addition with the sign of b inverted
  } fp_op_e;

  // Register offsets inside a sub-array's register window.
  typedef enum logic [1:0] {
    REG_CTRL = 2'd0,
    REG_COO  = 2'd1,
    REG_V    = 2'd2,
    REG_LAST = 2'd3
  } reg_sel_e;

  // An operand after flushing subnormals and splitting into fields.
  typedef struct packed {
    logic             sign;
    logic [EXP_W-1:0] exp;
    logic [SIG_W-1:0] sig;   // with hidden one; zero for a zero operand
    logic             is_zero;
    logic             is_inf;
    logic             is_nan;
  } fp_unpacked_t;

  function automatic fp_unpacked_t fp_unpack(input fp16_t x);
    fp_unpacked_t u;
    u.sign    = x[15];
    u.exp     = x[14:10];
    u.is_zero = (x[14:10] == '0);              // zero, or a subnormal flushed to zero
    u.is_inf  = (x[14:10] == '1) && (x[9:0] == '0);
    u.is_nan  = (x[14:10] == '1) && (x[9:0] != '0);
    u.sig     = u.is_zero ? '0 : {1'b1, x[9:0]};
    return u;
  endfunction

endpackage
