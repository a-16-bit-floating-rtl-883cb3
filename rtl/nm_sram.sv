// nm_sram: single-port SRAM sub-array, WORDS x DW bits (default 2048 x 16 = 4 kB).
//
// One access per cycle: with en high, a write stores wdata at addr, a read returns
// the word at addr on rdata in the next cycle (rdata holds its value until the next
// read). It stands in for the high-density single-port SRAM macro of the target
// process; the size follows the paper, the one-cycle synchronous read is this
// design's assumption. Contents are not reset.
module nm_sram #(
  parameter int unsigned WORDS = 2048,
  parameter int unsigned DW    = 16,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
