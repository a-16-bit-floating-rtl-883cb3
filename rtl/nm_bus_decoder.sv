// nm_bus_decoder: system-bus interconnect between the host and N compute sub-arrays.
//
// The upper address bits select a sub-array (addr[SW+LW-1:LW], SW = log2 N); the lower
// LW bits go to it unchanged. The request is forwarded only to the selected
// sub-array, whose gnt is returned to the host. Read data comes back one cycle after
// the grant; the decoder remembers which sub-array was granted and returns that
// sub-array's rvalid and rdata. The paper connects the sub-arrays to a standard
// system bus without naming one; this request/grant bus and its decoder are this
// design's choices.
module nm_bus_decoder #(
  parameter int unsigned N  = 8,
  parameter int unsigned LW = 12,
  parameter int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // host side
  input  logic              m_req,
  input  logic              m_we,
  input  logic [SW+LW-1:0]  m_addr,
  input  logic [15:0]       m_wdata,
  output logic              m_gnt,
  output logic              m_rvalid,
  output logic [15:0]       m_rdata,
  // sub-array side
  output logic [N-1:0]      s_req,
  output logic              s_we,
  output logic [LW-1:0]     s_addr,
  output logic [15:0]       s_wdata,
  input  logic [N-1:0]      s_gnt,
  input  logic [N-1:0]      s_rvalid,
  input  logic [N-1:0][15:0] s_rdata
);

  logic [SW-1:0] sel, sel_q;

  assign sel     = m_addr[SW+LW-1:LW];
  assign s_we    = m_we;
  assign s_addr  = m_addr[LW-1:0];
  assign s_wdata = m_wdata;

  always_comb begin
    s_req = '0;
    if (m_req && (32'(sel) < N)) s_req[sel] = 1'b1;
  end

  assign m_gnt = (32'(sel) < N) ? s_gnt[sel] : 1'b0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sel_q <= '0;
    else if (m_gnt) sel_q <= sel;
  end

  assign m_rvalid = s_rvalid[sel_q];
  assign m_rdata  = s_rdata[sel_q];

endmodule
