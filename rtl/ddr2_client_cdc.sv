// Clock-domain crossing for one read client of the DDR2 bridge.
//
// The reconfiguration controllers run on the parser clock, while the DDR2
// bridge runs on the clock of the memory controller core. This helper
// carries a read request across in one direction and the returned data in
// the other, each through a dual-clock FIFO (async_fifo).
// Client side (clk): a request (rd_req, rd_addr) is taken, and acknowledged
// with rd_ack in the same cycle, whenever the address FIFO has room. The
// 128-bit beats of the answer come out on rd_valid/rd_data in order, one
// per cycle while any are waiting; they may arrive with gaps between them.
// Memory side (mclk): the head of the address FIFO is presented to the
// bridge as a request (m_req, m_addr) and popped on m_ack. Every beat the
// bridge returns (m_valid, m_data) is written into the data FIFO, which
// must not overflow: with one outstanding read per client (two beats) the
// depth of four always suffices.
// Latency: about three cycles of each clock per direction for the
// synchronisers. Running the memory side in the clock of the controller
// core follows the memory interface description; the request/answer FIFO
// pair and their depths are this design's.
module ddr2_client_cdc #(
  parameter int unsigned ADDR_W = 30
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              mclk,
  input  logic              mrst_n,
  // client side (clk)
  input  logic              rd_req,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic              rd_ack,
  output logic              rd_valid,
  output logic [127:0]      rd_data,
  // bridge side (mclk)
  output logic              m_req,
  output logic [ADDR_W-1:0] m_addr,
  input  logic              m_ack,
  input  logic              m_valid,
  input  logic [127:0]      m_data
);
  logic a_full, a_empty, d_empty;

  assign rd_ack = rd_req && !a_full;

  async_fifo #(.W(ADDR_W), .DEPTH(4)) u_addr (
    .wclk(clk), .wrst_n(rst_n), .wr(rd_ack), .wdata(rd_addr), .full(a_full),
    .rclk(mclk), .rrst_n(mrst_n), .rd(m_req && m_ack), .rdata(m_addr), .empty(a_empty)
  );
  assign m_req = !a_empty;

  logic d_full;
  async_fifo #(.W(128), .DEPTH(4)) u_data (
    .wclk(mclk), .wrst_n(mrst_n), .wr(m_valid), .wdata(m_data), .full(d_full),
    .rclk(clk), .rrst_n(rst_n), .rd(!d_empty), .rdata(rd_data), .empty(d_empty)
  );
  assign rd_valid = !d_empty;

  // the answer FIFO must never be written while full (in reset m_valid is
  // low and the FIFO empty, so the rule holds there too)
  a_no_overflow: assert property (@(posedge mclk) !(m_valid && d_full))
    else $error("ddr2_client_cdc: answer FIFO overflow");
endmodule
