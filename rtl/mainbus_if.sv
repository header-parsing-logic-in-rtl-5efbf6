// MainBus interface: the host's window into the design.
//
// The host (a PC behind the board's USB bridge) issues 32-bit read and
// write transactions, each with a 32-bit address word. Bit 31 of the
// address word, PS (path select), chooses the target:
//   write, PS=0  packet data for the parser chain. Address bits
//                [27] SR, [26] DR, [25] SP, [24] EP, [23:21] SZ travel
//                with the 32-bit data word through a dual-clock FIFO into
//                the parser clock domain (word dropped if SR is low or the
//                FIFO is full).
//   write, PS=1  data for external DDR2 memory at address bits [30:0].
//   read,  PS=1  addresses 0xFFFFFFFF/E/D/C return bits 127:96, 95:64,
//                63:32 and 31:0 of data read back from DDR2 (one 32-bit
//                lane FIFO each); any other address requests a DDR2 read.
//   read,  PS=0  a system function in bits [4:0]:
//                00 FIFO_STATUS  status word of this logic
//                01 FIFO_LASTDATA last packet word passed to the chain
//                02 FIFO_VERSION design version
//                03 NSPI_REQRES  request info-dump word: PR (bit 21) picks
//                   the stage, bits [20:12] the RAM address
//                04/05 NSPI_READRES_HI/LO upper/lower half of the 64-bit
//                   word returned by the last request
//                06 ICAP_LAST    last word written to the configuration port
// Status words: DA7A2EC1 packet word passed, DA7AFA2F dropped because the
// chain is blocked, DA7AB10C dropped for another reason, 9E7AD2E5 info
// request made, ABADC0DE unknown operation.
//
// Timing: mb_rdata is valid with mb_rvalid one mb_clk cycle after mb_rd.
// An info request crosses to the parser clock through a FIFO and its answer
// comes back through another; it must have arrived before READRES is read.
// The address-word formats, function codes, status codes and special
// addresses follow the MainBus protocol description; the transaction-level
// interface (the board vendor's bus modules are not modelled), the meaning
// given to SR, the lane-FIFO interface and the version value are this
// design's. icap_last is sampled as a quasi-static value.
module mainbus_if
  import hp_pkg::*;
#(
  parameter logic [31:0] VERSION   = 32'h0001_0000,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic          mb_clk,
  input  logic          mb_rst_n,
  input  logic          clk,          // parser clock
  input  logic          rst_n,
  // host transactions
  input  logic          mb_wr,
  input  logic          mb_rd,
  input  logic [31:0]   mb_addr,
  input  logic [31:0]   mb_wdata,
  output logic          mb_rvalid,
  output logic [31:0]   mb_rdata,
  // parser-side packet words
  input  logic          pk_rd,
  output mbpkt_t        pk_data,
  output logic          pk_empty,
  // parser-side info-dump request / answer
  input  logic          nq_rd,
  output logic [9:0]    nq_data,      // {PR, RAM address}
  output logic          nq_empty,
  input  logic          na_wr,
  input  logic [63:0]   na_data,
  // DDR2 commands (MainBus clock domain)
  output logic          dcmd_v,
  output logic          dcmd_rd,
  output logic [30:0]   dcmd_addr,
  output logic [31:0]   dcmd_data,
  input  logic          dcmd_full,
  input  logic [3:0]    lane_empty,
  input  logic [31:0]   lane_data [4],
  output logic [3:0]    lane_pop,
  // debug
  input  logic [31:0]   icap_last
);
  logic        ps;
  logic [4:0]  fn;
  logic [31:0] status_q, last_q, icap_q;
  logic [63:0] res_q;
  logic        pk_full, nq_full, na_empty, pk_wr;
  logic [63:0] na_q;
  mbpkt_t      pk_in;

  assign ps = mb_addr[31];
  assign fn = mb_addr[4:0];

  assign pk_in = '{data: mb_wdata, sp: mb_addr[25], ep: mb_addr[24], sz: mb_addr[23:21]};
  assign pk_wr = mb_wr && !ps && mb_addr[27] && !pk_full;

  async_fifo #(.W($bits(mbpkt_t)), .DEPTH(FIFO_DEPTH)) u_pk (
    .wclk(mb_clk), .wrst_n(mb_rst_n), .wr(pk_wr), .wdata(pk_in), .full(pk_full),
    .rclk(clk), .rrst_n(rst_n), .rd(pk_rd), .rdata(pk_data), .empty(pk_empty)
  );

  logic nq_wr;
  assign nq_wr = mb_rd && !ps && fn == FN_NSPI_REQRES && !nq_full;

  async_fifo #(.W(10), .DEPTH(4)) u_nq (
    .wclk(mb_clk), .wrst_n(mb_rst_n), .wr(nq_wr), .wdata({mb_addr[21], mb_addr[20:12]}),
    .full(nq_full), .rclk(clk), .rrst_n(rst_n), .rd(nq_rd), .rdata(nq_data), .empty(nq_empty)
  );

  async_fifo #(.W(64), .DEPTH(4)) u_na (
    .wclk(clk), .wrst_n(rst_n), .wr(na_wr), .wdata(na_data), .full(),
    .rclk(mb_clk), .rrst_n(mb_rst_n), .rd(!na_empty), .rdata(na_q), .empty(na_empty)
  );

  // DDR2 command path
  assign dcmd_v    = (mb_wr && ps) || (mb_rd && ps && mb_addr[31:2] != 30'h3FFF_FFFF);
  assign dcmd_rd   = mb_rd;
  assign dcmd_addr = mb_addr[30:0];
  assign dcmd_data = mb_wdata;
  // special read addresses: FF..FF -> lane 3 (127:96) ... FF..FC -> lane 0
  always_comb begin
    lane_pop = '0;
    if (mb_rd && mb_addr[31:2] == 30'h3FFF_FFFF && !lane_empty[mb_addr[1:0]])
      lane_pop[mb_addr[1:0]] = 1'b1;
  end

  always_ff @(posedge mb_clk or negedge mb_rst_n) begin
    if (!mb_rst_n) begin
      status_q <= ST_PASSED; last_q <= '0; res_q <= '0; icap_q <= '0;
      mb_rvalid <= 1'b0; mb_rdata <= '0;
    end else begin
      icap_q    <= icap_last;
      mb_rvalid <= mb_rd;
      if (!na_empty) res_q <= na_q;
      if (mb_wr && !ps) begin
        if (!mb_addr[27])  status_q <= ST_DROPPED;
        else if (pk_full)  status_q <= ST_BLOCKED;
        else begin
          status_q <= ST_PASSED;
          last_q   <= mb_wdata;
        end
      end else if (mb_wr && ps && dcmd_full) begin
        status_q <= ST_DROPPED;
      end
      if (mb_rd) begin
        if (ps) begin
          mb_rdata <= (mb_addr[31:2] == 30'h3FFF_FFFF) ? lane_data[mb_addr[1:0]] : ST_PASSED;
        end else begin
          unique case (fn)
            FN_FIFO_STATUS:     mb_rdata <= status_q;
            FN_FIFO_LASTDATA:   mb_rdata <= last_q;
            FN_FIFO_VERSION:    mb_rdata <= VERSION;
            FN_NSPI_REQRES: begin
              mb_rdata <= nq_full ? ST_DROPPED : ST_NSPI_OK;
              status_q <= nq_full ? ST_DROPPED : ST_NSPI_OK;
            end
            FN_NSPI_READRES_HI: mb_rdata <= res_q[63:32];
            FN_NSPI_READRES_LO: mb_rdata <= res_q[31:0];
            FN_ICAP_LAST:       mb_rdata <= icap_q;
            default: begin
              mb_rdata <= ST_BADOP;
              status_q <= ST_BADOP;
            end
          endcase
        end
      end
    end
  end
endmodule
