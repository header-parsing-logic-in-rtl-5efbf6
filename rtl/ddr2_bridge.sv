// Bridge between the MainBus, the reconfiguration controllers and the DDR2
// memory controller core.
//
// The DDR2 controller core (a vendor core, outside this RTL) takes 256
// bits per access as two 128-bit halves on consecutive cycles:
//   write: af_wren and wdf_wren high with the address and the first half,
//          then wdf_wren alone with the second half; wdf_mask has one bit
//          per byte, 1 = byte not written
//   read:  af_wren with af_cmd = 1 and the address; the 256 bits come back
//          later as two rd_valid beats, low half first.
// MainBus side (mb_clk): 32-bit commands {read?, address, data} enter a
// dual-clock FIFO. Writes are gathered four words at a time (word slot =
// address bits 1:0) into 128 bits; the 128 bits are offered twice (both
// halves of the 256-bit write) and the mask leaves only the half chosen by
// address bit 2, so a 256-bit memory word fills in two such writes. Reads
// return 256 bits that are spread, 32 bits per lane, over four dual-clock
// lane FIFOs (bits 31:0 of each half to lane 0 ... 127:96 to lane 3), read
// back by the host through its four special addresses, twice each.
// Reconfiguration side (clk): NC read clients (request, address, ack) get
// their 256-bit words as the two beats on c_valid/c_data. Only one access
// is in flight at a time: client 0 first, then the others, then MainBus
// commands. Addresses are in 256-bit words on the client side and in
// 32-bit words (bits 30:3 select the 256-bit word) on the MainBus side.
// The two-cycle write protocol, the masking of half the data, the mod-2 /
// mod-8 addressing, the four read lanes and the one-read-at-a-time use of
// the core follow the memory interface description; the arbitration, the
// address units and client ports that share the bridge's clock are this
// design's. In hp_top clk is the controller core's clock, and the clients
// reach the bridge through ddr2_client_cdc.
// Lint reports bits 127:96 of the write accumulator as unused: the
// second write cycle sends only the upper half of the 256-bit word, and
// its last 32 bits come straight from the bus, so those register bits are
// never read; synthesis removes them.
module ddr2_bridge #(
  parameter int unsigned NC     = 2,
  parameter int unsigned ADDR_W = 30
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              mb_clk,
  input  logic              mb_rst_n,
  // MainBus commands (mb_clk)
  input  logic              dcmd_v,
  input  logic              dcmd_rd,
  input  logic [30:0]       dcmd_addr,
  input  logic [31:0]       dcmd_data,
  output logic              dcmd_full,
  input  logic [3:0]        lane_pop,
  output logic [3:0]        lane_empty,
  output logic [31:0]       lane_data [4],
  // read clients (clk)
  input  logic [NC-1:0]     c_req,
  input  logic [ADDR_W-1:0] c_addr [NC],
  output logic [NC-1:0]     c_ack,
  output logic [NC-1:0]     c_valid,
  output logic [127:0]      c_data,
  // DDR2 controller core application port (clk)
  output logic              af_wren,
  output logic              af_cmd,     // 0 write, 1 read
  output logic [ADDR_W-1:0] af_addr,
  output logic              wdf_wren,
  output logic [127:0]      wdf_data,
  output logic [15:0]       wdf_mask,
  input  logic              rd_valid,
  input  logic [127:0]      rd_data,
  output logic [15:0]       n_wr,
  output logic [15:0]       n_rd
);
  localparam int unsigned OW = $clog2(NC + 1);

  // MainBus command FIFO
  logic [63:0] cq;
  logic        cq_empty, cq_rd;
  async_fifo #(.W(64), .DEPTH(16)) u_cmd (
    .wclk(mb_clk), .wrst_n(mb_rst_n), .wr(dcmd_v), .wdata({dcmd_rd, dcmd_addr, dcmd_data}),
    .full(dcmd_full), .rclk(clk), .rrst_n(rst_n), .rd(cq_rd), .rdata(cq), .empty(cq_empty)
  );
  logic        q_rd;
  logic [30:0] q_addr;
  logic [31:0] q_data;
  assign {q_rd, q_addr, q_data} = cq;

  // read-back lanes
  logic lane_wr;
  for (genvar k = 0; k < 4; k++) begin : g_lane
    async_fifo #(.W(32), .DEPTH(8)) u_lane (
      .wclk(clk), .wrst_n(rst_n), .wr(lane_wr), .wdata(rd_data[32*k +: 32]), .full(),
      .rclk(mb_clk), .rrst_n(mb_rst_n), .rd(lane_pop[k]), .rdata(lane_data[k]),
      .empty(lane_empty[k])
    );
  end

  typedef enum logic [1:0] {B_IDLE, B_WR2, B_RDW} b_e;
  b_e           st;
  logic [OW-1:0] owner;        // NC = MainBus
  logic         half_q;
  logic [127:0] wacc_q;
  logic         whalf_q;
  logic         cgrant;
  logic [OW-1:0] csel;

  always_comb begin
    cgrant = 1'b0;
    csel   = '0;
    for (int i = NC - 1; i >= 0; i--) begin
      if (c_req[i]) begin
        cgrant = 1'b1;
        csel   = OW'(i);
      end
    end
  end

  assign cq_rd   = (st == B_IDLE) && !cgrant && !cq_empty;
  assign lane_wr = (st == B_RDW) && rd_valid && owner == OW'(NC);
  assign c_data  = rd_data;

  always_comb begin
    c_ack   = '0;
    c_valid = '0;
    if (st == B_IDLE && cgrant) c_ack[csel[$clog2(NC)-1:0]] = 1'b1;
    for (int i = 0; i < NC; i++)
      if (st == B_RDW && rd_valid && owner == OW'(i)) c_valid[i] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= B_IDLE; owner <= '0; half_q <= 1'b0; wacc_q <= '0; whalf_q <= 1'b0;
      af_wren <= 1'b0; af_cmd <= 1'b0; af_addr <= '0; wdf_wren <= 1'b0;
      wdf_data <= '0; wdf_mask <= '0; n_wr <= '0; n_rd <= '0;
    end else begin
      af_wren  <= 1'b0;
      wdf_wren <= 1'b0;
      unique case (st)
        B_IDLE: begin
          if (cgrant) begin
            af_wren <= 1'b1; af_cmd <= 1'b1; af_addr <= c_addr[csel[$clog2(NC)-1:0]];
            owner <= csel; half_q <= 1'b0; n_rd <= n_rd + 16'd1;
            st <= B_RDW;
          end else if (!cq_empty) begin
            if (q_rd) begin
              af_wren <= 1'b1; af_cmd <= 1'b1; af_addr <= ADDR_W'(q_addr[30:3]);
              owner <= OW'(NC); half_q <= 1'b0; n_rd <= n_rd + 16'd1;
              st <= B_RDW;
            end else begin
              // gather 32-bit words into 128 bits (slot = address mod 4)
              wacc_q[32*q_addr[1:0] +: 32] <= q_data;
              if (q_addr[1:0] == 2'd3) begin
                af_wren  <= 1'b1; af_cmd <= 1'b0; af_addr <= ADDR_W'(q_addr[30:3]);
                wdf_wren <= 1'b1;
                wdf_data <= {q_data, wacc_q[95:0]};
                // first half written only when address bit 2 is 0
                wdf_mask <= q_addr[2] ? 16'hFFFF : 16'h0000;
                whalf_q  <= q_addr[2];
                n_wr     <= n_wr + 16'd1;
                st       <= B_WR2;
              end
            end
          end
        end
        B_WR2: begin
          wdf_wren <= 1'b1;
          wdf_mask <= whalf_q ? 16'h0000 : 16'hFFFF;
          st       <= B_IDLE;
        end
        B_RDW: if (rd_valid) begin
          half_q <= 1'b1;
          if (half_q) st <= B_IDLE;
        end
        default: st <= B_IDLE;
      endcase
    end
  end
endmodule
