// Reconfiguration controller of the coarse parser chain.
//
// Decides when a parser processor must be reprogrammed and moves its
// configuration from external memory to the coarse parser programmer.
// A stage reports the type field of each packet it parses (trig_v,
// trig_etype). If the type differs from the one the next stage is set up
// for (next_type) and is non-zero, it is looked up in an EtherType CAM.
// A miss means the type is not supported and nothing happens. A hit starts
// a configuration: the CAM index selects a slot of 2**SLOT_LOG2 256-bit
// words in external memory, starting at word idx << SLOT_LOG2. The
// controller then reads 256-bit words one at a time (a read request, then
// two 128-bit beats from the DDR2 controller, low half first), cuts each
// into four 64-bit chunks for the programmer (lowest first) and reads the
// next word only while the programmer still expects data, at most
// MAX_READS words. Single 256-bit reads, one after another, are used
// rather than bursts because the end of the stream can only be seen in
// the data.
//
// Interfaces: CAM load port; read port rd_req/rd_addr/rd_ack (request
// taken), rd_valid/rd_data (returned beats); programmer port start, d_v/d,
// p_busy/p_done/p_cancel. Counters report started, completed and cancelled
// configurations. The trigger rule, the CAM step, the 256-bit read unit,
// the 64-bit programmer width and the one-read-at-a-time protocol follow
// the reconfiguration description; the slot layout, word addressing and
// the read limit are this design's.
module coarse_cfg_ctrl
  import hp_pkg::*;
#(
  parameter int unsigned CAM_DEPTH = 16,
  parameter int unsigned ADDR_W    = 30,
  parameter int unsigned SLOT_LOG2 = 4,
  parameter int unsigned MAX_READS = 16,
  localparam int unsigned CAW      = $clog2(CAM_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // CAM load
  input  logic              cam_we,
  input  logic [CAW-1:0]    cam_waddr,
  input  logic [15:0]       cam_wdata,
  input  logic              cam_wvalid,
  // trigger
  input  logic              trig_v,
  input  logic [15:0]       trig_etype,
  input  logic [15:0]       next_type,
  // external memory read port
  output logic              rd_req,
  output logic [ADDR_W-1:0] rd_addr,
  input  logic              rd_ack,
  input  logic              rd_valid,
  input  logic [127:0]      rd_data,
  // programmer
  output logic              p_start,
  output logic              d_v,
  output logic [PB_W-1:0]   d,
  input  logic              p_busy,
  input  logic              p_done,
  input  logic              p_cancel,
  // status
  output logic              active,
  output logic [15:0]       n_started,
  output logic [15:0]       n_done,
  output logic [15:0]       n_cancel
);
  typedef enum logic [2:0] {CC_IDLE, CC_LOOK, CC_READ, CC_WAIT, CC_FEED, CC_END} cc_e;
  cc_e          st;
  logic         res_v, hit;
  logic [CAW-1:0] idx;
  logic [255:0] buf_q;
  logic         half_q;
  logic [1:0]   chunk;
  logic [$clog2(MAX_READS+1)-1:0] nread;
  logic         look;

  assign look   = (st == CC_IDLE) && trig_v && trig_etype != next_type && trig_etype != 16'h0;
  assign active = (st != CC_IDLE);

  cam #(.DEPTH(CAM_DEPTH), .KW(16)) u_cam (
    .clk, .rst_n, .we(cam_we), .waddr(cam_waddr), .wdata(cam_wdata),
    .wvalid(cam_wvalid), .lookup_v(look), .key(trig_etype),
    .res_v, .hit, .idx
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= CC_IDLE; rd_req <= 1'b0; rd_addr <= '0; p_start <= 1'b0;
      d_v <= 1'b0; d <= '0; buf_q <= '0; half_q <= 1'b0; chunk <= '0;
      nread <= '0; n_started <= '0; n_done <= '0; n_cancel <= '0;
    end else begin
      p_start <= 1'b0;
      d_v     <= 1'b0;
      if (p_done)   n_done   <= n_done + 16'd1;
      if (p_cancel) n_cancel <= n_cancel + 16'd1;
      unique case (st)
        CC_IDLE: if (look) st <= CC_LOOK;
        CC_LOOK: if (res_v) begin
          if (hit) begin
            rd_addr   <= ADDR_W'(idx) << SLOT_LOG2;
            p_start   <= 1'b1;
            n_started <= n_started + 16'd1;
            nread     <= '0;
            st        <= CC_READ;
          end else begin
            st <= CC_IDLE;
          end
        end
        CC_READ: begin
          rd_req <= 1'b1;
          if (rd_req && rd_ack) begin
            rd_req <= 1'b0;
            half_q <= 1'b0;
            nread  <= nread + 1'b1;
            st     <= CC_WAIT;
          end
        end
        CC_WAIT: if (rd_valid) begin
          if (!half_q) begin
            buf_q[127:0] <= rd_data;
            half_q       <= 1'b1;
          end else begin
            buf_q[255:128] <= rd_data;
            chunk          <= '0;
            st             <= CC_FEED;
          end
        end
        CC_FEED: begin
          d_v   <= 1'b1;
          d     <= buf_q[64*chunk +: 64];
          chunk <= chunk + 2'd1;
          if (chunk == 2'd3) st <= CC_END;
        end
        CC_END: begin
          // the programmer has seen the last chunk of this word
          if (p_busy && !d_v && 32'(nread) < MAX_READS) begin
            rd_addr <= rd_addr + 1'b1;
            st      <= CC_READ;
          end else if (!d_v) begin
            st <= CC_IDLE;
          end
        end
        default: st <= CC_IDLE;
      endcase
    end
  end
endmodule
