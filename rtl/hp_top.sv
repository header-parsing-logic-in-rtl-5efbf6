// Dynamically reconfigurable header-parser chain: top level.
//
// A network switch port parses a packet with a chain of stages, each
// peeling one level of encapsulation. Here the chain can change what it
// parses while it runs: when a stage sees a packet type that the next stage
// is not set up for, and an EtherType CAM says a parser for that type
// exists, the next stage is reprogrammed from external DDR2 memory while
// packets keep flowing. Two chains sit side by side, fed from the same
// entry point; chain_sel (static) picks the one that receives packets and
// whose status is recorded:
//  * fine-grained chain (chain_sel = 0): two wrapped parser regions, the
//    first static (level 2 parser), the second rewritten through the FPGA's
//    internal configuration port by icap_ctrl; an unconfigured region is
//    bypassed.
//  * coarse-grained chain (chain_sel = 1): two parser processors (a small
//    and a large compare-and-extract core) joined by a programmable
//    interconnect; coarse_cfg_ctrl and coarse_prog load 128-bit core images
//    and the 12-bit interconnect setting.
// The shared framework: the MainBus host interface (packet injection,
// status, info read-back, DDR2 access), the chain entry controller, the
// DDR2 bridge and the MMU that dumps every stage's info output to block RAM.
//
// Clocks: mb_clk (MainBus), clk (parser chain and reconfiguration
// controllers), ddr_clk (the DDR2 bridge and the controller core's
// application port; ddr2_client_cdc carries the controllers' reads across)
// and icap_clk (configuration port). The DDR2
// controller core and the configuration port (ICAP) are not part of this
// RTL; their signals are ports. cfg_trig_v/cfg_trig_etype let the host
// start a coarse configuration by type (used to load the first processor,
// which has no stage before it); proc_on are the processors' supervisor
// on-pins; cam_* load the two CAMs (cam_sel 0 = fine, 1 = coarse).
// Status outputs: the type each region/processor is set up for, on and
// configured flags, the type field each stage of the selected chain
// checked (stage_etype), the configuration port's status word, counters,
// and the MMU write pointers. Unconnected sub-block outputs are counters
// and flags kept for debugging inside those blocks.
// Lint reports f_trig[1] as unused: the second fine region is the last
// stage of its chain, so no configuration is ever started from its type
// field; the bit is kept so both regions share one instance array.
module hp_top
  import hp_pkg::*;
#(
  parameter int unsigned ADDR_W     = 30,
  parameter int unsigned CAM_DEPTH  = 16,
  parameter int unsigned INFO_DEPTH = 512,
  parameter int unsigned FINE_SLOT_LOG2   = 12,
  parameter int unsigned FINE_MAX_READS   = 4096,
  parameter int unsigned COARSE_SLOT_LOG2 = 4,
  parameter int unsigned COARSE_MAX_READS = 16,
  localparam int unsigned CAW = $clog2(CAM_DEPTH)
) (
  input  logic              mb_clk,
  input  logic              mb_rst_n,
  input  logic              clk,
  input  logic              rst_n,
  input  logic              icap_clk,
  input  logic              icap_rst_n,
  input  logic              ddr_clk,     // clock of the DDR2 controller core
  input  logic              ddr_rst_n,
  input  logic              chain_sel,
  // MainBus transactions
  input  logic              mb_wr,
  input  logic              mb_rd,
  input  logic [31:0]       mb_addr,
  input  logic [31:0]       mb_wdata,
  output logic              mb_rvalid,
  output logic [31:0]       mb_rdata,
  // chain output towards the rest of the switch
  output logic              out_srdy,
  output pbeat_t            out_beat,
  input  logic              out_drdy,
  // configuration control
  input  logic              cam_we,
  input  logic              cam_sel,
  input  logic [CAW-1:0]    cam_waddr,
  input  logic [15:0]       cam_wdata,
  input  logic              cam_wvalid,
  input  logic              cfg_trig_v,
  input  logic [15:0]       cfg_trig_etype,
  input  logic [1:0]        proc_on,
  // DDR2 controller core application port
  output logic              ddr_af_wren,
  output logic              ddr_af_cmd,
  output logic [ADDR_W-1:0] ddr_af_addr,
  output logic              ddr_wdf_wren,
  output logic [127:0]      ddr_wdf_data,
  output logic [15:0]       ddr_wdf_mask,
  input  logic              ddr_rd_valid,
  input  logic [127:0]      ddr_rd_data,
  // configuration port (icap_clk)
  output logic              icap_ce_n,
  output logic              icap_wr_n,
  output logic [31:0]       icap_i,
  input  logic [31:0]       icap_o,
  // status
  output logic [15:0]       fine_type  [2],
  output logic [15:0]       coarse_type [2],
  output logic [NET_CFG_W-1:0] net_cfg,
  output logic [15:0]       n_entry_beats,
  output logic [15:0]       n_fine_ok,
  output logic [15:0]       n_fine_fail,
  output logic [15:0]       n_coarse_done,
  output logic [15:0]       n_coarse_cancel,
  output logic [15:0]       n_bypassed,
  output logic [$clog2(INFO_DEPTH)-1:0] info_wptr [2],
  output logic [1:0]        fine_on,
  output logic [1:0]        coarse_cfgd,
  output logic [1:0]        stage_etype_vld,
  output logic [15:0]       stage_etype [2],
  output logic [31:0]       icap_status
);
  // ---------------- MainBus ----------------
  mbpkt_t      pk_data;
  logic        pk_empty, pk_rd;
  logic [9:0]  nq_data;
  logic        nq_empty, nq_rd, na_wr;
  logic [63:0] na_data;
  logic        dcmd_v, dcmd_rd, dcmd_full;
  logic [30:0] dcmd_addr;
  logic [31:0] dcmd_data;
  logic [3:0]  lane_empty, lane_pop;
  logic [31:0] lane_data [4];
  logic [31:0] icap_last;

  mainbus_if u_mb (
    .mb_clk, .mb_rst_n, .clk, .rst_n, .mb_wr, .mb_rd, .mb_addr, .mb_wdata,
    .mb_rvalid, .mb_rdata, .pk_rd, .pk_data, .pk_empty, .nq_rd, .nq_data,
    .nq_empty, .na_wr, .na_data, .dcmd_v, .dcmd_rd, .dcmd_addr, .dcmd_data,
    .dcmd_full, .lane_empty, .lane_data, .lane_pop, .icap_last
  );

  // ---------------- chain entry ----------------
  logic   e_srdy, e_drdy;
  pbeat_t e_beat;

  chain_entry u_entry (
    .clk, .rst_n, .pk_data, .pk_empty, .pk_rd,
    .tx_srdy(e_srdy), .tx_beat(e_beat), .tx_drdy(e_drdy), .n_beats(n_entry_beats)
  );

  // ---------------- DDR2 bridge ----------------
  // clients: 0 = coarse configuration controller, 1 = ICAP controller; each
  // reaches the bridge (memory clock) through its own clock crossing
  logic [1:0]        c_req, c_ack, c_valid, b_req, b_ack, b_valid;
  logic [ADDR_W-1:0] c_addr [2], b_addr [2];
  logic [127:0]      c_data [2];
  logic [127:0]      b_data;

  for (genvar k = 0; k < 2; k++) begin : g_cdc
    ddr2_client_cdc #(.ADDR_W(ADDR_W)) u_cdc (
      .clk, .rst_n, .mclk(ddr_clk), .mrst_n(ddr_rst_n),
      .rd_req(c_req[k]), .rd_addr(c_addr[k]), .rd_ack(c_ack[k]),
      .rd_valid(c_valid[k]), .rd_data(c_data[k]),
      .m_req(b_req[k]), .m_addr(b_addr[k]), .m_ack(b_ack[k]),
      .m_valid(b_valid[k]), .m_data(b_data)
    );
  end

  ddr2_bridge #(.NC(2), .ADDR_W(ADDR_W)) u_ddr (
    .clk(ddr_clk), .rst_n(ddr_rst_n), .mb_clk, .mb_rst_n, .dcmd_v, .dcmd_rd, .dcmd_addr, .dcmd_data,
    .dcmd_full, .lane_pop, .lane_empty, .lane_data,
    .c_req(b_req), .c_addr(b_addr), .c_ack(b_ack), .c_valid(b_valid), .c_data(b_data),
    .af_wren(ddr_af_wren), .af_cmd(ddr_af_cmd), .af_addr(ddr_af_addr),
    .wdf_wren(ddr_wdf_wren), .wdf_data(ddr_wdf_data), .wdf_mask(ddr_wdf_mask),
    .rd_valid(ddr_rd_valid), .rd_data(ddr_rd_data), .n_wr(), .n_rd()
  );

  // ---------------- fine-grained chain ----------------
  logic               f_srdy [3];
  pbeat_t             f_beat [3];
  logic               f_drdy [3];
  logic [1:0]         f_ivld, f_evld, f_trig;
  logic [INFO_W-1:0]  f_info [2];
  logic [INFOL_W-1:0] f_ilen [2];
  logic [15:0]        f_etype [2], f_trig_et [2], f_nbyp [2];
  logic [1:0]         f_start, f_set;
  logic [15:0]        f_set_type;

  assign f_srdy[0] = e_srdy && !chain_sel;
  assign f_beat[0] = e_beat;

  for (genvar s = 0; s < 2; s++) begin : g_fine
    parser_wrapper #(.RESET_TYPE(s == 0 ? 16'hFFFF : 16'h0000)) u_w (
      .clk, .rst_n,
      .rx_srdy(f_srdy[s]), .rx_beat(f_beat[s]), .rx_drdy(f_drdy[s]),
      .tx_srdy(f_srdy[s+1]), .tx_beat(f_beat[s+1]), .tx_drdy(f_drdy[s+1]),
      .info_vld(f_ivld[s]), .info(f_info[s]), .info_len(f_ilen[s]),
      .etype_vld(f_evld[s]), .etype(f_etype[s]),
      .cfg_start(f_start[s]), .cfg_set(f_set[s]), .cfg_etype(f_set_type),
      .cfg_type(fine_type[s]), .on(fine_on[s]),
      .trig_v(f_trig[s]), .trig_etype(f_trig_et[s]), .n_bypassed(f_nbyp[s])
    );
  end
  assign f_start[0] = 1'b0;
  assign f_set[0]   = 1'b0;
  assign n_bypassed = f_nbyp[1];

  icap_ctrl #(
    .CAM_DEPTH(CAM_DEPTH), .ADDR_W(ADDR_W), .SLOT_LOG2(FINE_SLOT_LOG2),
    .MAX_READS(FINE_MAX_READS)
  ) u_icap (
    .clk, .rst_n, .icap_clk, .icap_rst_n,
    .cam_we(cam_we && !cam_sel), .cam_waddr, .cam_wdata, .cam_wvalid,
    .trig_v(f_trig[0] && !chain_sel), .trig_etype(f_trig_et[0]), .next_type(fine_type[1]),
    .cfg_start(f_start[1]), .cfg_set(f_set[1]), .cfg_etype(f_set_type),
    .rd_req(c_req[1]), .rd_addr(c_addr[1]), .rd_ack(c_ack[1]),
    .rd_valid(c_valid[1]), .rd_data(c_data[1]),
    .icap_ce_n, .icap_wr_n, .icap_i, .icap_o, .icap_last, .status_q(icap_status),
    .busy(), .n_ok(n_fine_ok), .n_fail(n_fine_fail)
  );

  // ---------------- coarse-grained chain ----------------
  logic   [1:0]       p_rx_srdy, p_rx_drdy, p_tx_srdy, p_tx_drdy;
  pbeat_t             p_rx_beat [2];
  pbeat_t             p_tx_beat [2];
  logic   [1:0]       c_ivld, c_evld;
  logic [INFO_W-1:0]  c_info [2];
  logic [INFOL_W-1:0] c_ilen [2];
  logic [15:0]        c_etype [2];
  logic               c_in_drdy, c_out_srdy;
  pbeat_t             c_out_beat;
  logic               sup_prog, prog_v, net_we, p_start, cd_v, p_busy, p_done, p_cancel;
  logic [PB_W-1:0]    prog_data, cd;
  logic [NET_CFG_W-1:0] net_cfg_in;

  pnet #(.NP(2)) u_net (
    .clk, .rst_n, .cfg_we(net_we), .cfg_in(net_cfg_in), .cfg(net_cfg),
    .in_srdy(e_srdy && chain_sel), .in_beat(e_beat), .in_drdy(c_in_drdy),
    .p_tx_srdy, .p_tx_beat, .p_tx_drdy, .p_rx_srdy, .p_rx_beat, .p_rx_drdy,
    .out_srdy(c_out_srdy), .out_beat(c_out_beat), .out_drdy(out_drdy && chain_sel)
  );

  for (genvar s = 0; s < 2; s++) begin : g_coarse
    parser_proc #(.LARGE(s == 1), .PID(4'(s + 1))) u_p (
      .clk, .rst_n, .sup_on(proc_on[s]), .sup_prog, .prog_v, .prog_data,
      .rx_srdy(p_rx_srdy[s]), .rx_beat(p_rx_beat[s]), .rx_drdy(p_rx_drdy[s]),
      .tx_srdy(p_tx_srdy[s]), .tx_beat(p_tx_beat[s]), .tx_drdy(p_tx_drdy[s]),
      .info_vld(c_ivld[s]), .info(c_info[s]), .info_len(c_ilen[s]),
      .etype_vld(c_evld[s]), .etype(c_etype[s]),
      .configured(coarse_cfgd[s]), .cfg_type(coarse_type[s]), .state()
    );
  end

  coarse_cfg_ctrl #(
    .CAM_DEPTH(CAM_DEPTH), .ADDR_W(ADDR_W), .SLOT_LOG2(COARSE_SLOT_LOG2),
    .MAX_READS(COARSE_MAX_READS)
  ) u_ccfg (
    .clk, .rst_n, .cam_we(cam_we && cam_sel), .cam_waddr, .cam_wdata, .cam_wvalid,
    .trig_v(cfg_trig_v || (c_evld[0] && chain_sel)),
    .trig_etype(cfg_trig_v ? cfg_trig_etype : c_etype[0]),
    .next_type(cfg_trig_v ? 16'h0000 : coarse_type[1]),
    .rd_req(c_req[0]), .rd_addr(c_addr[0]), .rd_ack(c_ack[0]),
    .rd_valid(c_valid[0]), .rd_data(c_data[0]),
    .p_start, .d_v(cd_v), .d(cd), .p_busy, .p_done, .p_cancel,
    .active(), .n_started(), .n_done(n_coarse_done), .n_cancel(n_coarse_cancel)
  );

  coarse_prog u_prog (
    .clk, .rst_n, .start(p_start), .d_v(cd_v), .d(cd), .busy(p_busy), .done(p_done),
    .cancel(p_cancel), .sup_prog, .prog_v, .prog_data, .net_we, .net_cfg(net_cfg_in)
  );

  // ---------------- chain output ----------------
  assign e_drdy   = chain_sel ? c_in_drdy : f_drdy[0];
  assign f_drdy[2] = out_drdy && !chain_sel;
  assign out_srdy = chain_sel ? c_out_srdy : f_srdy[2];
  assign out_beat = chain_sel ? c_out_beat : f_beat[2];

  // ---------------- info dumps ----------------
  logic [1:0]         m_irdy;
  logic [INFO_W-1:0]  m_info [2];
  logic [INFOL_W-1:0] m_ilen [2];
  logic               m_req, m_vld, m_pend_q;
  logic [63:0]        m_data;

  always_comb begin
    for (int s = 0; s < 2; s++) begin
      m_irdy[s] = chain_sel ? c_ivld[s] : f_ivld[s];
      m_info[s] = chain_sel ? c_info[s] : f_info[s];
      m_ilen[s] = chain_sel ? c_ilen[s] : f_ilen[s];
      stage_etype_vld[s] = chain_sel ? c_evld[s] : f_evld[s];
      stage_etype[s]     = chain_sel ? c_etype[s] : f_etype[s];
    end
  end

  // one host info request in flight at a time
  assign m_req  = !nq_empty && !m_pend_q;
  assign nq_rd  = m_req;
  assign na_wr  = m_vld;
  assign na_data = m_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     m_pend_q <= 1'b0;
    else if (m_req) m_pend_q <= 1'b1;
    else if (m_vld) m_pend_q <= 1'b0;
  end

  mmu #(.NP(2), .DEPTH(INFO_DEPTH)) u_mmu (
    .clk, .rst_n, .irdy(m_irdy), .info(m_info), .info_len(m_ilen),
    .rd_req(m_req), .rd_sel(nq_data[9]), .rd_addr(nq_data[$clog2(INFO_DEPTH)-1:0]),
    .rd_vld(m_vld), .rd_data(m_data), .wptr(info_wptr), .writing()
  );
endmodule
