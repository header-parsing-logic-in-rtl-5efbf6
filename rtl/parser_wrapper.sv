// Outer wrapper of a reconfigurable parser stage (fine-grained chain).
//
// In the fine-grained design each parser sits in a region of the FPGA that
// can be rewritten while the rest keeps running. The wrapper around the
// region keeps the chain alive and drives reconfiguration:
//  * bypass: while the region holds no parser, or is being rewritten, the
//    packet bus goes straight from rx to tx (two multiplexers, one for the
//    forward srdy/data path and one for the backward drdy path) and the
//    stage's info outputs are masked. The choice changes only between
//    packets, never inside one.
//  * configuration type: a register holding the EtherType the region is
//    configured for, all zeros while unconfigured. cfg_start (a
//    configuration of this region begins) clears it and turns the bypass
//    on; cfg_set loads it with cfg_etype once the region has been written.
//  * trigger (pre-parser): at beat 1 of each packet entering the wrapper
//    it snapshots the EtherType field (bits 31:16) and pulses trig_v, so
//    the configuration controller can decide whether the next stage needs
//    a new parser.
// The region content is the level 2 parser (l2_parser); it is held in
// reset while unconfigured. RESET_TYPE, when non-zero, makes the region a
// static, configured one from reset (the first stage of the chain). The bypass multiplexers, on/off indicator,
// masked info, registered EtherType (zero when unconfigured) and trigger
// follow the wrapper's description; the packet-boundary switching and the
// EtherType offset are this design's.
module parser_wrapper
  import hp_pkg::*;
#(
  // non-zero: the region is static and configured from reset for this type
  parameter logic [15:0] RESET_TYPE = 16'h0000
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               rx_srdy,
  input  pbeat_t             rx_beat,
  output logic               rx_drdy,
  output logic               tx_srdy,
  output pbeat_t             tx_beat,
  input  logic               tx_drdy,
  output logic               info_vld,
  output logic [INFO_W-1:0]  info,
  output logic [INFOL_W-1:0] info_len,
  output logic               etype_vld,
  output logic [15:0]        etype,
  // configuration control
  input  logic               cfg_start,
  input  logic               cfg_set,
  input  logic [15:0]       cfg_etype,
  output logic [15:0]       cfg_type,
  output logic               on,
  // trigger
  output logic               trig_v,
  output logic [15:0]        trig_etype,
  output logic [15:0]        n_bypassed
);
  logic        use_q, in_pkt_q, beat1_q;
  logic        rx_go;
  logic        iw_rx_drdy, iw_tx_srdy, iw_info_vld, iw_etype_vld;
  pbeat_t      iw_tx_beat;
  logic [INFO_W-1:0]  iw_info;
  logic [INFOL_W-1:0] iw_info_len;
  logic [15:0] iw_etype;
  logic        iw_rst_n;

  assign on       = (cfg_type != 16'h0);
  assign iw_rst_n = rst_n && on;

  l2_parser u_iw (
    .clk, .rst_n(iw_rst_n),
    .rx_srdy(rx_srdy && use_q), .rx_beat, .rx_drdy(iw_rx_drdy),
    .tx_srdy(iw_tx_srdy), .tx_beat(iw_tx_beat), .tx_drdy(tx_drdy && use_q),
    .info_vld(iw_info_vld), .info(iw_info), .info_len(iw_info_len),
    .etype_vld(iw_etype_vld), .etype(iw_etype)
  );

  // bypass multiplexers
  assign tx_srdy   = use_q ? iw_tx_srdy : rx_srdy;
  assign tx_beat   = use_q ? iw_tx_beat : rx_beat;
  assign rx_drdy   = use_q ? iw_rx_drdy : tx_drdy;
  assign info_vld  = use_q && iw_info_vld;
  assign info      = iw_info;
  assign info_len  = iw_info_len;
  assign etype_vld = use_q && iw_etype_vld;
  assign etype     = iw_etype;

  assign rx_go = rx_srdy && rx_drdy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_type <= RESET_TYPE; use_q <= 1'b0; in_pkt_q <= 1'b0; beat1_q <= 1'b0;
      trig_v <= 1'b0; trig_etype <= '0; n_bypassed <= '0;
    end else begin
      trig_v <= 1'b0;
      if (cfg_start)    cfg_type <= '0;
      else if (cfg_set) cfg_type <= cfg_etype;
      // packet tracking on the input side
      if (rx_go) begin
        in_pkt_q <= !rx_beat.eop;
        beat1_q  <= rx_beat.sop && !rx_beat.eop;
        if (beat1_q) begin
          trig_v     <= 1'b1;
          trig_etype <= rx_beat.data[31:16];
        end
        if (rx_beat.sop && !use_q) n_bypassed <= n_bypassed + 16'd1;
      end
      // the bypass choice changes only between packets
      if (!in_pkt_q && !(rx_go && !rx_beat.eop)) use_q <= on && !cfg_start;
      else if (cfg_start)                         use_q <= 1'b0;
    end
  end
endmodule
