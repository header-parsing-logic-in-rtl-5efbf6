// Coarse parser processor: one programmable stage of the coarse parser chain.
//
// A hard-coded state machine wraps a compare-and-extract core (small_core or
// large_core, chosen by LARGE). Its states are
//   OFF   - not configured or switched off; takes no packet data (rx_drdy low)
//   PROG  - programming: configuration packets on prog_v/prog_data are
//           collected, two 64-bit chunks (low half first) per 128-bit image;
//           an image whose PID field equals this processor's PID is kept,
//           others are ignored (they belong to other processors)
//   INIT  - one cycle after programming: the strip count is expanded from
//           the image, then ON (IDLE) or OFF as sup_on says
//   IDLE  - waits for a start-of-packet beat; other beats are dropped
//   PARSE - the leading 'strip' beats of the packet are consumed
//   PASS  - the rest of the packet goes to tx with a fresh start-of-packet
// sup_prog and sup_on are supervisor pins and pre-empt parsing at any time.
// If the core's check fails, parsing stops and the remainder of the packet,
// starting with the failing beat, is passed on. The core keeps watching the
// packet in PASS until it has all its fields, so fields may lie after the
// stripped beats. For the small core the states entered after parsing
// (ENState, packet continues) and after an early packet end (EPState) come
// from the image; IDLE, PASS and OFF are honoured, anything else means IDLE.
// The large core always uses PASS and IDLE.
//
// Handshake: a beat moves when srdy and drdy are both high. A stripped beat
// is always taken; a passed beat is taken only when tx_drdy is high
// (combinational drdy path rx <- tx). Info and type outputs pulse one cycle
// after the beat that completes the last field.
// The state set, supervisor pins, PID match, init step and the
// ENState/EPState rule follow the processor's description; the two-chunk
// image transfer, the strip rule and the "failing beat is passed" choice
// are this design's.
// Lint reports most bits of the small-core view 'sc' as unused: the
// processor reads only the end-state fields from it; the core decodes the
// rest of the same image itself.
module parser_proc
  import hp_pkg::*;
#(
  parameter bit         LARGE = 1'b0,
  parameter logic [3:0] PID   = 4'd0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               sup_on,
  input  logic               sup_prog,
  input  logic               prog_v,
  input  logic [PB_W-1:0]    prog_data,
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
  output logic               configured,
  output logic [15:0]        cfg_type,   // EtherType this stage is set up for
  output pstate_e            state
);
  pstate_e            st_q, st_d, en_st, ep_st;
  logic [CFG_W-1:0]   cfg_q;
  logic [PB_W-1:0]    half_q;
  logic               half_v_q, newcfg_q;
  logic [8:0]         strip_q, strip_c, bidx_q, bidx;
  logic               fwd_started_q;
  logic               active, clear, beat_p, beat_v, fwd, err_now, err;
  logic [3:0]         img_pid;

  assign state      = st_q;
  assign active     = (st_q == PS_IDLE) || (st_q == PS_PARSE) || (st_q == PS_PASS);
  assign clear      = (st_q == PS_IDLE) && rx_srdy && rx_beat.sop;
  assign beat_p     = rx_srdy && (clear || st_q == PS_PARSE || st_q == PS_PASS);
  assign bidx       = clear ? 9'd0 : bidx_q;
  assign fwd        = beat_p && (err_now || (err && !clear) || bidx >= strip_q);
  assign rx_drdy    = active && (fwd ? tx_drdy : 1'b1);
  assign beat_v     = beat_p && rx_drdy;
  assign tx_srdy    = fwd;
  always_comb begin
    tx_beat     = rx_beat;
    tx_beat.sop = clear || !fwd_started_q;
  end
  assign cfg_type   = configured ? cfg_q[15:0] : 16'h0000;

  // PID field of an incoming image: bits 127:124 (large) or 111:108 (small)
  assign img_pid = LARGE ? prog_data[63:60] : prog_data[47:44];

  // core
  if (LARGE) begin : g_large
    large_core u_core (
      .clk, .rst_n, .cfg(cfg_q), .clear, .beat_p, .beat_v, .beat(rx_beat.data),
      .strip(strip_c), .err_now, .err, .done(), .info_vld, .info, .info_len,
      .etype_vld, .etype
    );
    assign en_st = PS_PASS;
    assign ep_st = PS_IDLE;
  end else begin : g_small
    small_cfg_t sc;
    assign sc = small_cfg_t'(cfg_q);
    small_core u_core (
      .clk, .rst_n, .cfg(cfg_q), .clear, .beat_p, .beat_v, .beat(rx_beat.data),
      .strip(strip_c), .err_now, .err, .done(), .info_vld, .info, .info_len,
      .etype_vld, .etype
    );
    assign en_st = (sc.enstate inside {PS_IDLE, PS_PASS, PS_OFF}) ? sc.enstate : PS_IDLE;
    assign ep_st = (sc.epstate inside {PS_IDLE, PS_PASS, PS_OFF}) ? sc.epstate : PS_IDLE;
  end

  always_comb begin
    st_d = st_q;
    unique case (st_q)
      PS_OFF:   if (sup_on && configured) st_d = PS_IDLE;
      PS_PROG:  if (!sup_prog) st_d = newcfg_q ? PS_INIT : (sup_on && configured ? PS_IDLE : PS_OFF);
      PS_INIT:  st_d = sup_on ? PS_IDLE : PS_OFF;
      PS_IDLE, PS_PARSE, PS_PASS: begin
        if (beat_v) begin
          if (rx_beat.eop)
            st_d = (st_q == PS_PASS || fwd) ? PS_IDLE : ep_st;
          else if (fwd || bidx + 9'd1 >= strip_q)
            st_d = en_st;
          else
            st_d = PS_PARSE;
          if (st_d == PS_PASS && rx_beat.eop) st_d = PS_IDLE;
        end
      end
      default:  st_d = PS_OFF;
    endcase
    if (sup_prog && st_q != PS_PROG) st_d = PS_PROG;
    else if (!sup_on && active)      st_d = PS_OFF;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q          <= PS_OFF;
      cfg_q         <= '0;
      half_q        <= '0;
      half_v_q      <= 1'b0;
      newcfg_q      <= 1'b0;
      configured    <= 1'b0;
      strip_q       <= 9'd1;
      bidx_q        <= '0;
      fwd_started_q <= 1'b0;
    end else begin
      st_q <= st_d;
      if (st_q != PS_PROG) begin
        half_v_q <= 1'b0;
        newcfg_q <= 1'b0;
      end else if (prog_v) begin
        if (!half_v_q) begin
          half_q   <= prog_data;
          half_v_q <= 1'b1;
        end else begin
          half_v_q <= 1'b0;
          if (img_pid == PID) begin
            cfg_q      <= {prog_data, half_q};
            newcfg_q   <= 1'b1;
            configured <= 1'b1;
          end
        end
      end
      if (st_q == PS_INIT) strip_q <= strip_c;
      if (beat_v) begin
        bidx_q        <= (bidx == 9'h1FF) ? bidx : bidx + 9'd1;
        fwd_started_q <= (clear ? 1'b0 : fwd_started_q) | fwd;
      end
    end
  end
endmodule
