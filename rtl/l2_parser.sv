// Level 2 (Ethernet) parser of the fine-grained parser chain.
//
// A fixed-function stage that pulls the destination and source MAC
// addresses and the EtherType from the Ethernet header. Beat 0 of a packet
// (bytes 0..7) carries the destination MAC in bits 63:16 and the first two
// bytes of the source MAC in bits 15:0; beat 1 (bytes 8..15) carries the
// rest of the source MAC in bits 63:32 and the EtherType in bits 31:16.
// Beat 0 is consumed; from beat 1 on the packet is passed to the next
// stage with a fresh start-of-packet flag (the 64-bit chain strips whole
// beats), so the next stage sees the EtherType at bits 31:16 of its beat 0.
// After beat 1 the stage raises info_vld for one cycle with
// info = {dst MAC, src MAC} (96 bits, info_len = 96) and etype_vld with the
// EtherType. A packet that ends in beat 0 is consumed without info.
// Handshake as on the whole chain: a beat moves when srdy and drdy are both
// high; consumed beats are always taken, passed beats wait for tx_drdy.
// What the stage extracts follows the level 2 parser's role; the
// beat-level stripping and the output timing are this design's.
module l2_parser
  import hp_pkg::*;
(
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
  output logic [15:0]        etype
);
  typedef enum logic [1:0] {L_IDLE, L_HDR, L_PASS} l_e;
  l_e          st;
  logic [63:0] b0_q;
  logic        pass;

  assign pass    = (st == L_HDR) || (st == L_PASS);
  assign tx_srdy = rx_srdy && pass;
  assign rx_drdy = pass ? tx_drdy : 1'b1;
  always_comb begin
    tx_beat     = rx_beat;
    tx_beat.sop = (st == L_HDR);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= L_IDLE; b0_q <= '0;
      info_vld <= 1'b0; info <= '0; info_len <= '0; etype_vld <= 1'b0; etype <= '0;
    end else begin
      info_vld  <= 1'b0;
      etype_vld <= 1'b0;
      if (rx_srdy && rx_drdy) begin
        unique case (st)
          L_IDLE: if (rx_beat.sop && !rx_beat.eop) begin
            b0_q <= rx_beat.data;
            st   <= L_HDR;
          end
          L_HDR: begin
            info_vld  <= 1'b1;
            info      <= INFO_W'({b0_q, rx_beat.data[63:32]});
            info_len  <= INFOL_W'(96);
            etype_vld <= 1'b1;
            etype     <= rx_beat.data[31:16];
            st        <= rx_beat.eop ? L_IDLE : L_PASS;
          end
          L_PASS: if (rx_beat.eop) st <= L_IDLE;
          default: st <= L_IDLE;
        endcase
      end
    end
  end
endmodule
