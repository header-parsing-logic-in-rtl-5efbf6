// Parser chain entry controller.
//
// Sits at the head of the parser chain in the parser clock domain and acts
// towards the first stage as if it were a parser itself. It pops 32-bit
// packet words and their control flags (SP, EP, SZ) from the MainBus FIFO
// whenever that FIFO is not empty, packs two words into one 64-bit beat
// (first word in bits 63:32, network byte order) and offers the beat on
// the parser bus with srdy until the next stage raises drdy.
// A word with SP starts a new beat and a new packet; a word with EP closes
// the beat early. SZ of a word is its number of valid bytes (0 = 4); the
// beat's byte count is derived from it (0 = 8). A dangling half beat left
// by a packet without EP is dropped when the next SP arrives.
// Throughput: one beat per two popped words; a beat is held while drdy is
// low and no word is popped meanwhile. The translation of the control flags
// into parser bus signals follows the entry controller's description; the
// packing order and the SZ encoding are this design's.
module chain_entry
  import hp_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  mbpkt_t pk_data,
  input  logic   pk_empty,
  output logic   pk_rd,
  output logic   tx_srdy,
  output pbeat_t tx_beat,
  input  logic   tx_drdy,
  output logic [15:0] n_beats
);
  logic        half_q;      // upper word held
  logic [31:0] hi_q;
  logic        hi_sop_q;
  logic [2:0]  wsz;

  assign wsz   = (pk_data.sz == 3'd0 || pk_data.sz > 3'd4) ? 3'd4 : pk_data.sz;
  assign pk_rd = !pk_empty && !(tx_srdy && !tx_drdy);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      half_q <= 1'b0; hi_q <= '0; hi_sop_q <= 1'b0;
      tx_srdy <= 1'b0; tx_beat <= '0; n_beats <= '0;
    end else begin
      if (tx_srdy && tx_drdy) begin
        tx_srdy <= 1'b0;
        n_beats <= n_beats + 16'd1;
      end
      if (pk_rd) begin
        if (pk_data.sp || !half_q) begin
          // word becomes the upper half of a new beat
          if (pk_data.ep) begin
            tx_srdy <= 1'b1;
            tx_beat <= '{data: {pk_data.data, 32'h0}, sop: pk_data.sp, eop: 1'b1, sz: wsz};
            half_q  <= 1'b0;
          end else begin
            hi_q     <= pk_data.data;
            hi_sop_q <= pk_data.sp;
            half_q   <= 1'b1;
          end
        end else begin
          tx_srdy <= 1'b1;
          tx_beat <= '{data: {hi_q, pk_data.data}, sop: hi_sop_q, eop: pk_data.ep,
                       sz: pk_data.ep ? 3'((4 + 32'(wsz)) & 7) : 3'd0};
          half_q  <= 1'b0;
        end
      end
    end
  end
endmodule
