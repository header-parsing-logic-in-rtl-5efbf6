// Coarse parser programmer.
//
// Takes the configuration stream read from external memory, 64 bits per
// cycle while d_v is high, and interprets it as a series of configuration
// packets. Every flow starts with a utility packet, a 64-bit chunk whose
// low 32 bits are
//   [15:0]  0xFFFF (utility marker)
//   [19:16] operation: 0x1 = interconnect configuration, 0x0 = parser images
//   [31:20] op 0x1: the 12-bit switch configuration
//   [27:20] op 0x0: length of the images that follow, in 64-bit chunks
// Two flows are accepted: op 0x1 followed by op 0x0 and the images (switch
// network and parsers), or op 0x0 and the images alone (parsers only).
// Anything else cancels the flow and the rest of the stream is ignored.
// Image chunks are broadcast to the parser processors on prog_v/prog_data
// while sup_prog holds them in their programming state; each processor
// keeps the image carrying its own PID. The switch configuration is written
// to the interconnect (net_we) only when the flow completes.
//
// Timing: sup_prog rises the cycle after the op 0x0 utility chunk; image
// chunks reach prog_data one cycle after they arrive, so a processor is in
// its programming state before the first one. 'busy' stays high while the
// flow still expects data; done or cancel pulses at its end. start (pulse)
// begins a new flow. The utility packet formats (marker, op codes, field
// positions) and the two flows follow the programmer's description; the
// length unit, the 64-bit chunk framing of utility packets and the point at
// which the switch setting takes effect are this design's choices.
module coarse_prog
  import hp_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 d_v,
  input  logic [PB_W-1:0]      d,
  output logic                 busy,
  output logic                 done,
  output logic                 cancel,
  output logic                 sup_prog,
  output logic                 prog_v,
  output logic [PB_W-1:0]      prog_data,
  output logic                 net_we,
  output logic [NET_CFG_W-1:0] net_cfg
);
  typedef enum logic [2:0] {CP_IDLE, CP_UTIL1, CP_UTIL2, CP_IMG, CP_TAIL} cp_e;
  cp_e        st;
  logic [7:0] left;
  logic       have_net;
  logic [NET_CFG_W-1:0] net_q;

  logic        is_util;
  logic [3:0]  op;
  assign is_util = (d[15:0] == UTIL_ETYPE);
  assign op      = d[19:16];
  assign busy    = (st == CP_UTIL1) || (st == CP_UTIL2) || (st == CP_IMG);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= CP_IDLE;
      left      <= '0;
      have_net  <= 1'b0;
      net_q     <= '0;
      done      <= 1'b0;
      cancel    <= 1'b0;
      sup_prog  <= 1'b0;
      prog_v    <= 1'b0;
      prog_data <= '0;
      net_we    <= 1'b0;
      net_cfg   <= '0;
    end else begin
      done   <= 1'b0;
      cancel <= 1'b0;
      prog_v <= 1'b0;
      net_we <= 1'b0;
      if (start) begin
        st       <= CP_UTIL1;
        have_net <= 1'b0;
        sup_prog <= 1'b0;
      end else begin
        unique case (st)
          CP_IDLE: ;
          CP_UTIL1, CP_UTIL2: if (d_v) begin
            if (is_util && op == UOP_SWITCH && st == CP_UTIL1) begin
              net_q    <= d[31:20];
              have_net <= 1'b1;
              st       <= CP_UTIL2;
            end else if (is_util && op == UOP_BITSTREAM) begin
              left <= d[27:20];
              if (d[27:20] == 8'd0) begin
                st <= CP_TAIL;
              end else begin
                st       <= CP_IMG;
                sup_prog <= 1'b1;
              end
            end else begin
              st     <= CP_IDLE;
              cancel <= 1'b1;
            end
          end
          CP_IMG: if (d_v) begin
            prog_v    <= 1'b1;
            prog_data <= d;
            left      <= left - 8'd1;
            if (left == 8'd1) st <= CP_TAIL;
          end
          CP_TAIL: begin
            // the last image chunk is on prog_data this cycle
            sup_prog <= 1'b0;
            st       <= CP_IDLE;
            done     <= 1'b1;
            if (have_net) begin
              net_we  <= 1'b1;
              net_cfg <= net_q;
            end
          end
          default: st <= CP_IDLE;
        endcase
      end
    end
  end
endmodule
