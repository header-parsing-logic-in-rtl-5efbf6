// Register slice for the parser bus (two-entry skid buffer).
//
// Cuts every combinational path of the srdy/drdy handshake: out_srdy,
// out_beat and in_drdy all come straight from flip-flops. Full throughput
// (one beat per cycle) is kept by a second "skid" register that catches the
// beat that arrives in the cycle the output stalls. Latency: one cycle.
// Used on each sink of the programmable interconnect, where a parser
// output may be routed back into a parser input. This slice is this
// design's addition; the parser bus protocol is the chain's.
module pb_skid
  import hp_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_srdy,
  input  pbeat_t in_beat,
  output logic   in_drdy,
  output logic   out_srdy,
  output pbeat_t out_beat,
  input  logic   out_drdy
);
  logic   s_v;
  pbeat_t s_q;
  logic   acc, pop;

  assign in_drdy = !s_v;
  assign acc     = in_srdy && in_drdy;
  assign pop     = out_srdy && out_drdy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_srdy <= 1'b0; out_beat <= '0; s_v <= 1'b0; s_q <= '0;
    end else if (s_v) begin
      if (pop) begin
        out_beat <= s_q;
        s_v      <= 1'b0;
      end
    end else if (acc) begin
      if (!out_srdy || pop) begin
        out_beat <= in_beat;
        out_srdy <= 1'b1;
      end else begin
        s_q <= in_beat;
        s_v <= 1'b1;
      end
    end else if (pop) begin
      out_srdy <= 1'b0;
    end
  end
endmodule
