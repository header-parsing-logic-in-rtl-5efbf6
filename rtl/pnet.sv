// Parser interconnect network of the coarse parser chain.
//
// A small programmable crossbar that decides where each parser processor
// takes its packets from and what leaves the chain. Its configuration is
// 12 bits, four per sink: bits [3:0] select the input of parser 0,
// [7:4] the input of parser 1 and [11:8] the output of the whole network.
// Source codes: 0 = the network input (packets entering the chain),
// 1 + k = the output of parser k; any other code leaves the sink with no
// source. A source's receiver-ready is the receiver-ready of the sink that
// selects it (ORed, so each source should feed at most one sink); a source
// no sink selects sees receiver-ready low and holds its data.
// The selection is combinational and every sink then passes a one-cycle
// register slice (pb_skid); the configuration register is loaded by the coarse
// parser programmer (cfg_we, cfg_in) and resets to "output = input", a
// chain that bypasses both parsers.
// The 12-bit size and "4 bits per parser input and 4 for the network
// output" follow the network's description; the source codes, the reset
// value, the ready routing and the register slices are this design's.
module pnet
  import hp_pkg::*;
#(
  parameter int unsigned NP = 2   // parsers in the chain
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     cfg_we,
  input  logic [4*(NP+1)-1:0]      cfg_in,
  output logic [4*(NP+1)-1:0]      cfg,
  // chain input
  input  logic                     in_srdy,
  input  pbeat_t                   in_beat,
  output logic                     in_drdy,
  // parser outputs (sources)
  input  logic   [NP-1:0]          p_tx_srdy,
  input  pbeat_t                   p_tx_beat [NP],
  output logic   [NP-1:0]          p_tx_drdy,
  // parser inputs (sinks)
  output logic   [NP-1:0]          p_rx_srdy,
  output pbeat_t                   p_rx_beat [NP],
  input  logic   [NP-1:0]          p_rx_drdy,
  // chain output
  output logic                     out_srdy,
  output pbeat_t                   out_beat,
  input  logic                     out_drdy
);
  localparam int unsigned NS = NP + 1;   // sources and sinks

  logic   [NS-1:0] s_srdy, s_drdy, k_srdy, k_drdy;
  pbeat_t          s_beat [NS];
  pbeat_t          k_beat [NS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg <= '0;
      for (int k = 0; k < NP; k++) cfg[4*k +: 4] <= 4'hF;
    end else if (cfg_we) begin
      cfg <= cfg_in;
    end
  end

  always_comb begin
    s_srdy[0] = in_srdy;
    s_beat[0] = in_beat;
    for (int k = 0; k < NP; k++) begin
      s_srdy[k+1] = p_tx_srdy[k];
      s_beat[k+1] = p_tx_beat[k];
    end
    // sinks 0..NP-1 are parser inputs, sink NP the chain output
    s_drdy = '0;
    for (int k = 0; k < NS; k++) begin
      k_srdy[k] = 1'b0;
      k_beat[k] = '0;
      for (int s = 0; s < NS; s++) begin
        if (cfg[4*k +: 4] == 4'(s)) begin
          k_srdy[k] = s_srdy[s];
          k_beat[k] = s_beat[s];
          s_drdy[s] = s_drdy[s] | k_drdy[k];
        end
      end
    end
  end

  // a register slice on every sink cuts the loops a routing such as
  // "parser 1 feeds parser 0" would otherwise close
  logic   [NS-1:0] r_srdy, r_drdy;
  pbeat_t          r_beat [NS];

  for (genvar k = 0; k < NS; k++) begin : g_slice
    pb_skid u_skid (
      .clk, .rst_n, .in_srdy(k_srdy[k]), .in_beat(k_beat[k]), .in_drdy(k_drdy[k]),
      .out_srdy(r_srdy[k]), .out_beat(r_beat[k]), .out_drdy(r_drdy[k])
    );
  end

  assign in_drdy    = s_drdy[0];
  assign out_srdy   = r_srdy[NP];
  assign out_beat   = r_beat[NP];
  always_comb begin
    for (int k = 0; k < NP; k++) begin
      p_tx_drdy[k] = s_drdy[k+1];
      p_rx_srdy[k] = r_srdy[k];
      p_rx_beat[k] = r_beat[k];
      r_drdy[k]    = p_rx_drdy[k];
    end
    r_drdy[NP] = out_drdy;
  end
endmodule
