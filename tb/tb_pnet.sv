// Self-checking testbench for the parser interconnect network (pnet, NP=2),
// and through it the pb_skid register slices.
// The two parsers are replaced by combinational stand-ins with different,
// non-commuting transforms (parser 0 adds 1 to the data, parser 1 shifts it
// left by one), so the routing can be read off the output data. Four
// routings are loaded in turn through cfg_we: the reset bypass (output =
// input), parser 0 only, parser 0 then 1, and parser 1 then 0. Under each,
// a stream of beats with random input gaps and random output stalls is
// sent; the output must be the expected transform of every input beat, in
// order, with no loss or duplication. The bypass is also run with a
// gap-free input and an output that never stalls.
module tb_pnet;
  import hp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0; logic [11:0] cfg_in = '0, cfg;
  logic in_srdy = 0, in_drdy, out_srdy, out_drdy = 0;
  pbeat_t in_beat = '0, out_beat;
  logic [1:0] p_tx_srdy, p_tx_drdy, p_rx_srdy, p_rx_drdy;
  pbeat_t p_tx_beat [2];
  pbeat_t p_rx_beat [2];
  int checks = 0, failures = 0;
  int mode = 0;          // 0 bypass, 1 p0, 2 p0->p1, 3 p1->p0
  bit free_run = 0;

  pnet #(.NP(2)) dut (.*);

  // parser stand-ins
  always_comb begin
    p_tx_srdy = p_rx_srdy;
    p_rx_drdy = p_tx_drdy;
    p_tx_beat[0] = p_rx_beat[0]; p_tx_beat[0].data = p_rx_beat[0].data + 64'd1;
    p_tx_beat[1] = p_rx_beat[1]; p_tx_beat[1].data = p_rx_beat[1].data << 1;
  end

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] xf(input logic [63:0] d);
    case (mode)
      0: return d;
      1: return d + 64'd1;
      2: return (d + 64'd1) << 1;
      default: return (d << 1) + 64'd1;
    endcase
  endfunction

  logic [63:0] exp_q[$];
  int n_out = 0, n_stall = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      out_drdy <= free_run || ($urandom_range(0, 3) != 0);
      if (out_srdy && !out_drdy) n_stall++;
      if (out_srdy && out_drdy) begin
        n_out++; checks++;
        if (exp_q.size() == 0) begin failures++; $display("FAIL extra beat"); end
        else begin
          logic [63:0] e; e = exp_q.pop_front();
          if (out_beat.data !== e) begin
            failures++; if (failures < 10) $display("FAIL mode %0d exp %h got %h", mode, e, out_beat.data);
          end
        end
      end
    end
  end

  task automatic stream(input int n);
    for (int i = 0; i < n; i++) begin
      logic [63:0] d;
      @(negedge clk);
      if (!free_run) while ($urandom_range(0, 3) == 0) begin in_srdy = 0; @(negedge clk); end
      d = {$urandom, $urandom} >> 2;
      in_srdy = 1; in_beat = '{data: d, sop: 1'b1, eop: 1'b1, sz: 3'd0};
      exp_q.push_back(xf(d));
      #1;
      while (!in_drdy) begin @(negedge clk); #1; end
    end
    @(negedge clk); in_srdy = 0;
    repeat (30) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL mode %0d: %0d beats lost", mode, exp_q.size()); end
    exp_q.delete();
  endtask

  initial begin

    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk);
    checks++; if (cfg != 12'h0FF) begin failures++; $display("FAIL reset cfg %h", cfg); end
    mode = 0; stream(200);
    free_run = 1;
    @(negedge clk); stream(100);
    free_run = 0;
    for (int m = 1; m < 4; m++) begin
      @(negedge clk); cfg_we = 1;
      cfg_in = (m == 1) ? 12'h1F0 : (m == 2) ? 12'h210 : 12'h102;
      @(negedge clk); cfg_we = 0; mode = m;
      stream(200);
    end
    checks++; if (n_stall < 50) begin failures++; $display("FAIL few stalls"); end
    $display("beats %0d stalls %0d", n_out, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
