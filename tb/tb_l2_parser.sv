// Self-checking testbench for the level 2 parser (l2_parser).
// Packets of 1 to 6 beats with random data, random input gaps and random
// output stalls. Expected: beat 0 consumed, beats 1.. passed in order with
// sop on the first passed beat and the original eop/sz; info =
// {beat 0, beat 1 bits 63:32} (dst and src MAC, 96 bits) and etype =
// beat 1 bits 31:16 once per packet of two or more beats; a one-beat
// packet gives no output and no info.
module tb_l2_parser;
  import hp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic rx_srdy = 0, rx_drdy, tx_srdy, tx_drdy = 0;
  pbeat_t rx_beat = '0, tx_beat;
  logic info_vld, etype_vld;
  logic [INFO_W-1:0] info; logic [INFOL_W-1:0] info_len; logic [15:0] etype;
  int checks = 0, failures = 0;

  l2_parser dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pbeat_t exp_q[$];
  logic [INFO_W+15:0] exp_i[$];
  int n_stall = 0;
  always @(posedge clk) if (rst_n) begin
    tx_drdy <= ($urandom_range(0, 2) != 0);
    if (tx_srdy && !tx_drdy) n_stall++;
    if (tx_srdy && tx_drdy) begin
      checks++;
      if (exp_q.size() == 0 || tx_beat !== exp_q[0]) begin failures++; if (failures < 10) $display("FAIL beat"); end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
    if (info_vld) begin
      checks++;
      if (exp_i.size() == 0 || {info, etype} !== exp_i[0] || info_len != 9'd96 || !etype_vld) begin
        failures++; $display("FAIL info");
      end
      if (exp_i.size() != 0) void'(exp_i.pop_front());
    end
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int n; pbeat_t b[6];
      n = $urandom_range(1, 6);
      for (int i = 0; i < n; i++) begin
        b[i].data = {$urandom, $urandom}; b[i].sop = (i == 0); b[i].eop = (i == n - 1);
        b[i].sz = (i == n - 1) ? 3'($urandom) : 3'd0;
        if (i > 0) begin pbeat_t e; e = b[i]; e.sop = (i == 1); exp_q.push_back(e); end
      end
      if (n > 1) exp_i.push_back({INFO_W'({b[0].data, b[1].data[63:32]}), b[1].data[31:16]});
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        while ($urandom_range(0, 3) == 0) begin rx_srdy = 0; @(negedge clk); end
        rx_srdy = 1; rx_beat = b[i];
        #1;
        while (!rx_drdy) begin @(negedge clk); #1; end
      end
      @(negedge clk); rx_srdy = 0;
    end
    repeat (20) @(negedge clk);
    checks++; if (exp_q.size() != 0 || exp_i.size() != 0) begin failures++; $display("FAIL missing output"); end
    checks++; if (n_stall < 50) begin failures++; $display("FAIL few stalls"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
