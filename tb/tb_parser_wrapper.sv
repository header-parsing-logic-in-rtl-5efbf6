// Self-checking testbench for the reconfigurable-region wrapper
// (parser_wrapper) with the level 2 parser inside.
// Phase 1: region unconfigured (type 0) -> every packet bypasses the region
//   unchanged, no info, n_bypassed counts packets, on is low.
// Phase 2: cfg_start then cfg_set(0x0800) -> on, cfg_type = 0x0800, packets
//   are parsed (first beat stripped, info returned).
// Phase 3: cfg_start (region off again), then cfg_set pulsed in the middle
//   of a packet: that packet must still bypass whole, the next one is
//   parsed (the bypass switches only between packets).
// In every phase each packet of two or more beats must raise trig_v once
// with the EtherType snapshot (beat 1 bits 31:16). Random input gaps and
// output stalls throughout.
module tb_parser_wrapper;
  import hp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic rx_srdy = 0, rx_drdy, tx_srdy, tx_drdy = 0;
  pbeat_t rx_beat = '0, tx_beat;
  logic info_vld, etype_vld, on, trig_v;
  logic [INFO_W-1:0] info; logic [INFOL_W-1:0] info_len; logic [15:0] etype;
  logic cfg_start = 0, cfg_set = 0;
  logic [15:0] cfg_etype = '0, cfg_type, trig_etype, n_bypassed;
  int checks = 0, failures = 0;

  parser_wrapper #(.RESET_TYPE(16'h0000)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  pbeat_t exp_q[$];
  logic [INFO_W-1:0] exp_i[$];
  logic [15:0] exp_t[$];
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
      if (exp_i.size() == 0 || info !== exp_i[0]) begin failures++; $display("FAIL info"); end
      if (exp_i.size() != 0) void'(exp_i.pop_front());
    end
    if (trig_v) begin
      checks++;
      if (exp_t.size() == 0 || trig_etype !== exp_t[0]) begin failures++; $display("FAIL trigger"); end
      if (exp_t.size() != 0) void'(exp_t.pop_front());
    end
  end

  // send one packet; 'parsed' says what the wrapper is expected to do;
  // set_at >= 0 pulses cfg_set while that beat is offered
  task automatic pkt(input bit parsed, input int set_at);
    int n; pbeat_t b[6];
    n = $urandom_range(set_at >= 0 ? 4 : 1, 6);
    for (int i = 0; i < n; i++) begin
      b[i].data = {$urandom, $urandom}; b[i].sop = (i == 0); b[i].eop = (i == n - 1);
      b[i].sz = (i == n - 1) ? 3'($urandom) : 3'd0;
      if (!parsed) exp_q.push_back(b[i]);
      else if (i > 0) begin pbeat_t e; e = b[i]; e.sop = (i == 1); exp_q.push_back(e); end
    end
    if (parsed && n > 1) exp_i.push_back(INFO_W'({b[0].data, b[1].data[63:32]}));
    if (n > 1) exp_t.push_back(b[1].data[31:16]);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      while ($urandom_range(0, 3) == 0) begin rx_srdy = 0; @(negedge clk); end
      rx_srdy = 1; rx_beat = b[i];
      cfg_set = (i == set_at);
      #1;
      while (!rx_drdy) begin @(negedge clk); cfg_set = 0; #1; end
    end
    @(negedge clk); rx_srdy = 0; cfg_set = 0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    int nb0;
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk);
    chk(!on && cfg_type == 16'h0, "unconfigured after reset");
    for (int t = 0; t < 40; t++) pkt(1'b0, -1);
    chk(n_bypassed == 16'd40, "bypass counter");
    @(negedge clk); cfg_start = 1; @(negedge clk); cfg_start = 0;
    cfg_etype = 16'h0800; cfg_set = 1; @(negedge clk); cfg_set = 0;
    @(negedge clk);
    chk(on && cfg_type == 16'h0800, "configured type");
    nb0 = n_bypassed;
    for (int t = 0; t < 40; t++) pkt(1'b1, -1);
    chk(n_bypassed == 16'(nb0), "no bypass while on");
    @(negedge clk); cfg_start = 1; @(negedge clk); cfg_start = 0;
    @(negedge clk);
    chk(!on && cfg_type == 16'h0, "off during reconfiguration");
    for (int t = 0; t < 10; t++) begin
      pkt(1'b0, 2);                // switch requested mid-packet: still bypassed
      chk(on, "on after cfg_set");
      pkt(1'b1, -1);               // next packet parsed
      @(negedge clk); cfg_start = 1; @(negedge clk); cfg_start = 0;
    end
    repeat (20) @(negedge clk);
    chk(exp_q.size() == 0 && exp_i.size() == 0 && exp_t.size() == 0, "all output seen");
    chk(n_stall > 50, "stalls exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
