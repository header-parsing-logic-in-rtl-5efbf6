// Self-checking testbench for the coarse reconfiguration controller
// (coarse_cfg_ctrl), run together with the coarse parser programmer
// (coarse_prog) as its consumer. A small memory of 256-bit words stands in
// for DDR2: a request is acknowledged after a random delay and answered
// with two 128-bit beats (low half first) a few cycles later.
// Slot k (words 16k..16k+15) holds the stream for CAM entry k: a switch
// utility packet, an image utility packet of length n and n image chunks.
// Checks for each triggered configuration:
//   - the programmer receives exactly the n image chunks, in order, and
//     writes the switch value;
//   - the number of 256-bit reads is ceil((n + 2) / 4), the read count for
//     a stream of n + 2 64-bit chunks;
//   - reads start at word 16k and are consecutive.
// A trigger whose type equals the next stage's type, a zero type and a
// type not in the CAM must start nothing.
module tb_coarse_cfg_ctrl;
  import hp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cam_we = 0, cam_wvalid = 0;
  logic [3:0] cam_waddr = '0;
  logic [15:0] cam_wdata = '0;
  logic trig_v = 0; logic [15:0] trig_etype = '0, next_type = '0;
  logic rd_req, rd_ack = 0, rd_valid = 0;
  logic [29:0] rd_addr;
  logic [127:0] rd_data = '0;
  logic p_start, d_v, p_busy, p_done, p_cancel, active;
  logic [63:0] d;
  logic [15:0] n_started, n_done, n_cancel;
  logic sup_prog, prog_v, net_we;
  logic [63:0] prog_data;
  logic [11:0] net_cfg;
  int checks = 0, failures = 0;

  coarse_cfg_ctrl #(.CAM_DEPTH(16), .ADDR_W(30), .SLOT_LOG2(4), .MAX_READS(16)) dut (.*);
  coarse_prog u_prog (.clk, .rst_n, .start(p_start), .d_v, .d, .busy(p_busy),
    .done(p_done), .cancel(p_cancel), .sup_prog, .prog_v, .prog_data, .net_we, .net_cfg);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  logic [255:0] mem [64];
  int nreads = 0;
  logic [29:0] raddr[$];

  // memory responder
  initial begin
    forever begin
      @(negedge clk);
      if (rd_req) begin
        logic [255:0] w;
        repeat ($urandom_range(0, 3)) @(negedge clk);
        rd_ack = 1; raddr.push_back(rd_addr); nreads++;
        w = mem[rd_addr[5:0]];
        @(negedge clk); rd_ack = 0;
        repeat ($urandom_range(1, 6)) @(negedge clk);
        rd_valid = 1; rd_data = w[127:0];
        @(negedge clk); rd_data = w[255:128];
        @(negedge clk); rd_valid = 0;
      end
    end
  end

  logic [63:0] got[$];
  int n_net = 0; logic [11:0] last_net = '0;
  always @(posedge clk) if (rst_n) begin
    if (prog_v) got.push_back(prog_data);
    if (net_we) begin n_net++; last_net = net_cfg; end
  end

  int slot_n [4];
  logic [11:0] slot_sw [4];

  initial begin
    foreach (mem[i]) mem[i] = '0;
    for (int k = 0; k < 4; k++) begin
      logic [63:0] ch [64];
      int n;
      n = 1 + 6 * k + $urandom_range(0, 3);   // 1..22 chunks
      slot_n[k] = n; slot_sw[k] = 12'($urandom);
      ch[0] = {32'h0, slot_sw[k], 4'h1, 16'hFFFF};
      ch[1] = {32'h0, 4'h0, 8'(n), 4'h0, 16'hFFFF};
      for (int i = 0; i < n; i++) ch[2 + i] = {$urandom, $urandom};
      for (int i = 0; i < n + 2; i++) mem[16 * k + i / 4][64 * (i % 4) +: 64] = ch[i];
    end
    repeat (3) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 4; k++) begin
      @(negedge clk); cam_we = 1; cam_wvalid = 1; cam_waddr = 4'(k); cam_wdata = 16'h0800 + 16'(k);
    end
    @(negedge clk); cam_we = 0;
    for (int t = 0; t < 24; t++) begin
      int k, r0, s0, n;
      k = t % 4; n = slot_n[k];
      got.delete(); raddr.delete(); r0 = nreads; s0 = n_net;
      @(negedge clk); trig_v = 1; trig_etype = 16'h0800 + 16'(k); next_type = 16'h0;
      @(negedge clk); trig_v = 0;
      repeat (3) @(negedge clk);
      while (active) @(negedge clk);
      repeat (5) @(negedge clk);
      chk(got.size() == n, $sformatf("slot %0d: %0d chunks, expected %0d", k, got.size(), n));
      for (int i = 0; i < n && i < got.size(); i++)
        chk(got[i] == mem[16 * k + (i + 2) / 4][64 * ((i + 2) % 4) +: 64], "chunk data");
      chk(nreads - r0 == (n + 2 + 3) / 4, $sformatf("read count %0d for %0d chunks", nreads - r0, n + 2));
      foreach (raddr[i]) chk(raddr[i] == 30'(16 * k + i), "read addresses");
      chk(n_net == s0 + 1 && last_net == slot_sw[k], "switch setting");
    end
    // triggers that must do nothing
    begin
      int s0; s0 = n_started;
      @(negedge clk); trig_v = 1; trig_etype = 16'h0801; next_type = 16'h0801;
      @(negedge clk); trig_etype = 16'h0000; next_type = 16'h0800;
      @(negedge clk); trig_etype = 16'h86DD;
      @(negedge clk); trig_v = 0;
      repeat (20) @(negedge clk);
      chk(n_started == 16'(s0), "no configuration for same, zero or unknown type");
    end
    chk(n_done == 16'd24 && n_cancel == 16'd0, "done counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
