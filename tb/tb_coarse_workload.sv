// Workload testbench for the coarse-grained reconfiguration path: the
// configuration controller (coarse_cfg_ctrl, default sizes: 16-entry CAM,
// 16-word slots, at most 16 reads), the programmer (coarse_prog) and the two
// parser processors of the chain (small core, PID 1; large core, PID 2).
// It runs the four configuration flows of the read-count model for a chain
// of P = 2 processors, with 256-bit reads, 128-bit core images and 64-bit
// utility packets:
//   slot 0: one core (small), no switch      3 chunks -> 1 read
//   slot 1: one core (large) with switches   4 chunks -> 1 read
//   slot 2: two cores, no switch setting     5 chunks -> 2 reads
//   slot 3: two cores with switch setting    6 chunks -> 2 reads
// The expected read count is worked out in the testbench from the model:
// Ri = ceil((64 + 128) / 256), Rp = ceil(P / 2), Rts = ceil(2 * (Bts + Bh)
// / 256) with Bts = ceil(log2(P + 1)) + P * ceil(log2 P) and a 16-bit
// utility header Bh, and Rt = Ri, Ri + Rts - 1, Ri + Rp or Ri + Rp + Rts - 1.
// Each core image carries a distinct EtherType; after each flow the
// targeted processors must report it as their configured type, the others
// must keep theirs, and the switch setting must change only in the flows
// that carry one. The memory model acknowledges a read after one cycle and
// returns the two 128-bit beats 8 cycles later. The cycles from trigger to
// the end of the flow are printed and checked against a bound of 12 cycles
// of lookup and start-up plus 20 per read (request, 8-cycle latency, two
// beats, four 64-bit chunks and the handover).
module tb_coarse_workload;
  import hp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cam_we = 0, cam_wvalid = 0;
  logic [3:0] cam_waddr = '0;
  logic [15:0] cam_wdata = '0;
  logic trig_v = 0; logic [15:0] trig_etype = '0;
  logic rd_req, rd_ack = 0, rd_valid = 0;
  logic [29:0] rd_addr;
  logic [127:0] rd_data = '0;
  logic p_start, d_v, p_busy, p_done, p_cancel, active;
  logic [63:0] d;
  logic [15:0] n_started, n_done, n_cancel;
  logic sup_prog, prog_v, net_we;
  logic [63:0] prog_data;
  logic [11:0] net_cfg;
  logic [1:0] cfgd;
  logic [15:0] ctype [2];
  int checks = 0, failures = 0;

  coarse_cfg_ctrl u_ctrl (.clk, .rst_n, .cam_we, .cam_waddr, .cam_wdata, .cam_wvalid,
    .trig_v, .trig_etype, .next_type(16'h0000), .rd_req, .rd_addr, .rd_ack, .rd_valid,
    .rd_data, .p_start, .d_v, .d, .p_busy, .p_done, .p_cancel, .active, .n_started,
    .n_done, .n_cancel);
  coarse_prog u_prog (.clk, .rst_n, .start(p_start), .d_v, .d, .busy(p_busy),
    .done(p_done), .cancel(p_cancel), .sup_prog, .prog_v, .prog_data, .net_we, .net_cfg);

  // the processors see no packets here; their packet ports are tied off
  pbeat_t idle_beat = '0;
  for (genvar s = 0; s < 2; s++) begin : g_p
    logic   rx_drdy, tx_srdy, ivld, evld;
    pbeat_t tx_beat;
    logic [INFO_W-1:0]  info;
    logic [INFOL_W-1:0] ilen;
    logic [15:0]        et;
    pstate_e            st;
    parser_proc #(.LARGE(s == 1), .PID(4'(s + 1))) u_p (
      .clk, .rst_n, .sup_on(1'b1), .sup_prog, .prog_v, .prog_data,
      .rx_srdy(1'b0), .rx_beat(idle_beat), .rx_drdy, .tx_srdy, .tx_beat, .tx_drdy(1'b1),
      .info_vld(ivld), .info, .info_len(ilen), .etype_vld(evld), .etype(et),
      .configured(cfgd[s]), .cfg_type(ctype[s]), .state(st));
  end

  always #2.5 clk = ~clk;

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

  logic [255:0] mem [64];
  int nreads = 0;
  initial begin
    forever begin
      @(negedge clk);
      if (rd_req) begin
        logic [255:0] w;
        rd_ack = 1; nreads++;
        w = mem[rd_addr[5:0]];
        @(negedge clk); rd_ack = 0;
        repeat (8) @(negedge clk);
        rd_valid = 1; rd_data = w[127:0];
        @(negedge clk); rd_data = w[255:128];
        @(negedge clk); rd_valid = 0;
      end
    end
  end

  int n_net = 0;
  always @(posedge clk) if (rst_n && net_we) n_net++;

  function automatic int clog2i(input int v);
    int r = 0;
    while ((1 << r) < v) r++;
    return r;
  endfunction

  // an image for processor 'pid' that sets it up for type 'et'
  function automatic logic [127:0] image(input int pid, input logic [15:0] et);
    logic [127:0] c;
    c = '0;
    c[15:0] = et;
    if (pid == 1) begin
      c[111:108] = 4'd1;
      c[31:16] = {4'd1, 6'd16, 6'd16};     // type field: beat 1, bits 31:16
      c[103:96] = 8'd2;
      c[127:124] = PS_PASS; c[123:120] = PS_PASS;
    end else begin
      c[127:124] = 4'd2;
      c[29:16] = {2'd1, 6'd16, 6'd16};
    end
    return c;
  endfunction

  int          s_cores [4] = '{1, 1, 2, 2};
  bit          s_sw    [4] = '{0, 1, 0, 1};
  logic [11:0] s_swv   [4] = '{12'h0, 12'h021, 12'h0, 12'h312};

  initial begin
    localparam int P = 2, BR = 256, BP = 128, BSU = 64, BH = 16;
    int bts, ri, rp, rts;
    bts = clog2i(P + 1) + P * clog2i(P);
    ri  = (BSU + BP + BR - 1) / BR;
    rp  = (P + 1) / 2;
    rts = (2 * (bts + BH) + BR - 1) / BR;
    chk(bts == 4, "switch bits for two processors");
    foreach (mem[i]) mem[i] = '0;
    for (int k = 0; k < 4; k++) begin
      logic [63:0] ch [8];
      int n;
      n = 0;
      if (s_sw[k]) begin ch[n] = {32'h0, s_swv[k], 4'h1, 16'hFFFF}; n++; end
      ch[n] = {32'h0, 4'h0, 8'(2 * s_cores[k]), 4'h0, 16'hFFFF}; n++;
      for (int c = 0; c < s_cores[k]; c++) begin
        logic [127:0] im;
        // one-core flows load processor 0 (slot 0) or 1 (slot 1); two-core flows both
        im = image((s_cores[k] == 1) ? 2 - (k % 2 == 0 ? 1 : 0) : c + 1, 16'h0A00 + 16'(16 * k + c));
        ch[n] = im[63:0]; ch[n + 1] = im[127:64]; n += 2;
      end
      for (int i = 0; i < n; i++) mem[16 * k + i / 4][64 * (i % 4) +: 64] = ch[i];
    end
    repeat (3) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 4; k++) begin
      @(negedge clk); cam_we = 1; cam_wvalid = 1; cam_waddr = 4'(k); cam_wdata = 16'h0900 + 16'(k);
    end
    @(negedge clk); cam_we = 0;
    for (int k = 0; k < 4; k++) begin
      int r0, n0, cyc, rt, tgt [2];
      logic [15:0] t_before [2];
      r0 = nreads; n0 = n_net; cyc = 0;
      t_before = ctype;
      @(negedge clk); trig_v = 1; trig_etype = 16'h0900 + 16'(k);
      @(negedge clk); trig_v = 0; cyc = 1;
      while (!(p_done || p_cancel) && cyc < 2000) begin @(negedge clk); cyc++; end
      repeat (5) @(negedge clk);
      if (s_cores[k] == 1) rt = s_sw[k] ? ri + rts - 1 : ri;
      else                 rt = s_sw[k] ? ri + rp + rts - 1 : ri + rp;
      chk(nreads - r0 == rt, $sformatf("flow %0d: %0d reads, model gives %0d", k, nreads - r0, rt));
      chk(n_done == 16'(k + 1) && n_cancel == 16'd0, "flow completed");
      chk(n_net == n0 + (s_sw[k] ? 1 : 0), "switch written only when carried");
      if (s_sw[k]) chk(net_cfg == s_swv[k], "switch value");
      tgt = '{0, 0};
      if (s_cores[k] == 1) tgt[(k % 2 == 0) ? 0 : 1] = 1; else tgt = '{1, 1};
      for (int s = 0; s < 2; s++) begin
        int c;
        c = (s_cores[k] == 1) ? 0 : s;
        if (tgt[s]) chk(cfgd[s] && ctype[s] == 16'h0A00 + 16'(16 * k + c),
                        $sformatf("flow %0d: processor %0d type %h", k, s, ctype[s]));
        else        chk(ctype[s] == t_before[s], "untargeted processor unchanged");
      end
      chk(cyc <= 12 + 20 * rt, $sformatf("flow %0d: %0d cycles", k, cyc));
      begin
        string sw;
        sw = s_sw[k] ? " with switches" : "";
        $display("flow %0d: %0d core(s)%s, %0d chunks, %0d reads, %0d cycles", k, s_cores[k],
                 sw, 2 * s_cores[k] + 1 + (s_sw[k] ? 1 : 0), rt, cyc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
