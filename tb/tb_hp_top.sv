// End-to-end testbench of the reconfigurable header-parser chain (hp_top),
// at the top's default parameters, with behavioural models of the DDR2
// controller core (ddr2_model) and a constant configuration-port status.
// Clocks: MainBus 21 ns, parser 5 ns, configuration port 10 ns, DDR2
// controller 4 ns.
// Everything the host does goes through MainBus transactions:
//  1. Loads external memory with two coarse configuration streams (slot 0:
//     switch "input -> processor 0 -> output" and the small processor's
//     image; slot 2: switch "input -> processor 0 -> processor 1 -> output"
//     and the large processor's image) and a fine-grained partial bitstream
//     ending in the DESYNC sequence (slot 1), then reads one memory word
//     back through the four special read addresses.
//  2. Fine-grained chain: the first 0x0800 packet finds region 1 empty and
//     is bypassed; it triggers a configuration through the port, after
//     which 0x0800 packets are parsed by both regions. A 0x86DD packet
//     misses in the CAM. Every output beat is compared with a reference.
//     Info dumps of both stages are read back through the MMU.
//  3. Mode switch to the coarse chain; the host starts the configuration
//     of processor 0; the first parsed packet then triggers the
//     configuration of processor 1 and a new interconnect setting (the
//     packets in flight during that reprogramming are not scoreboarded).
//     Afterwards packets are checked beat by beat, including ones the
//     large core's CLU rejects (passed on unstripped).
//  4. With the output held, the MainBus packet FIFO fills and the host
//     reads the BLOCKED status.
// Each mechanism is counted (bypass, stall, fine reconfiguration, CAM miss,
// coarse programming, switch setting, processor programmed, CLU reject,
// mode switch, info read-back, DDR2 read-back, chain blocked); one that
// never happened counts as a failure.
module tb_hp_top;
  import hp_pkg::*;
  logic mb_clk = 0, clk = 0, icap_clk = 0, ddr_clk = 0;
  logic mb_rst_n = 0, rst_n = 0, icap_rst_n = 0, ddr_rst_n = 0;
  logic chain_sel = 0;
  logic mb_wr = 0, mb_rd = 0, mb_rvalid;
  logic [31:0] mb_addr = '0, mb_wdata = '0, mb_rdata;
  logic out_srdy, out_drdy = 0;
  pbeat_t out_beat;
  logic cam_we = 0, cam_sel = 0, cam_wvalid = 0;
  logic [3:0] cam_waddr = '0;
  logic [15:0] cam_wdata = '0;
  logic cfg_trig_v = 0; logic [15:0] cfg_trig_etype = '0;
  logic [1:0] proc_on = 2'b11;
  logic ddr_af_wren, ddr_af_cmd, ddr_wdf_wren, ddr_rd_valid;
  logic [29:0] ddr_af_addr;
  logic [127:0] ddr_wdf_data, ddr_rd_data;
  logic [15:0] ddr_wdf_mask;
  logic icap_ce_n, icap_wr_n;
  logic [31:0] icap_i, icap_o = 32'h0000_009F, icap_status;
  logic [15:0] fine_type [2], coarse_type [2], stage_etype [2];
  logic [11:0] net_cfg;
  logic [15:0] n_entry_beats, n_fine_ok, n_fine_fail, n_coarse_done, n_coarse_cancel, n_bypassed;
  logic [8:0] info_wptr [2];
  logic [1:0] fine_on, coarse_cfgd, stage_etype_vld;
  int checks = 0, failures = 0;

  hp_top dut (.*);
  ddr2_model #(.ADDR_W(30), .LAT(10)) u_mem (.clk(ddr_clk), .af_wren(ddr_af_wren), .af_cmd(ddr_af_cmd),
    .af_addr(ddr_af_addr), .wdf_wren(ddr_wdf_wren), .wdf_data(ddr_wdf_data),
    .wdf_mask(ddr_wdf_mask), .rd_valid(ddr_rd_valid), .rd_data(ddr_rd_data));

  always #10.5 mb_clk = ~mb_clk;
  always #2.5 clk = ~clk;
  always #5 icap_clk = ~icap_clk;
  always #2 ddr_clk = ~ddr_clk;

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL %s", what); end
  endtask

  // ---------------- host ----------------
  task automatic hwr(input logic [31:0] a, input logic [31:0] d);
    @(negedge mb_clk); mb_wr = 1; mb_addr = a; mb_wdata = d;
    @(negedge mb_clk); mb_wr = 0;
  endtask
  task automatic hrd(input logic [31:0] a, output logic [31:0] d);
    @(negedge mb_clk); mb_rd = 1; mb_addr = a;
    @(negedge mb_clk); mb_rd = 0; d = mb_rdata;
  endtask
  task automatic ddr_write(input int w, input logic [255:0] v);
    for (int i = 0; i < 8; i++) hwr({1'b1, 31'(8 * w + i)}, v[32*i +: 32]);
  endtask
  task automatic send_pkt(input logic [63:0] b [$]);
    for (int i = 0; i < b.size(); i++) begin
      hwr({4'b0000, 1'b1, 1'b0, (i == 0), 1'b0, 3'd0, 21'h0}, b[i][63:32]);
      hwr({4'b0000, 1'b1, 1'b0, 1'b0, (i == b.size() - 1), 3'd0, 21'h0}, b[i][31:0]);
    end
  endtask
  task automatic info_read(input bit stage, input int a, output logic [63:0] v);
    logic [31:0] r;
    hrd({10'h0, stage, 9'(a), 7'h0, 5'(FN_NSPI_REQRES)}, r);
    chk(r == ST_NSPI_OK, "info request accepted");
    #300;
    hrd(32'h0 | 5'(FN_NSPI_READRES_HI), r); v[63:32] = r;
    hrd(32'h0 | 5'(FN_NSPI_READRES_LO), r); v[31:0] = r;
  endtask

  // ---------------- output scoreboard ----------------
  pbeat_t exp_q[$];
  bit sb_on = 1, hold = 0;
  int m_stall = 0, n_out = 0;
  always @(posedge clk) if (rst_n) begin
    out_drdy <= !hold && ($urandom_range(0, 3) != 0);
    if (out_srdy && !out_drdy) m_stall++;
    if (out_srdy && out_drdy) begin
      n_out++;
      if (sb_on) begin
        checks++;
        if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected output beat %h", out_beat.data); end
        else begin
          pbeat_t e; e = exp_q.pop_front();
          if (out_beat !== e) begin
            failures++;
            if (failures < 30) $display("FAIL out %h %b%b exp %h %b%b", out_beat.data, out_beat.sop, out_beat.eop, e.data, e.sop, e.eop);
          end
        end
      end
    end
  end

  task automatic expect_from(input logic [63:0] b [$], input int first);
    for (int i = first; i < b.size(); i++) begin
      pbeat_t e;
      e.data = b[i]; e.sop = (i == first); e.eop = (i == b.size() - 1); e.sz = 3'd0;
      exp_q.push_back(e);
    end
  endtask

  task automatic drain();
    int w; w = 0;
    while (exp_q.size() != 0 && w < 4000) begin @(negedge clk); w++; end
    repeat (50) @(negedge clk);
    chk(exp_q.size() == 0, "all expected output beats arrived");
  endtask

  // ---------------- mechanism counters ----------------
  int m_cam_miss = 0, m_sup_prog = 0, m_net_we = 0, m_icap_words = 0;
  int m_mode = 0, m_clu_rej = 0, m_info = 0, m_ddr_rb = 0, m_blocked = 0;
  logic [11:0] net_q = '0;
  logic [1:0]  cfgd_q = '0;
  always @(posedge clk) if (rst_n) begin
    net_q <= net_cfg; cfgd_q <= coarse_cfgd;
    if (net_cfg != net_q) m_net_we++;
    for (int s = 0; s < 2; s++) if (coarse_cfgd[s] && !cfgd_q[s]) m_sup_prog++;
  end
  always @(posedge icap_clk) if (icap_rst_n && !icap_ce_n) m_icap_words++;

  function automatic logic [63:0] util(input logic [3:0] op, input logic [11:0] arg);
    return {32'h0, arg, op, 16'hFFFF};
  endfunction

  function automatic logic [63:0] rnd64();
    return {$urandom, $urandom};
  endfunction

  initial begin
    logic [255:0] w;
    logic [31:0] r;
    logic [31:0] bits [24];
    small_cfg_t sc;
    large_cfg_t lc;
    logic [63:0] pk [$];
    logic [63:0] v, info0_w0, info0_w1, info1_w0;
    int p0, p1;

    // images
    sc = '0;
    sc.ethertype = 16'h0800; sc.eth = '{count: 4'd1, shift: 6'd16, width: 6'd16};
    sc.rs1 = '{count: 4'd0, shift: 6'd16, width: 6'd48}; sc.re1 = sc.rs1;
    sc.rs2 = '{count: 4'd1, shift: 6'd32, width: 6'd16}; sc.re2 = sc.rs2;
    sc.total = 8'd2; sc.pid = 4'd1; sc.enstate = PS_PASS; sc.epstate = PS_IDLE;
    lc = '0;
    lc.ethertype = 16'h0800; lc.ig = 1'b1;
    lc.v1 = '{count: 3'd0, shift: 6'd48, width: 6'd16};
    lc.v2 = '{count: 3'd0, shift: 6'd48, width: 6'd16};
    lc.rs = '{count: 3'd1, shift: 6'd0, width: 6'd32}; lc.re = lc.rs;
    lc.setval1 = 16'd20; lc.cluop = 6'b00_11_00;     // V1 > SetValue1
    lc.pid = 4'd2;

    #40 mb_rst_n = 1; rst_n = 1; icap_rst_n = 1; ddr_rst_n = 1;
    // CAMs: fine entry 1 = 0x0800 (slot 1); coarse entry 0 = 0x0001 (host
    // start, slot 0), entry 2 = 0x0800 (slot 2)
    @(negedge clk); cam_we = 1; cam_wvalid = 1;
    cam_sel = 0; cam_waddr = 4'd1; cam_wdata = 16'h0800; @(negedge clk);
    cam_sel = 1; cam_waddr = 4'd0; cam_wdata = 16'h0001; @(negedge clk);
    cam_sel = 1; cam_waddr = 4'd2; cam_wdata = 16'h0800; @(negedge clk);
    cam_we = 0;

    // ---- 1. external memory through the MainBus ----
    ddr_write(0,  {64'(CFG_W'(sc) >> 64), 64'(CFG_W'(sc)), util(UOP_BITSTREAM, 12'd2), util(UOP_SWITCH, 12'h1F0)});
    ddr_write(32, {64'(CFG_W'(lc) >> 64), 64'(CFG_W'(lc)), util(UOP_BITSTREAM, 12'd2), util(UOP_SWITCH, 12'h210)});
    for (int i = 0; i < 24; i++) bits[i] = $urandom & 32'h0FFF_FFFF;
    bits[0] = 32'hFFFF_FFFF; bits[1] = 32'hAA99_5566;   // sync word
    bits[20] = 32'h3000_8001; bits[21] = 32'h0000_000D;
    bits[22] = 32'h2000_0000; bits[23] = 32'h2000_0000;
    for (int k = 0; k < 3; k++) begin
      for (int i = 0; i < 8; i++) w[32*i +: 32] = bits[8*k + i];
      ddr_write(4096 + k, w);
    end
    #500;
    chk(u_mem.peek(32) == {64'(CFG_W'(lc) >> 64), 64'(CFG_W'(lc)), util(UOP_BITSTREAM, 12'd2), util(UOP_SWITCH, 12'h210)},
        "memory written through MainBus");
    hrd({1'b1, 31'(8 * 4096)}, r);
    #1000;
    for (int h = 0; h < 2; h++)
      for (int k = 0; k < 4; k++) begin
        hrd(32'hFFFF_FFFC + k, r);
        chk(r == bits[4 * h + k], "DDR2 read-back through the special addresses");
        m_ddr_rb++;
      end

    // ---- 2. fine-grained chain ----
    chain_sel = 0;
    for (int t = 0; t < 12; t++) begin
      int nb; logic [15:0] et; bit cfgd;
      nb = $urandom_range(3, 8);
      et = (t == 6) ? 16'h86DD : 16'h0800;
      pk.delete();
      for (int i = 0; i < nb; i++) pk.push_back(rnd64());
      pk[1][31:16] = et;
      cfgd = (fine_type[1] == 16'h0800);
      expect_from(pk, cfgd ? 2 : 1);
      if (t == 0) begin info0_w0 = {pk[0][31:0], pk[1][63:32]}; info0_w1 = {32'h0, pk[0][63:32]}; end
      if (t == 1) info1_w0 = {pk[1][31:0], pk[2][63:32]};
      send_pkt(pk);
      drain();
      if (t == 6) begin
        repeat (200) @(negedge clk);
        if (fine_type[1] == 16'h0800 && n_fine_ok == 16'd1 && fine_on[1]) m_cam_miss++;
      end
      if (t == 0) begin
        int w0; w0 = 0;
        while (n_fine_ok == 0 && w0 < 20000) begin @(negedge clk); w0++; end
        repeat (5) @(negedge clk);
        chk(n_fine_ok == 16'd1 && fine_type[1] == 16'h0800 && fine_on[1],
            $sformatf("fine region configured: ok %0d type %h on %b", n_fine_ok, fine_type[1], fine_on));
        chk(n_bypassed == 16'd1, "first packet bypassed region 1");
        chk(m_icap_words == 22, $sformatf("%0d words written to the configuration port", m_icap_words));
      end
    end
    chk(n_fine_fail == 0 && n_fine_ok == 1, "one fine configuration, no failure");
    // info read-back: stage 0 words 0 and 1 (first packet), stage 1 word 0
    info_read(1'b0, 0, v); chk(v == info0_w0, "stage 0 info word 0"); m_info++;
    info_read(1'b0, 1, v); chk(v == info0_w1, "stage 0 info word 1"); m_info++;
    info_read(1'b1, 0, v); chk(v == info1_w0, "stage 1 info word 0"); m_info++;
    hrd(32'h0 | 5'(FN_ICAP_LAST), r); chk(r == 32'h2000_0000 || r == 32'h0000_000D, "last configuration word");

    // ---- 3. coarse-grained chain ----
    chain_sel = 1; m_mode++;
    @(negedge clk); cfg_trig_v = 1; cfg_trig_etype = 16'h0001;
    @(negedge clk); cfg_trig_v = 0;
    while (n_coarse_done == 0) @(negedge clk);
    repeat (5) @(negedge clk);
    chk(coarse_type[0] == 16'h0800 && coarse_cfgd == 2'b01 && net_cfg == 12'h1F0, "processor 0 and switch configured");
    sb_on = 0;
    for (int t = 0; t < 3; t++) begin          // triggers processor 1, not scoreboarded
      pk.delete();
      for (int i = 0; i < 8; i++) pk.push_back(rnd64());
      pk[1][31:16] = 16'h0800;
      send_pkt(pk);
    end
    while (n_coarse_done < 2) @(negedge clk);
    repeat (400) @(negedge clk);
    chk(coarse_cfgd == 2'b11 && coarse_type[1] == 16'h0800 && net_cfg == 12'h210, "processor 1 and new switch setting");
    exp_q.delete(); sb_on = 1;
    p0 = info_wptr[0]; p1 = info_wptr[1];
    for (int t = 0; t < 14; t++) begin
      bit acc; logic [15:0] len;
      pk.delete();
      for (int i = 0; i < 8; i++) pk.push_back(rnd64());
      pk[1][31:16] = 16'h0800;
      len = 16'($urandom_range(0, 40)); pk[2][63:48] = len;
      acc = (len > 16'd20);
      if (!acc) m_clu_rej++;
      expect_from(pk, acc ? 4 : 2);
      send_pkt(pk);
      drain();
    end
    chk(int'(info_wptr[0]) == p0 + 14, "processor 0 dumped one word per packet");
    chk(int'(info_wptr[1]) == p1 + 14 - m_clu_rej, "processor 1 dumped one word per accepted packet");
    chk(n_coarse_cancel == 0, "no cancelled coarse flow");

    // ---- 4. chain blocked ----
    sb_on = 0; hold = 1;
    repeat (4) @(negedge clk);
    for (int i = 0; i < 60; i++) hwr({4'b0000, 1'b1, 1'b0, (i == 0), 1'b0, 3'd0, 21'h0}, $urandom);
    hrd(32'h0 | 5'(FN_FIFO_STATUS), r);
    if (r == ST_BLOCKED) m_blocked++;
    hold = 0;

    $display("bypass %0d stall %0d fine-cfg %0d cam-miss %0d coarse-cfg %0d net-set %0d proc-prog %0d clu-reject %0d mode %0d info %0d ddr-rb %0d blocked %0d port-words %0d",
             n_bypassed, m_stall, n_fine_ok, m_cam_miss, n_coarse_done, m_net_we, m_sup_prog, m_clu_rej, m_mode, m_info, m_ddr_rb, m_blocked, m_icap_words);
    chk(n_bypassed > 0, "mechanism: bypass");
    chk(m_stall > 0, "mechanism: output stall");
    chk(n_fine_ok > 0, "mechanism: fine reconfiguration");
    chk(m_cam_miss > 0, "mechanism: CAM miss");
    chk(n_coarse_done > 1, "mechanism: coarse programming");
    chk(m_net_we > 1, "mechanism: interconnect setting");
    chk(m_sup_prog > 1, "mechanism: processor programming");
    chk(m_clu_rej > 0, "mechanism: CLU reject");
    chk(m_mode > 0, "mechanism: chain switch");
    chk(m_info > 0, "mechanism: info read-back");
    chk(m_ddr_rb > 0, "mechanism: DDR2 read-back");
    chk(m_blocked > 0, "mechanism: chain blocked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
