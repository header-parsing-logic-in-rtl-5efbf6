// Workload testbench for the fine-grained reconfiguration path: the
// configuration-port controller (icap_ctrl) at its default sizes (4096-word
// slots of 256 bits, at most 4096 reads, 1024-cycle timeout) moving
// bitstreams of the sizes the fine-grained architecture is evaluated with.
//   slot 0: the smallest reconfigurable frame, 5904 bytes = 1476 words
//   slot 1: a parser-region partial bitstream of 88000 bytes = 22000 words
//           (2750 reads), the size implied by the reported configuration
//           time of 55e3 cycles at about 20 cycles per 256-bit read
//   slot 2: a stream with no end sequence, standing in for an image larger
//           than a slot (a full-device bitstream): the controller must stop
//           at 4096 reads (128 KB), time out and report a failure
// Each bitstream ends with the DESYNC sequence 0x30008001, 0x0000000D. The
// memory model computes every 32-bit word from its slot and index (a
// multiplicative hash), so no table is stored; it acknowledges a read
// after one cycle and returns the two 128-bit beats 8 cycles later. The
// port receives every word, bit-reversed within its bytes, in order; the
// read count is ceil(words/8); cfg_set and n_ok/n_fail are checked. The
// testbench prints the measured throughput and checks it against a bound
// worked out from the clocks: per 256-bit read, 8 port cycles (10 ns each)
// plus at most 40 memory cycles (5 ns each) of request, latency and
// clock-crossing overhead.
module tb_fine_workload;
  logic clk = 0, rst_n = 0, icap_clk = 0, icap_rst_n = 0;
  logic cam_we = 0, cam_wvalid = 0;
  logic [3:0] cam_waddr = '0;
  logic [15:0] cam_wdata = '0;
  logic trig_v = 0; logic [15:0] trig_etype = '0, next_type = '0;
  logic cfg_start, cfg_set; logic [15:0] cfg_etype;
  logic rd_req, rd_ack = 0, rd_valid = 0;
  logic [29:0] rd_addr;
  logic [127:0] rd_data = '0;
  logic icap_ce_n, icap_wr_n;
  logic [31:0] icap_i, icap_o = 32'h0000_00DF, icap_last, status_q;
  logic busy;
  logic [15:0] n_ok, n_fail;
  int checks = 0, failures = 0;

  icap_ctrl dut (.*);

  always #2.5 clk = ~clk;
  always #5 icap_clk = ~icap_clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  localparam int SLOTW = 4096 * 8;            // 32-bit words per slot
  int slen [3] = '{1476, 22000, 0};            // 0: no end sequence

  // word i of the stream in slot k
  function automatic logic [31:0] sword(input int k, input int i);
    logic [31:0] w;
    if (slen[k] != 0 && i == slen[k] - 2) return 32'h3000_8001;
    if (slen[k] != 0 && i == slen[k] - 1) return 32'h0000_000D;
    w = (32'(i) + 32'(k) * 32'h0101_0000 + 32'd1) * 32'h9E37_79B1;
    if (w == 32'h3000_8001) w = 32'h0000_0001;
    return w;
  endfunction

  function automatic logic [255:0] mword(input logic [29:0] a);
    logic [255:0] v;
    int k, base;
    k = int'(a >> 12);
    base = int'(a[11:0]) * 8;
    for (int j = 0; j < 8; j++) v[32*j +: 32] = sword(k, base + j);
    return v;
  endfunction

  int nreads = 0;
  initial begin
    forever begin
      @(negedge clk);
      if (rd_req) begin
        logic [255:0] w;
        rd_ack = 1; nreads++;
        w = mword(rd_addr);
        @(negedge clk); rd_ack = 0;
        repeat (8) @(negedge clk);
        rd_valid = 1; rd_data = w[127:0];
        @(negedge clk); rd_data = w[255:128];
        @(negedge clk); rd_valid = 0;
      end
    end
  end

  function automatic logic [31:0] bswap(input logic [31:0] w);
    logic [31:0] r;
    for (int b = 0; b < 4; b++) for (int i = 0; i < 8; i++) r[8*b + i] = w[8*b + 7 - i];
    return r;
  endfunction

  // port words are checked as they arrive against the slot being loaded
  int cur = 0, nport = 0, nbad = 0;
  always @(posedge icap_clk) if (icap_rst_n && !icap_ce_n) begin
    if (icap_i != bswap(sword(cur, nport)) || icap_wr_n) nbad++;
    nport++;
  end
  int n_set = 0; logic [15:0] set_type = '0;
  always @(posedge clk) if (rst_n && cfg_set) begin n_set++; set_type = cfg_etype; end

  initial begin
    #30 rst_n = 1; icap_rst_n = 1;
    for (int k = 0; k < 3; k++) begin
      @(negedge clk); cam_we = 1; cam_wvalid = 1; cam_waddr = 4'(k); cam_wdata = 16'h0900 + 16'(k);
    end
    @(negedge clk); cam_we = 0;
    for (int k = 0; k < 3; k++) begin
      int r0, s0, o0, f0, words, reads;
      realtime t0, t1;
      cur = k; nport = 0; nbad = 0;
      r0 = nreads; s0 = n_set; o0 = n_ok; f0 = n_fail;
      @(negedge clk); trig_v = 1; trig_etype = 16'h0900 + 16'(k);
      t0 = $realtime;
      @(negedge clk); trig_v = 0;
      repeat (10) @(negedge clk);
      while (busy) @(negedge clk);
      t1 = $realtime;
      repeat (10) @(negedge clk);
      reads = nreads - r0;
      words = (slen[k] != 0) ? slen[k] : SLOTW;
      chk(nbad == 0, $sformatf("slot %0d: %0d port words differ", k, nbad));
      chk(nport == words, $sformatf("slot %0d: %0d port words, expected %0d", k, nport, words));
      chk(reads == (words + 7) / 8, $sformatf("slot %0d: %0d reads for %0d words", k, reads, words));
      if (slen[k] != 0) begin
        chk(n_set == s0 + 1 && set_type == 16'h0900 + 16'(k) && n_ok == 16'(o0 + 1), "configuration done");
        chk(icap_last == 32'h0000_000D, "last port word");
        chk(t1 - t0 < real'(reads) * (8.0 * 10.0 + 40.0 * 5.0) + 10000.0, "throughput bound");
        $display("slot %0d: %0d bytes in %0.0f ns, %0.1f MB/s, %0.1f memory cycles per read", k,
                 4 * words, t1 - t0, 4.0 * words * 1000.0 / (t1 - t0), (t1 - t0) / 5.0 / reads);
      end else begin
        chk(n_set == s0 && n_fail == 16'(f0 + 1), "oversized stream ends without cfg_set");
        $display("slot %0d: stopped after %0d reads (%0d bytes)", k, reads, 32 * reads);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
