// Self-checking testbench for the configuration-port controller (icap_ctrl)
// at reduced sizes (16-word slots, 16 reads at most, 64-cycle timeout).
// Memory clock 5 ns, port clock 10 ns. A small memory answers read
// requests after random delays with two 128-bit beats.
// Slot k holds a bitstream of 32-bit words: random words, then the end
// sequence 0x30008001, 0x0000000D, then filler; word i of the stream sits
// at bits 32(i mod 8)+31 : 32(i mod 8) of 256-bit word i div 8.
// Checks for each configuration:
//   - cfg_start at the start; the port receives exactly the stream up to
//     and including the end sequence, in order, each word bit-reversed
//     within its bytes, with ce_n low for exactly those words;
//   - reads = ceil(words / 8): no read after the end was seen;
//   - cfg_set with the triggering EtherType and n_ok at the end.
// Slot 3 has no end sequence: the controller must stop after 16 reads,
// time out and end with n_fail, without cfg_set. A CAM miss and a trigger
// for the type the next region already has must start nothing.
module tb_icap_ctrl;
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

  icap_ctrl #(.CAM_DEPTH(16), .ADDR_W(30), .SLOT_LOG2(4), .MAX_READS(16), .TOUT(64),
              .BITSWAP(1'b1)) dut (.*);

  always #2.5 clk = ~clk;
  always #5 icap_clk = ~icap_clk;

  initial begin
    #5000000;
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
        repeat ($urandom_range(0, 3)) @(negedge clk);
        rd_ack = 1; nreads++;
        w = mem[rd_addr[5:0]];
        @(negedge clk); rd_ack = 0;
        repeat ($urandom_range(1, 8)) @(negedge clk);
        rd_valid = 1; rd_data = w[127:0];
        @(negedge clk); rd_data = w[255:128];
        @(negedge clk); rd_valid = 0;
      end
    end
  end

  logic [31:0] port_q[$];
  int n_set = 0; logic [15:0] set_type = '0; int n_start = 0;
  always @(posedge icap_clk) if (icap_rst_n && !icap_ce_n) begin
    port_q.push_back(icap_i);
    checks++; if (icap_wr_n) begin failures++; $display("FAIL write strobe"); end
  end
  always @(posedge clk) if (rst_n) begin
    if (cfg_set) begin n_set++; set_type = cfg_etype; end
    if (cfg_start) n_start++;
  end

  function automatic logic [31:0] bswap(input logic [31:0] w);
    logic [31:0] r;
    for (int b = 0; b < 4; b++) for (int i = 0; i < 8; i++) r[8*b + i] = w[8*b + 7 - i];
    return r;
  endfunction

  logic [31:0] stream [4][128];
  int slen [4];

  initial begin
    for (int k = 0; k < 4; k++) begin
      int n;
      n = (k == 3) ? 128 : 5 + 23 * k + $urandom_range(0, 7);
      for (int i = 0; i < 128; i++) stream[k][i] = $urandom;
      for (int i = 0; i < 128; i++) if (stream[k][i] == 32'h3000_8001) stream[k][i] = 32'h1;
      if (k != 3) begin stream[k][n] = 32'h3000_8001; stream[k][n+1] = 32'h0000_000D; slen[k] = n + 2; end
      else slen[k] = 128;
      for (int i = 0; i < 128; i++) mem[16 * k + i / 8][32 * (i % 8) +: 32] = stream[k][i];
    end
    #30 rst_n = 1; icap_rst_n = 1;
    for (int k = 0; k < 4; k++) begin
      @(negedge clk); cam_we = 1; cam_wvalid = 1; cam_waddr = 4'(k); cam_wdata = 16'h0800 + 16'(k);
    end
    @(negedge clk); cam_we = 0;
    for (int t = 0; t < 8; t++) begin
      int k, r0, s0, o0, f0, st0;
      k = t % 4;
      port_q.delete(); r0 = nreads; s0 = n_set; o0 = n_ok; f0 = n_fail; st0 = n_start;
      @(negedge clk); trig_v = 1; trig_etype = 16'h0800 + 16'(k); next_type = 16'h0;
      @(negedge clk); trig_v = 0;
      repeat (10) @(negedge clk);
      while (busy) @(negedge clk);
      repeat (10) @(negedge clk);
      chk(n_start == st0 + 1, "cfg_start");
      if (k != 3) begin
        chk(port_q.size() == slen[k], $sformatf("slot %0d: %0d port words, expected %0d", k, port_q.size(), slen[k]));
        for (int i = 0; i < slen[k] && i < port_q.size(); i++) chk(port_q[i] == bswap(stream[k][i]), "port word");
        chk(nreads - r0 == (slen[k] + 7) / 8, $sformatf("reads %0d for %0d words", nreads - r0, slen[k]));
        chk(n_set == s0 + 1 && set_type == 16'h0800 + 16'(k) && n_ok == 16'(o0 + 1), "configuration done");
        chk(icap_last == 32'h0000_000D, "last port word");
      end else begin
        chk(nreads - r0 == 16 && port_q.size() == 128, "read limit reached");
        chk(n_set == s0 && n_fail == 16'(f0 + 1), "timeout ends without cfg_set");
      end
    end
    begin
      int st0; st0 = n_start;
      @(negedge clk); trig_v = 1; trig_etype = 16'h86DD; next_type = 16'h0;
      @(negedge clk); trig_etype = 16'h0801; next_type = 16'h0801;
      @(negedge clk); trig_v = 0;
      repeat (30) @(negedge clk);
      chk(n_start == st0, "miss or same type starts nothing");
    end
    chk(status_q == icap_o, "port status kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
