// Self-checking testbench for the MainBus interface (mainbus_if).
// Host clock 48 MHz-like (21 ns), parser clock 5 ns. Host transactions are
// issued by tasks; the parser side is modelled in the testbench. Checks:
//   - packet writes with SR set reach the parser side in order with their
//     SP/EP/SZ flags; status PASSED and LASTDATA follow each write;
//   - a write with SR clear is dropped with status DROPPED;
//   - with the parser side not reading, the FIFO fills and further writes
//     are dropped with status BLOCKED (a chain stall seen from the host);
//   - VERSION, ICAP_LAST and an unknown function (ABADC0DE);
//   - an info request (PR and RAM address) crosses to the parser side and
//     its 64-bit answer is read back as HI and LO halves;
//   - DDR2 writes and reads appear on the command port, and the four
//     special read addresses pop the matching read-back lane.
module tb_mainbus_if;
  import hp_pkg::*;
  logic mb_clk = 0, clk = 0, mb_rst_n = 0, rst_n = 0;
  logic mb_wr = 0, mb_rd = 0, mb_rvalid;
  logic [31:0] mb_addr = '0, mb_wdata = '0, mb_rdata;
  logic pk_rd = 0, pk_empty;
  mbpkt_t pk_data;
  logic nq_rd = 0, nq_empty, na_wr = 0;
  logic [9:0] nq_data;
  logic [63:0] na_data = '0;
  logic dcmd_v, dcmd_rd, dcmd_full = 0;
  logic [30:0] dcmd_addr;
  logic [31:0] dcmd_data;
  logic [3:0] lane_empty = '0, lane_pop;
  logic [31:0] lane_data [4];
  logic [31:0] icap_last = 32'hC0FF_EE01;
  int checks = 0, failures = 0;
  bit sink_on = 1;

  mainbus_if dut (.*);

  always #10.5 mb_clk = ~mb_clk;
  always #2.5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic hwr(input logic [31:0] a, input logic [31:0] d);
    @(negedge mb_clk); mb_wr = 1; mb_addr = a; mb_wdata = d;
    @(negedge mb_clk); mb_wr = 0;
  endtask

  task automatic hrd(input logic [31:0] a, output logic [31:0] d);
    @(negedge mb_clk); mb_rd = 1; mb_addr = a;
    @(negedge mb_clk); mb_rd = 0;
    d = mb_rdata;
    chk(mb_rvalid, "read valid one cycle later");
  endtask

  // parser side: pop packet words into a queue
  mbpkt_t got[$];
  always @(posedge clk) if (rst_n) begin
    if (pk_rd) got.push_back(pk_data);
  end
  always @(negedge clk) pk_rd = sink_on && !pk_empty;

  // DDR2 command capture
  logic [63:0] cmds[$];
  always @(posedge mb_clk) if (dcmd_v) cmds.push_back({dcmd_rd, dcmd_addr, dcmd_data});

  initial begin
    logic [31:0] r;
    mbpkt_t sent[$];
    for (int k = 0; k < 4; k++) lane_data[k] = 32'hA000_0000 + k;
    #50 mb_rst_n = 1; rst_n = 1;
    // packet words
    for (int i = 0; i < 30; i++) begin
      mbpkt_t m; logic [31:0] a;
      m.data = $urandom; m.sp = (i % 5 == 0); m.ep = (i % 5 == 4); m.sz = 3'($urandom_range(0, 4));
      a = {1'b0, 3'b000, 1'b1, 1'b0, m.sp, m.ep, m.sz, 21'h0};
      sent.push_back(m);
      hwr(a, m.data);
      hrd(32'h0000_0000 | 5'(FN_FIFO_STATUS), r); chk(r == ST_PASSED, "status passed");
      hrd(32'h0000_0000 | 5'(FN_FIFO_LASTDATA), r); chk(r == m.data, "last data");
    end
    #500;
    chk(got.size() == sent.size(), "all words crossed");
    foreach (got[i]) if (i < sent.size()) chk(got[i] == sent[i], "word and flags");
    // SR clear
    hwr(32'h0000_0000, 32'h1234_5678);
    hrd(32'h0 | 5'(FN_FIFO_STATUS), r); chk(r == ST_DROPPED, "SR clear -> dropped");
    #500; chk(got.size() == sent.size(), "dropped word not passed");
    // blocked chain
    sink_on = 0;
    for (int i = 0; i < 20; i++) hwr(32'h0800_0000, i);
    hrd(32'h0 | 5'(FN_FIFO_STATUS), r); chk(r == ST_BLOCKED, "full FIFO -> blocked");
    sink_on = 1; #1000;
    chk(got.size() > sent.size() + 10, "blocked FIFO drains after the stall");
    // version, icap, bad op
    hrd(32'h0 | 5'(FN_FIFO_VERSION), r); chk(r == 32'h0001_0000, "version");
    hrd(32'h0 | 5'(FN_ICAP_LAST), r); chk(r == icap_last, "icap last");
    hrd(32'h0000_001F, r); chk(r == ST_BADOP, "unknown op");
    hrd(32'h0 | 5'(FN_FIFO_STATUS), r); chk(r == ST_BADOP, "status after unknown op");
    // info request
    hrd({10'h0, 1'b1, 9'h155, 7'h0, 5'(FN_NSPI_REQRES)}, r); chk(r == ST_NSPI_OK, "info request status");
    #200;
    chk(!nq_empty && nq_data == {1'b1, 9'h155}, "request crossed");
    @(negedge clk); nq_rd = 1; @(negedge clk); nq_rd = 0;
    na_data = 64'hDEAD_BEEF_0123_4567; na_wr = 1; @(negedge clk); na_wr = 0;
    #300;
    hrd(32'h0 | 5'(FN_NSPI_READRES_HI), r); chk(r == 32'hDEAD_BEEF, "answer hi");
    hrd(32'h0 | 5'(FN_NSPI_READRES_LO), r); chk(r == 32'h0123_4567, "answer lo");
    // DDR2 path
    cmds.delete();
    hwr(32'h8000_0010, 32'h5555_AAAA);
    hrd(32'h8000_0020, r);
    chk(cmds.size() == 2, "two DDR2 commands");
    if (cmds.size() == 2) begin
      chk(cmds[0] == {1'b0, 31'h10, 32'h5555_AAAA}, "DDR2 write command");
      chk(cmds[1][63] == 1'b1 && cmds[1][62:32] == 31'h20, "DDR2 read command");
    end
    for (int k = 3; k >= 0; k--) begin
      logic [3:0] pops;
      @(negedge mb_clk); mb_rd = 1; mb_addr = 32'hFFFF_FFFC | k;
      #1 pops = lane_pop;
      @(negedge mb_clk); mb_rd = 0;
      chk(pops == 4'(1 << k) && mb_rdata == 32'hA000_0000 + k, "special address lane");
    end
    chk(cmds.size() == 2, "special reads are no DDR2 commands");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
