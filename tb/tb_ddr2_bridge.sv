// Self-checking testbench for the DDR2 bridge (ddr2_bridge) against the
// behavioural DDR2 controller model (ddr2_model).
// MainBus side (21 ns clock): random 256-bit words are written as eight
// 32-bit commands each (32-bit word address 8w + i, so each 128-bit
// quarter-gather goes out as a masked two-cycle write); the memory content
// must then equal the reference exactly, which checks the gathering, the
// half selection by address bit 2 and the byte masks. MainBus reads must
// deliver bits 32k+31:32k of each half on lane k, low half first.
// Client side: both clients request random words at the same time as
// MainBus traffic; each must get its own word as two beats on its c_valid.
module tb_ddr2_bridge;
  logic clk = 0, rst_n = 0, mb_clk = 0, mb_rst_n = 0;
  logic dcmd_v = 0, dcmd_rd = 0, dcmd_full;
  logic [30:0] dcmd_addr = '0;
  logic [31:0] dcmd_data = '0;
  logic [3:0] lane_pop = '0, lane_empty;
  logic [31:0] lane_data [4];
  logic [1:0] c_req = '0, c_ack, c_valid;
  logic [29:0] c_addr [2];
  logic [127:0] c_data;
  logic af_wren, af_cmd, wdf_wren, rd_valid;
  logic [29:0] af_addr;
  logic [127:0] wdf_data, rd_data;
  logic [15:0] wdf_mask, n_wr, n_rd;
  int checks = 0, failures = 0;

  ddr2_bridge #(.NC(2), .ADDR_W(30)) dut (.*);
  ddr2_model #(.ADDR_W(30), .LAT(6)) u_mem (.clk, .af_wren, .af_cmd, .af_addr,
    .wdf_wren, .wdf_data, .wdf_mask, .rd_valid, .rd_data);

  always #2.5 clk = ~clk;
  always #10.5 mb_clk = ~mb_clk;

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  logic [255:0] ref_w [16];

  task automatic cmd(input bit rd, input logic [30:0] a, input logic [31:0] dd);
    @(negedge mb_clk);
    while (dcmd_full) @(negedge mb_clk);
    dcmd_v = 1; dcmd_rd = rd; dcmd_addr = a; dcmd_data = dd;
    @(negedge mb_clk); dcmd_v = 0;
  endtask

  // clients: random reads of words already written
  int c_ok [2];
  bit c_run = 0;
  for (genvar c = 0; c < 2; c++) begin : g_cl
    initial begin
      c_ok[c] = 0; c_addr[c] = '0;
      wait (c_run);
      while (c_run) begin
        int a; logic [255:0] got;
        @(negedge clk);
        a = $urandom_range(0, 15);
        c_addr[c] = 30'(a); c_req[c] = 1;
        @(posedge clk); while (!c_ack[c]) @(posedge clk);
        @(negedge clk); c_req[c] = 0;
        @(posedge clk); while (!c_valid[c]) @(posedge clk);
        got[127:0] = c_data;
        @(posedge clk);
        chk(c_valid[c], "second beat follows");
        got[255:128] = c_data;
        chk(got == ref_w[a], $sformatf("client %0d word %0d", c, a));
        c_ok[c]++;
        repeat ($urandom_range(0, 20)) @(negedge clk);
      end
    end
  end

  initial begin
    #40 rst_n = 1; mb_rst_n = 1;
    for (int w = 0; w < 16; w++) begin
      for (int i = 0; i < 8; i++) ref_w[w][32*i +: 32] = $urandom;
      for (int i = 0; i < 8; i++) cmd(1'b0, 31'(8 * w + i), ref_w[w][32*i +: 32]);
    end
    #2000;
    for (int w = 0; w < 16; w++) chk(u_mem.peek(w) == ref_w[w], $sformatf("memory word %0d", w));
    chk(u_mem.n_wr == 32, "two 128-bit writes per 256-bit word");
    c_run = 1;
    for (int t = 0; t < 30; t++) begin
      int w;
      w = $urandom_range(0, 15);
      cmd(1'b1, 31'(8 * w), 32'h0);
      for (int h = 0; h < 2; h++)
        for (int k = 3; k >= 0; k--) begin
          @(negedge mb_clk);
          while (lane_empty[k]) @(negedge mb_clk);
          chk(lane_data[k] == ref_w[w][128*h + 32*k +: 32], "lane data");
          lane_pop[k] = 1; @(negedge mb_clk); lane_pop = '0;
        end
    end
    c_run = 0;
    #2000;
    chk(c_ok[0] > 10 && c_ok[1] > 10, "both clients served");
    $display("client reads %0d %0d", c_ok[0], c_ok[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
