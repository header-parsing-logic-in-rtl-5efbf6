// Self-checking testbench for the DDR2 client clock crossing
// (ddr2_client_cdc). Client clock 5 ns, memory clock 4 ns.
// The client issues 300 reads one at a time, as the configuration
// controllers do: it raises rd_req with a random address, drops it after
// rd_ack and waits for two beats. On the memory side a model acknowledges a
// request after 0..3 cycles and returns two beats derived from the address
// (address and beat number in every 32-bit word) after 1..8 cycles, with a
// 0..2 cycle gap between them. Checks: every address arrives once and in
// order, and the client gets both beats of each read, in order, with the
// right data.
module tb_ddr2_client_cdc;
  logic clk = 0, rst_n = 0, mclk = 0, mrst_n = 0;
  logic rd_req = 0, rd_ack, rd_valid;
  logic [29:0] rd_addr = '0;
  logic [127:0] rd_data;
  logic m_req, m_ack = 0, m_valid = 0;
  logic [29:0] m_addr;
  logic [127:0] m_data = '0;
  int checks = 0, failures = 0;

  ddr2_client_cdc #(.ADDR_W(30)) dut (.*);

  always #2.5 clk = ~clk;
  always #2 mclk = ~mclk;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic logic [127:0] beat(input logic [29:0] a, input int h);
    return {4{2'(h), a}};
  endfunction

  logic [29:0] seen[$];
  initial begin
    forever begin
      @(negedge mclk);
      if (m_req) begin
        logic [29:0] a;
        repeat ($urandom_range(0, 3)) @(negedge mclk);
        a = m_addr; seen.push_back(a);
        m_ack = 1;
        @(negedge mclk); m_ack = 0;
        repeat ($urandom_range(1, 8)) @(negedge mclk);
        m_valid = 1; m_data = beat(a, 0);
        @(negedge mclk); m_valid = 0;
        repeat ($urandom_range(0, 2)) @(negedge mclk);
        m_valid = 1; m_data = beat(a, 1);
        @(negedge mclk); m_valid = 0;
      end
    end
  end

  logic [127:0] got[$];
  always @(posedge clk) if (rst_n && rd_valid) got.push_back(rd_data);

  initial begin
    logic [29:0] sent[$];
    repeat (4) @(negedge mclk); mrst_n = 1; rst_n = 1;
    repeat (4) @(negedge clk);
    for (int t = 0; t < 300; t++) begin
      int w;
      got.delete();
      @(negedge clk); rd_req = 1; rd_addr = 30'($urandom);
      sent.push_back(rd_addr);
      #1; while (!rd_ack) begin @(negedge clk); #1; end
      @(negedge clk); rd_req = 0;
      w = 0;
      while (got.size() < 2 && w < 200) begin @(negedge clk); w++; end
      chk(got.size() == 2, $sformatf("read %0d: %0d beats", t, got.size()));
      if (got.size() == 2) begin
        chk(got[0] == beat(sent[t], 0), "low beat");
        chk(got[1] == beat(sent[t], 1), "high beat");
      end
    end
    repeat (20) @(negedge clk);
    chk(seen.size() == sent.size(), "request count");
    for (int i = 0; i < sent.size() && i < seen.size(); i++) chk(seen[i] == sent[i], "address order");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
