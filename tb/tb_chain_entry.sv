// Self-checking testbench for the parser chain entry controller
// (chain_entry). A queue stands in for the MainBus packet FIFO. Packets of
// random length (1 to 40 bytes) are cut into 32-bit words with SP on the
// first, EP and the byte count on the last. The expected 64-bit beats are
// built here: two words per beat, first word high, a lone last word in the
// upper half with zeros below, sop on the first beat, eop and a byte count
// (len mod 8, 0 = 8) on the last. The output is stalled at random; every
// beat must appear exactly once and in order, and n_beats must count them.
module tb_chain_entry;
  import hp_pkg::*;
  logic clk = 0, rst_n = 0;
  mbpkt_t pk_data;
  logic pk_empty, pk_rd, tx_srdy, tx_drdy = 0;
  pbeat_t tx_beat;
  logic [15:0] n_beats;
  int checks = 0, failures = 0;

  chain_entry dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  mbpkt_t fifo[$];
  pbeat_t exp_q[$];
  int n_out = 0, n_stall = 0;
  assign pk_empty = (fifo.size() == 0);
  assign pk_data  = pk_empty ? mbpkt_t'('0) : fifo[0];

  always @(posedge clk) if (rst_n) begin
    if (pk_rd && fifo.size() != 0) void'(fifo.pop_front());
    tx_drdy <= ($urandom_range(0, 2) != 0);
    if (tx_srdy && !tx_drdy) n_stall++;
    if (tx_srdy && tx_drdy) begin
      n_out++; checks++;
      if (exp_q.size() == 0 || tx_beat !== exp_q[0]) begin
        failures++;
        if (failures < 10) $display("FAIL got %h %b%b %0d", tx_beat.data, tx_beat.sop, tx_beat.eop, tx_beat.sz);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
  end

  initial begin
    int total = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int len, nw, nb;
      logic [31:0] w[10];
      len = $urandom_range(1, 40);
      nw = (len + 3) / 4; nb = (len + 7) / 8;
      for (int i = 0; i < nw; i++) begin
        mbpkt_t m;
        w[i] = $urandom;
        m.data = w[i]; m.sp = (i == 0); m.ep = (i == nw - 1);
        m.sz = (i == nw - 1) ? 3'(len % 4) : 3'd0;
        fifo.push_back(m);
      end
      for (int b = 0; b < nb; b++) begin
        pbeat_t e;
        e.data = {w[2*b], (2*b + 1 < nw) ? w[2*b+1] : 32'h0};
        e.sop = (b == 0); e.eop = (b == nb - 1);
        e.sz = (b == nb - 1) ? 3'(len % 8) : 3'd0;
        exp_q.push_back(e);
      end
      total += nb;
      while (fifo.size() > 6) @(negedge clk);
    end
    repeat (100) @(negedge clk);
    checks++; if (exp_q.size() != 0) begin failures++; $display("FAIL %0d beats missing", exp_q.size()); end
    checks++; if (int'(n_beats) != total) begin failures++; $display("FAIL n_beats"); end
    checks++; if (n_stall < 50) begin failures++; $display("FAIL few stalls"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
