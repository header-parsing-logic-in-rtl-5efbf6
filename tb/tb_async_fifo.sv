// Self-checking testbench for the dual-clock FIFO (async_fifo, 8 x 16 bit).
// Writer clock 10 ns, reader clock 13 ns (unrelated). The writer writes
// random data whenever full is low and a coin says so; the reader pops
// whenever empty is low and a coin says so. Every popped word must be the
// next word written (reference queue). The run is split into phases with a
// fast writer (the FIFO fills and full must be seen) and a fast reader (it
// drains and empty must be seen); writes while full are never attempted,
// and the final drain must return every word.
module tb_async_fifo;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wr = 0, rd = 0, full, empty;
  logic [15:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  int phase = 0;   // 0 writer fast, 1 reader fast, 2 drain

  async_fifo #(.W(16), .DEPTH(8)) dut (.*);

  always #5 wclk = ~wclk;
  always #6.5 rclk = ~rclk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] q[$];
  int n_wr = 0, n_rd = 0, n_full = 0, n_empty_after = 0, n_ovf = 0;

  always @(negedge wclk) if (wrst_n) begin
    if (full) n_full++;
    if (phase < 2 && !full && $urandom_range(0, 9) < (phase == 0 ? 9 : 3)) begin
      wr = 1; wdata = 16'($urandom); q.push_back(wdata); n_wr++;
    end else wr = 0;
  end

  always @(posedge wclk) if (wr && full) n_ovf++;

  always @(negedge rclk) if (rrst_n) begin
    if (!empty && rd == 0 && $urandom_range(0, 9) < (phase == 0 ? 3 : 9)) begin
      checks++;
      if (q.size() == 0 || rdata !== q[0]) begin
        failures++; if (failures < 10) $display("FAIL data %h", rdata);
      end
      if (q.size() != 0) void'(q.pop_front());
      rd = 1; n_rd++;
    end else rd = 0;
  end

  initial begin
    #33 wrst_n = 1; rrst_n = 1;
    for (int k = 0; k < 6; k++) begin
      phase = 0; #8000;
      phase = 1; #8000;
    end
    phase = 2; #3000;
    checks++; if (q.size() != 0) begin failures++; $display("FAIL %0d words left", q.size()); end
    checks++; if (!empty) begin failures++; $display("FAIL not empty at end"); end
    checks++; if (n_full < 50) begin failures++; $display("FAIL full never seen"); end
    checks++; if (n_ovf != 0) begin failures++; $display("FAIL write while full"); end
    $display("written %0d read %0d", n_wr, n_rd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
