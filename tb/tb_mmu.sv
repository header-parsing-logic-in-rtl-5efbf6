// Self-checking testbench for the info-dump MMU (mmu, 2 stages, 32 words).
// Each stage gets random info words of random width (1 to 256 bits, the
// bits above the width cleared); a reference model stores them as 64-bit
// words, lowest first, at a running address that wraps. Checks:
//   - a dump of n words keeps the stage in Write for exactly n cycles and
//     advances its write pointer by n (ceil(width / 64), at least one);
//   - reads return the reference word one cycle after the stage goes to
//     Read; reads issued while the stage is still writing are held and
//     served afterwards (write wins);
//   - both stages dump at the same time without disturbing each other.
module tb_mmu;
  import hp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0] irdy = '0;
  logic [INFO_W-1:0] info [2];
  logic [INFOL_W-1:0] info_len [2];
  logic rd_req = 0, rd_sel = 0, rd_vld;
  logic [4:0] rd_addr = '0;
  logic [63:0] rd_data;
  logic [4:0] wptr [2];
  logic [1:0] writing;
  int checks = 0, failures = 0;

  mmu #(.NP(2), .DEPTH(32)) dut (.*);

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

  logic [63:0] ref_mem [2][32];
  int          ref_ptr [2];
  int          n_wcyc  [2];
  int n_held = 0, n_reads = 0, n_wrap = 0;
  always @(posedge clk) for (int p = 0; p < 2; p++) if (writing[p]) n_wcyc[p]++;

  function automatic logic [INFO_W-1:0] rnd_info(input int len);
    logic [INFO_W-1:0] v;
    for (int i = 0; i < 8; i++) v[32*i +: 32] = $urandom;
    if (len < INFO_W) v = v & ((INFO_W'(1) << len) - INFO_W'(1));
    return v;
  endfunction

  // returns the number of words the dump takes
  function automatic int dump_ref(input int p, input logic [INFO_W-1:0] v, input int len);
    int n;
    n = (len + 63) / 64; if (n == 0) n = 1;
    for (int j = 0; j < n; j++) begin
      ref_mem[p][ref_ptr[p] % 32] = v[64*j +: 64];
      ref_ptr[p]++;
    end
    return n;
  endfunction

  task automatic do_read(input int p, input int a, input bit held);
    @(negedge clk);
    rd_req = 1; rd_sel = 1'(p); rd_addr = 5'(a);
    @(negedge clk); rd_req = 0;
    for (int w = 0; w < 20 && !rd_vld; w++) @(negedge clk);
    n_reads++;
    if (held) n_held++;
    chk(rd_vld && rd_data == ref_mem[p][a], $sformatf("read stage %0d addr %0d", p, a));
    @(negedge clk);
  endtask

  initial begin
    info[0] = '0; info[1] = '0; info_len[0] = '0; info_len[1] = '0;
    ref_ptr[0] = 0; ref_ptr[1] = 0; n_wcyc[0] = 0; n_wcyc[1] = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int kind, p, len0, len1, n0, n1, c0, c1, pp;
      kind = $urandom_range(0, 2);
      len0 = $urandom_range(0, 256); len1 = $urandom_range(0, 256);
      @(negedge clk);
      c0 = n_wcyc[0]; c1 = n_wcyc[1];
      if (kind == 0) begin           // both stages at once
        info[0] = rnd_info(len0); info_len[0] = 9'(len0);
        info[1] = rnd_info(len1); info_len[1] = 9'(len1);
        n0 = dump_ref(0, info[0], len0); n1 = dump_ref(1, info[1], len1);
        irdy = 2'b11; @(negedge clk); irdy = '0;
        repeat (6) @(negedge clk);
        chk(n_wcyc[0] - c0 == n0 && n_wcyc[1] - c1 == n1, "write cycles = words");
        chk(int'(wptr[0]) == ref_ptr[0] % 32 && int'(wptr[1]) == ref_ptr[1] % 32, "write pointers");
      end else begin                 // one stage, with a read to it while it writes
        p = $urandom_range(0, 1);
        info[p] = rnd_info(len0); info_len[p] = 9'(len0);
        pp = ref_ptr[p];
        n0 = dump_ref(p, info[p], len0);
        irdy = 2'(1 << p); @(negedge clk); irdy = '0;
        if (pp >= 24) do_read(p, (pp - $urandom_range(5, 20)) % 32, 1'b1);
        else repeat (6) @(negedge clk);
      end
      if (ref_ptr[0] >= 32 && ref_ptr[1] >= 32) n_wrap = 1;
      // read a few settled words back
      for (int r = 0; r < 2; r++) begin
        p = $urandom_range(0, 1);
        if (ref_ptr[p] >= 24) do_read(p, (ref_ptr[p] - $urandom_range(1, 20)) % 32, 1'b0);
      end
    end
    chk(n_held > 20 && n_reads > 200 && n_wrap == 1, "coverage: held reads, reads, wrap");
    $display("reads %0d (held %0d)", n_reads, n_held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
