// Self-checking testbench for the EtherType CAM (cam, 8 entries).
// Random writes (including invalidations and duplicate keys) are mirrored
// in a reference array; random lookups, half of them of keys known to be
// stored, must return hit and the lowest matching index one cycle after
// lookup_v, with res_v. Lookups of absent keys must miss.
module tb_cam;
  logic clk = 0, rst_n = 0;
  logic we = 0, wvalid = 0, lookup_v = 0;
  logic [2:0] waddr = '0, idx;
  logic [15:0] wdata = '0, key = '0;
  logic res_v, hit;
  int checks = 0, failures = 0;

  cam #(.DEPTH(8), .KW(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] m_key [8];
  bit          m_v   [8];

  initial begin
    int n_hit = 0, n_miss = 0, n_dup = 0;
    foreach (m_v[i]) begin m_v[i] = 0; m_key[i] = '0; end
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      if ($urandom_range(0, 2) == 0) begin
        int a; a = $urandom_range(0, 7);
        we = 1; waddr = 3'(a); wvalid = ($urandom_range(0, 4) != 0);
        wdata = 16'($urandom_range(0, 11));   // small key space: duplicates occur
        m_v[a] = wvalid; m_key[a] = wdata;
        @(negedge clk); we = 0;
      end else begin
        bit e_hit; int e_idx, cnt;
        key = ($urandom_range(0, 1) == 0) ? 16'($urandom_range(0, 11)) : 16'($urandom);
        e_hit = 0; e_idx = 0; cnt = 0;
        for (int i = 7; i >= 0; i--) if (m_v[i] && m_key[i] == key) begin e_hit = 1; e_idx = i; cnt++; end
        lookup_v = 1;
        @(negedge clk); lookup_v = 0;
        checks++;
        if (!res_v || hit != e_hit || (e_hit && idx != 3'(e_idx))) begin
          failures++;
          if (failures < 10) $display("FAIL key %h exp %0b/%0d got %0b/%0d", key, e_hit, e_idx, hit, idx);
        end
        if (e_hit) n_hit++; else n_miss++;
        if (cnt > 1) n_dup++;
      end
    end
    checks++; if (n_hit < 100 || n_miss < 100 || n_dup < 20) begin failures++; $display("FAIL coverage"); end
    $display("hits %0d misses %0d duplicate matches %0d", n_hit, n_miss, n_dup);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
