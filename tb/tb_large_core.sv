// Self-checking testbench for the large coarse parser core (large_core).
// Configures an IPv4-like check: the type field in beat 1 bits 31:16 must
// be 0x0800 (unless IG masks the check), V1 = bits 11:8 of beat 1 (header
// length), V2 = bits 63:48 of beat 2 (packet length); the CLU requires
// V1 < V2, V1 > SetValue1 (4) and V1 < SetValue2 (16). The group R is bits
// 63:32 of beat 3. Random packets; the expected accept/reject decision and
// info word are worked out here directly from the beats. Also checks the
// strip count (last field beat + 1 = 4). One beat per clock.
module tb_large_core;
  import hp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [CFG_W-1:0] cfg;
  logic clear = 0, beat_p = 0, beat_v = 0;
  logic [63:0] beat = '0;
  logic [8:0] strip;
  logic err_now, err, done, info_vld, etype_vld;
  logic [INFO_W-1:0] info;
  logic [INFOL_W-1:0] info_len;
  logic [15:0] etype;
  int checks = 0, failures = 0;
  large_cfg_t lc;

  large_core dut (.clk, .rst_n, .cfg, .clear, .beat_p, .beat_v, .beat, .strip,
                  .err_now, .err, .done, .info_vld, .info, .info_len, .etype_vld, .etype);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  int n_info = 0;
  logic [INFO_W-1:0] got_info = '0; logic [INFOL_W-1:0] got_len = '0;
  always @(posedge clk) if (info_vld) begin n_info++; got_info = info; got_len = info_len; end

  initial begin
    logic [63:0] b [4];
    int n_acc = 0, n_rej = 0;
    lc = '0;
    lc.ethertype = 16'h0800; lc.ec = 2'd1; lc.ethshift = 6'd16; lc.ethwidth = 6'd16;
    lc.v1 = '{count: 3'd1, shift: 6'd8,  width: 6'd4};
    lc.v2 = '{count: 3'd2, shift: 6'd48, width: 6'd16};
    lc.rs = '{count: 3'd3, shift: 6'd32, width: 6'd32};
    lc.re = '{count: 3'd3, shift: 6'd32, width: 6'd32};
    lc.setval1 = 16'd4; lc.setval2 = 11'd16;
    lc.cluop = 6'b01_11_01;      // V1<SetValue2, V1>SetValue1, V1<V2
    lc.pid = 4'd2;
    cfg = CFG_W'(lc);
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk);
    chk(strip == 9'd4, "strip = last field beat + 1");
    for (int t = 0; t < 300; t++) begin
      logic [3:0] ihl; logic [15:0] len; bit tmatch, ok; int ni;
      lc.ig = ($urandom_range(0, 3) == 0);
      cfg = CFG_W'(lc);
      for (int i = 0; i < 4; i++) b[i] = {$urandom, $urandom};
      tmatch = ($urandom_range(0, 3) != 0);
      b[1][31:16] = tmatch ? 16'h0800 : 16'($urandom_range(0, 16'h07FF));
      ihl = 4'($urandom_range(3, 15));
      len = 16'($urandom_range(0, 20));
      b[1][11:8] = ihl; b[2][63:48] = len;
      ok = (tmatch || lc.ig) && (16'(ihl) < len) && (ihl > 4'd4);
      ni = n_info;
      for (int i = 0; i < 4; i++) begin
        @(negedge clk); clear = (i == 0); beat_p = 1; beat_v = 1; beat = b[i];
      end
      @(negedge clk); clear = 0; beat_p = 0; beat_v = 0;
      repeat (2) @(negedge clk);
      chk(n_info == ni + (ok ? 1 : 0), $sformatf("accept decision t=%0d ihl=%0d len=%0d tm=%0b ig=%0b", t, ihl, len, tmatch, lc.ig));
      if (ok) begin
        n_acc++;
        chk(got_info == INFO_W'(b[3][63:32]) && got_len == 9'd32, "info R");
      end else begin
        n_rej++;
        chk(err, "err after a failed check");
      end
    end
    chk(n_acc > 20 && n_rej > 20, "both outcomes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
