// Self-checking testbench for the small coarse parser core (small_core).
// Loads a configuration image, then sends 4-beat packets with random data.
// The expected info word is built here by plain bit slicing of the beats
// (R1 = low 16 bits of beat 1, all of beat 2, top 16 bits of beat 3;
// R2 = bits 15:8 of beat 2), independently of the core's field arithmetic.
// Cases: matching type (info and etype returned once), mismatching type
// with IG = 0 (err_now in beat 1, nothing returned), mismatching type with
// IG = 1 (returned anyway), and the TotalCount to strip mapping.
// One beat per clock; info_vld is expected one clock after beat 3.
module tb_small_core;
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
  small_cfg_t sc;

  small_core dut (.clk, .rst_n, .cfg, .clear, .beat_p, .beat_v, .beat, .strip,
                  .err_now, .err, .done, .info_vld, .info, .info_len, .etype_vld, .etype);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int n_info, n_errnow;
  logic [INFO_W-1:0] got_info; logic [INFOL_W-1:0] got_len; logic [15:0] got_et;
  always @(posedge clk) begin
    if (info_vld) begin n_info++; got_info = info; got_len = info_len; end
    if (etype_vld) got_et = etype;
    if (err_now && beat_p) n_errnow++;
  end

  task automatic send(input logic [63:0] b [4]);
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      clear = (i == 0); beat_p = 1; beat_v = 1; beat = b[i];
    end
    @(negedge clk); clear = 0; beat_p = 0; beat_v = 0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    logic [63:0] b [4];
    logic [INFO_W-1:0] exp_info;
    sc = '0;
    sc.ethertype = 16'h0800;
    sc.eth = '{count: 4'd1, shift: 6'd16, width: 6'd16};
    sc.rs1 = '{count: 4'd1, shift: 6'd0,  width: 6'd16};
    sc.re1 = '{count: 4'd3, shift: 6'd48, width: 6'd16};
    sc.rs2 = '{count: 4'd2, shift: 6'd8,  width: 6'd8};
    sc.re2 = '{count: 4'd2, shift: 6'd8,  width: 6'd8};
    sc.total = 8'd2; sc.ig = 1'b0; sc.pid = 4'd1;
    cfg = CFG_W'(sc);
    n_info = 0; n_errnow = 0; got_info = '0; got_len = '0; got_et = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk);
    chk(strip == 9'd2, "strip = TotalCount");
    for (int t = 0; t < 60; t++) begin
      int mode;       // 0 match, 1 mismatch IG=0, 2 mismatch IG=1
      int ni, ne;
      mode = t % 3;
      sc.ig = (mode == 2);
      cfg = CFG_W'(sc);
      for (int i = 0; i < 4; i++) b[i] = {$urandom, $urandom};
      b[1][31:16] = (mode == 0) ? 16'h0800 : 16'h86DD;
      ni = n_info; ne = n_errnow;
      send(b);
      exp_info = INFO_W'({b[1][15:0], b[2], b[3][63:48], b[2][15:8]});
      if (mode == 1) begin
        chk(n_info == ni, "no info on a failed check");
        chk(n_errnow == ne + 1, "err_now once on the type beat");
        chk(err, "err held");
      end else begin
        chk(n_info == ni + 1, "one info per packet");
        chk(got_info == exp_info, $sformatf("info %h exp %h", got_info, exp_info));
        chk(got_len == 9'd104, "info length");
        chk(got_et == b[1][31:16], "etype");
        chk(n_errnow == ne, "no err_now");
      end
    end
    sc.total = 8'd0; cfg = CFG_W'(sc); @(negedge clk);
    chk(strip == 9'd1, "TotalCount 0 strips one beat");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
