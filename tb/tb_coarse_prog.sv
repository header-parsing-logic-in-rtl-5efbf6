// Self-checking testbench for the coarse parser programmer (coarse_prog).
// Sends configuration flows with random gaps in d_v:
//   A: switch utility packet (op 1), image utility packet (op 0, length n),
//      n image chunks  -> chunks broadcast in order, switch set, done
//   B: image utility packet and images only -> chunks, no switch write, done
//   C: a first chunk that is not a utility packet -> cancel, nothing out
//   D: two switch packets in a row -> cancel, no switch write
// The expected chunk sequence and switch value are known from what was
// sent. Also checks that sup_prog is high whenever a chunk is offered and
// low again after the flow.
module tb_coarse_prog;
  import hp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start = 0, d_v = 0;
  logic [63:0] d = '0;
  logic busy, done, cancel, sup_prog, prog_v, net_we;
  logic [63:0] prog_data;
  logic [11:0] net_cfg;
  int checks = 0, failures = 0;

  coarse_prog dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  logic [63:0] got_q[$];
  int n_done = 0, n_cancel = 0, n_netwe = 0, n_noprog = 0;
  logic [11:0] last_net = '0;
  always @(posedge clk) if (rst_n) begin
    if (prog_v) begin got_q.push_back(prog_data); if (!sup_prog) n_noprog++; end
    if (done) n_done++;
    if (cancel) n_cancel++;
    if (net_we) begin n_netwe++; last_net = net_cfg; end
  end

  task automatic put(input logic [63:0] v);
    @(negedge clk);
    while ($urandom_range(0, 2) == 0) begin d_v = 0; @(negedge clk); end
    d_v = 1; d = v;
    @(negedge clk); d_v = 0;
  endtask

  function automatic logic [63:0] util(input logic [3:0] op, input logic [11:0] arg);
    return {32'($urandom), arg, op, 16'hFFFF};
  endfunction

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int kind, n, d0, c0, w0;
      logic [11:0] sw;
      logic [63:0] img[$];
      kind = t % 4; n = $urandom_range(1, 8); sw = 12'($urandom);
      d0 = n_done; c0 = n_cancel; w0 = n_netwe; got_q.delete(); img.delete();
      for (int i = 0; i < n; i++) img.push_back({$urandom, $urandom});
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      case (kind)
        0: begin put(util(UOP_SWITCH, sw)); put(util(UOP_BITSTREAM, 12'(n)));
                 foreach (img[i]) put(img[i]); end
        1: begin put(util(UOP_BITSTREAM, 12'(n))); foreach (img[i]) put(img[i]); end
        2: begin put({$urandom, 32'h0000_0800}); foreach (img[i]) put(img[i]); end
        default: begin put(util(UOP_SWITCH, sw)); put(util(UOP_SWITCH, sw));
                 foreach (img[i]) put(img[i]); end
      endcase
      repeat (4) @(negedge clk);
      chk(!busy && !sup_prog, "idle after flow");
      if (kind < 2) begin
        chk(n_done == d0 + 1 && n_cancel == c0, "done once");
        chk(got_q.size() == n, $sformatf("chunk count %0d exp %0d", got_q.size(), n));
        for (int i = 0; i < n && i < got_q.size(); i++) chk(got_q[i] == img[i], "chunk data");
        if (kind == 0) chk(n_netwe == w0 + 1 && last_net == sw, "switch configuration written");
        else           chk(n_netwe == w0, "no switch write");
      end else begin
        chk(n_cancel == c0 + 1 && n_done == d0, "cancel once");
        chk(got_q.size() == 0, "no chunks on cancel");
        chk(n_netwe == w0, "no switch write on cancel");
      end
    end
    chk(n_noprog == 0, "sup_prog high with every chunk");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
