// Self-checking testbench for the coarse parser processor (parser_proc),
// small-core variant with PID 1.
// 1. Programming: an image for PID 2 is sent first and must be ignored,
//    then the image for PID 1; the processor must report itself configured
//    with the image's EtherType and leave OFF only when sup_on is high.
// 2. Packets of 3 to 7 beats with random data and random output stalls
//    (tx_drdy low about a third of the time). A packet with the right type
//    must lose its first TotalCount = 2 beats; a packet with a wrong type
//    must be passed from the failing beat (beat 1) on. The expected output
//    stream, with its fresh start-of-packet and the original end-of-packet,
//    is kept in a queue and compared beat by beat. Info is checked too.
// 3. Switching sup_on low turns the processor OFF (no data taken).
module tb_parser_proc;
  import hp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic sup_on = 0, sup_prog = 0, prog_v = 0;
  logic [63:0] prog_data = '0;
  logic rx_srdy = 0, rx_drdy, tx_srdy, tx_drdy = 0;
  pbeat_t rx_beat = '0, tx_beat;
  logic info_vld, etype_vld, configured;
  logic [INFO_W-1:0] info; logic [INFOL_W-1:0] info_len;
  logic [15:0] etype, cfg_type;
  pstate_e state;
  int checks = 0, failures = 0;

  parser_proc #(.LARGE(1'b0), .PID(4'd1)) dut (.*);

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

  pbeat_t exp_q[$];
  logic [INFO_W-1:0] exp_info_q[$];
  int n_out = 0, n_stall = 0, n_info = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      tx_drdy <= ($urandom_range(0, 2) != 0);
      if (tx_srdy && !tx_drdy) n_stall++;
      if (tx_srdy && tx_drdy) begin
        pbeat_t e;
        n_out++;
        checks++;
        if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected beat"); end
        else begin
          e = exp_q.pop_front();
          if (tx_beat !== e) begin
            failures++;
            if (failures < 20) $display("FAIL beat %h/%b%b got %h/%b%b", e.data, e.sop, e.eop, tx_beat.data, tx_beat.sop, tx_beat.eop);
          end
        end
      end
      if (info_vld) begin
        n_info++;
        checks++;
        if (exp_info_q.size() == 0 || info !== exp_info_q.pop_front()) begin
          failures++; $display("FAIL info");
        end
      end
    end
  end

  task automatic prog(input small_cfg_t img);
    logic [127:0] v;
    v = 128'(img);
    @(negedge clk); prog_v = 1; prog_data = v[63:0];
    @(negedge clk); prog_v = 1; prog_data = v[127:64];
    @(negedge clk); prog_v = 0;
  endtask

  task automatic send(input pbeat_t b);
    // drive at the falling edge; the beat is taken at the next rising edge
    // if rx_drdy is high once the inputs have settled
    @(negedge clk);
    rx_srdy = 1; rx_beat = b;
    #1;
    while (!rx_drdy) begin @(negedge clk); #1; end
  endtask

  initial begin
    small_cfg_t img, other;
    img = '0;
    img.ethertype = 16'h88CC;
    img.eth = '{count: 4'd1, shift: 6'd16, width: 6'd16};
    img.rs1 = '{count: 4'd0, shift: 6'd16, width: 6'd48};
    img.re1 = '{count: 4'd0, shift: 6'd16, width: 6'd48};
    img.rs2 = '{count: 4'd1, shift: 6'd0, width: 6'd16};
    img.re2 = '{count: 4'd1, shift: 6'd0, width: 6'd16};
    img.total = 8'd2; img.pid = 4'd1; img.ig = 1'b0;
    img.enstate = PS_PASS; img.epstate = PS_IDLE;
    other = img; other.pid = 4'd2; other.ethertype = 16'h1234;
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk);
    chk(state == PS_OFF && !configured, "reset: off, unconfigured");
    sup_prog = 1; @(negedge clk);
    chk(state == PS_PROG, "programming state");
    prog(other);
    chk(!configured, "foreign PID ignored");
    prog(img);
    sup_prog = 0; @(negedge clk);
    chk(state == PS_INIT, "init after programming");
    @(negedge clk);
    chk(state == PS_OFF, "off while sup_on low");
    sup_on = 1; @(negedge clk);
    chk(state == PS_IDLE && configured && cfg_type == 16'h88CC, "idle, configured");
    for (int t = 0; t < 80; t++) begin
      int n; bit good; pbeat_t b[8];
      n = $urandom_range(3, 7);
      good = ($urandom_range(0, 2) != 0);
      for (int i = 0; i < n; i++) begin
        b[i] = '0; b[i].data = {$urandom, $urandom};
        b[i].sop = (i == 0); b[i].eop = (i == n - 1);
        b[i].sz = (i == n - 1) ? 3'($urandom) : 3'd0;
      end
      b[1].data[31:16] = good ? 16'h88CC : 16'h0800;
      for (int i = (good ? 2 : 1); i < n; i++) begin
        pbeat_t e; e = b[i]; e.sop = (i == (good ? 2 : 1)); exp_q.push_back(e);
      end
      if (good) exp_info_q.push_back(INFO_W'({b[0].data[63:16], b[1].data[15:0]}));
      for (int i = 0; i < n; i++) send(b[i]);
      @(negedge clk); rx_srdy = 0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    repeat (30) @(negedge clk);
    chk(exp_q.size() == 0, "all expected beats seen");
    chk(exp_info_q.size() == 0, "all expected info seen");
    chk(n_stall > 10, "output stalls exercised");
    sup_on = 0; @(negedge clk); @(negedge clk);
    rx_srdy = 1; rx_beat = '{data: 64'h1, sop: 1'b1, eop: 1'b1, sz: 3'd0};
    @(negedge clk);
    chk(state == PS_OFF && !rx_drdy, "off takes no data");
    rx_srdy = 0;
    $display("beats out %0d, stalls %0d, info %0d", n_out, n_stall, n_info);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
