// Behavioural model of the DDR2 memory controller core's application port,
// with the memory behind it, for testbenches only (not synthesizable
// logic; the real controller core is a vendor core).
// Write: af_wren with af_cmd = 0 takes the address (in 256-bit words) and,
// with wdf_wren, the low 128-bit half; the next wdf_wren gives the high
// half. wdf_mask has one bit per byte of the half, 1 = byte not written.
// Read: af_wren with af_cmd = 1; after LAT cycles the 256-bit word comes
// back as two rd_valid beats, low half first. Reads are served in order.
// Unwritten words read as zero. n_wr / n_rd count accesses.
module ddr2_model #(
  parameter int unsigned ADDR_W = 30,
  parameter int unsigned LAT    = 8
) (
  input  logic              clk,
  input  logic              af_wren,
  input  logic              af_cmd,
  input  logic [ADDR_W-1:0] af_addr,
  input  logic              wdf_wren,
  input  logic [127:0]      wdf_data,
  input  logic [15:0]       wdf_mask,
  output logic              rd_valid,
  output logic [127:0]      rd_data
);
  logic [255:0] mem [int];
  logic [ADDR_W-1:0] waddr = '0;
  bit          second = 0;
  int          n_wr = 0, n_rd = 0;
  logic [255:0] rq [$];
  int           rt [$];
  int           cyc = 0;
  bit           hi_pending = 0;
  logic [127:0] hi_q = '0;

  initial begin rd_valid = 0; rd_data = '0; end

  function automatic logic [255:0] peek(input int a);
    return mem.exists(a) ? mem[a] : 256'h0;
  endfunction

  task automatic poke(input int a, input logic [255:0] v);
    mem[a] = v;
  endtask

  function automatic logic [127:0] merge(input logic [127:0] old, input logic [127:0] nw,
                                         input logic [15:0] m);
    logic [127:0] r;
    for (int b = 0; b < 16; b++) r[8*b +: 8] = m[b] ? old[8*b +: 8] : nw[8*b +: 8];
    return r;
  endfunction

  always @(posedge clk) begin
    logic [255:0] w;
    cyc <= cyc + 1;
    if (af_wren && af_cmd) begin
      rq.push_back(peek(int'(af_addr)));
      rt.push_back(cyc + LAT);
      n_rd <= n_rd + 1;
    end
    if (wdf_wren) begin
      if (af_wren && !af_cmd) begin
        waddr = af_addr;
        w = peek(int'(af_addr));
        w[127:0] = merge(w[127:0], wdf_data, wdf_mask);
        mem[int'(af_addr)] = w;
        second = 1;
      end else if (second) begin
        w = peek(int'(waddr));
        w[255:128] = merge(w[255:128], wdf_data, wdf_mask);
        mem[int'(waddr)] = w;
        second = 0;
        n_wr <= n_wr + 1;
      end
    end
    // read return, two beats
    rd_valid <= 1'b0;
    if (hi_pending) begin
      rd_valid <= 1'b1; rd_data <= hi_q; hi_pending = 0;
    end else if (rq.size() != 0 && rt[0] <= cyc) begin
      w = rq.pop_front(); void'(rt.pop_front());
      rd_valid <= 1'b1; rd_data <= w[127:0];
      hi_q = w[255:128]; hi_pending = 1;
    end
  end
endmodule
