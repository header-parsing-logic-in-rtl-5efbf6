// Large coarse parser core: compare-and-extract engine with a comparator
// logic unit (CLU).
//
// Driven by a 128-bit configuration image (large_cfg_t). In beat EC it pulls
// the type field (EthShift, EthWidth) and compares it for equality with the
// stored EtherType; IG = 1 masks this first check off. It pulls two values
// V1 and V2 from the packet and runs the second check in the CLU: V1 is
// compared against V2, SetValue1 and SetValue2 as CLUOp selects (for IPv4:
// header length above one bound, below another and below the packet
// length). It returns one group R, from start field RS to end field RE, on
// the info bus, and the checked type field on etype. Either check failing
// raises err (err_now in the failing beat) and nothing is returned.
//
// Unlike the small core it has no TotalCount and no end-state fields: it
// consumes (strips) the beats up to and including the last one it reads a
// field from, and the processor always passes the rest and always goes idle
// on an early end. Timing and field packing are as in the small core
// (info_vld one cycle after the completing beat). The memory map, checks
// and CLU come from the core's description; the strip rule, the fact that
// a field whose beat index is unused is simply never read, and the 16-bit
// CLU operand width (the width of SetValue1) are this design's choices.
// Lint reports configuration bits 127:124 as unused: they hold the
// processor ID, which the processor matches before the image is loaded,
// so the core itself never reads them.
module large_core
  import hp_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [CFG_W-1:0]     cfg,
  input  logic                 clear,
  input  logic                 beat_p,
  input  logic                 beat_v,
  input  logic [PB_W-1:0]      beat,
  output logic [8:0]           strip,
  output logic                 err_now,
  output logic                 err,
  output logic                 done,
  output logic                 info_vld,
  output logic [INFO_W-1:0]    info,
  output logic [INFOL_W-1:0]   info_len,
  output logic                 etype_vld,
  output logic [15:0]          etype
);
  large_cfg_t c;
  assign c = large_cfg_t'(cfg);

  logic [7:0]         idx, idx_q;
  logic [INFO_W-1:0]  r_q, r_d;
  logic [INFOL_W-1:0] l_q, l_d;
  logic [15:0]        et_q, et_d, v1_q, v1_d, v2_q, v2_d;
  logic               err_d, done_d, clu_pass;
  logic [2:0]         last, vlast;
  logic [6:0]         w;

  function automatic logic [2:0] max3(logic [2:0] a, logic [2:0] b);
    return (a > b) ? a : b;
  endfunction

  assign vlast = max3(c.v1.count, c.v2.count);
  assign last  = max3(max3({1'b0, c.ec}, c.re.count), max3(vlast, c.rs.count));
  assign strip = 9'(last) + 9'd1;

  clu #(.W(16)) u_clu (
    .a (v1_d), .b0(v2_d), .b1(c.setval1), .b2(16'(c.setval2)),
    .op(c.cluop), .pass(clu_pass)
  );

  always_comb begin
    idx     = clear ? 8'd0 : idx_q;
    r_d     = clear ? '0 : r_q;
    l_d     = clear ? '0 : l_q;
    et_d    = clear ? '0 : et_q;
    v1_d    = clear ? '0 : v1_q;
    v2_d    = clear ? '0 : v2_q;
    err_d   = clear ? 1'b0 : err;
    done_d  = clear ? 1'b0 : done;
    err_now = 1'b0;
    w       = '0;
    if (beat_p && !done_d && !err_d) begin
      if (idx == {6'd0, c.ec}) begin
        et_d = 16'(fld_extract(beat, c.ethshift, c.ethwidth));
        if (!c.ig && et_d != c.ethertype) err_now = 1'b1;
      end
      if (idx == {5'd0, c.v1.count}) v1_d = 16'(fld_extract(beat, c.v1.shift, c.v1.width));
      if (idx == {5'd0, c.v2.count}) v2_d = 16'(fld_extract(beat, c.v2.shift, c.v2.width));
      if (idx == {5'd0, vlast} && !clu_pass) err_now = 1'b1;
      // return group R
      if (idx == {5'd0, c.rs.count}) begin
        w   = fld_len(c.rs.width);
        r_d = (r_d << w) | INFO_W'(fld_extract(beat, c.rs.shift, c.rs.width));
        l_d = l_d + INFOL_W'(w);
      end else if (c.re.count > c.rs.count && idx > {5'd0, c.rs.count}) begin
        if (idx < {5'd0, c.re.count}) begin
          r_d = (r_d << 64) | INFO_W'(beat);
          l_d = l_d + INFOL_W'(64);
        end else if (idx == {5'd0, c.re.count}) begin
          w   = fld_len(c.re.width);
          r_d = (r_d << w) | INFO_W'(fld_extract(beat, c.re.shift, c.re.width));
          l_d = l_d + INFOL_W'(w);
        end
      end
      err_d = err_now;
      if (idx >= {5'd0, last}) done_d = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx_q <= '0; r_q <= '0; l_q <= '0; et_q <= '0; v1_q <= '0; v2_q <= '0;
      err <= 1'b0; done <= 1'b0;
      info_vld <= 1'b0; info <= '0; info_len <= '0;
      etype_vld <= 1'b0; etype <= '0;
    end else begin
      info_vld  <= 1'b0;
      etype_vld <= 1'b0;
      if (beat_v) begin
        idx_q <= (beat_v && idx != 8'hFF) ? idx + 8'd1 : idx;
        r_q <= r_d; l_q <= l_d; et_q <= et_d; v1_q <= v1_d; v2_q <= v2_d;
        err <= err_d; done <= done_d;
        if (done_d && (clear || !done) && !err_d) begin
          info_vld  <= 1'b1;
          info      <= r_d;
          info_len  <= l_d;
          etype_vld <= 1'b1;
          etype     <= et_d;
        end
      end
    end
  end
endmodule
