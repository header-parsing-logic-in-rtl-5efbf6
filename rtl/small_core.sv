// Small coarse parser core: a programmable compare-and-extract engine.
//
// The core watches the 64-bit beats of one packet, numbered from 0 at the
// start of packet, and is driven by a 128-bit configuration image
// (small_cfg_t). At beat EthCount it pulls the type field (EthShift,
// EthWidth) and compares it for equality with the stored EtherType. It pulls
// up to two return groups R1 and R2; each group runs from a start field
// (RSn: count, shift, width) to an end field (REn); when the end lies in a
// later beat the whole beats in between are taken too, and when start and
// end lie in the same beat only the start field is used. Fields are packed
// MSB-first into the info word: info = {R1, R2}, right-aligned, with
// info_len giving its width in bits.
//
// IG = 1 makes the extraction unconditional: the type field is returned on
// etype and the groups on info whatever the type is. IG = 0 makes it
// conditional: a mismatch raises err (err_now in the failing beat) and
// nothing is returned. TotalCount is reported as 'strip', the number of
// leading beats the processor consumes; 0 is taken as 1.
//
// Timing: fields are captured on the clock edge of the beat that carries
// them; info_vld and etype_vld pulse one cycle after the beat that
// completes the last field. beat_p presents a beat (the checks are
// evaluated on it combinationally, so err_now can steer the handshake) and
// beat_v says it is taken this cycle; 'clear' marks the first beat of a new
// packet and restarts the core. The memory map, the field meanings, the single
// equality check and the IG switch are from the core's description; the
// field-to-info packing, "width 0 = 64 bits", the return of nothing on an
// early packet end and the group semantics in detail are this design's.
// Lint reports configuration bits 127:105 as unused: they hold the
// end-state fields and the processor ID, which the processor reads, not
// the core, and reserved bits.
module small_core
  import hp_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [CFG_W-1:0]     cfg,
  input  logic                 clear,     // first beat of a new packet
  input  logic                 beat_p,    // a beat of the packet is presented
  input  logic                 beat_v,    // ... and accepted this cycle
  input  logic [PB_W-1:0]      beat,
  output logic [8:0]           strip,     // leading beats to consume
  output logic                 err_now,   // check fails in this beat
  output logic                 err,       // check failed earlier
  output logic                 done,      // all fields captured
  output logic                 info_vld,
  output logic [INFO_W-1:0]    info,
  output logic [INFOL_W-1:0]   info_len,
  output logic                 etype_vld,
  output logic [15:0]          etype
);
  small_cfg_t c;
  assign c = small_cfg_t'(cfg);

  logic [7:0]         idx, idx_q;
  logic [INFO_W-1:0]  r1_q, r2_q, r1_d, r2_d;
  logic [INFOL_W-1:0] l1_q, l2_q, l1_d, l2_d;
  logic [15:0]        et_q, et_d;
  logic               err_d, done_d;
  logic [3:0]         last;

  function automatic logic [3:0] max4(logic [3:0] a, logic [3:0] b);
    return (a > b) ? a : b;
  endfunction

  assign strip = (c.total == 8'd0) ? 9'd1 : {1'b0, c.total};
  assign last  = max4(max4(c.eth.count, c.re1.count), max4(c.re2.count,
                 max4(c.rs1.count, c.rs2.count)));

  typedef struct packed {
    logic [INFO_W-1:0]  acc;
    logic [INFOL_W-1:0] len;
  } grp_t;

  // one return group: start field, whole middle beats, end field
  function automatic grp_t grp(logic [7:0] i, logic [63:0] b, fld_t s, fld_t e,
                               grp_t g);
    grp_t       r;
    logic [6:0] w;
    r = g;
    if (i == {4'd0, s.count}) begin
      w     = fld_len(s.width);
      r.acc = (g.acc << w) | INFO_W'(fld_extract(b, s.shift, s.width));
      r.len = g.len + INFOL_W'(w);
    end else if (e.count > s.count && i > {4'd0, s.count}) begin
      if (i < {4'd0, e.count}) begin
        r.acc = (g.acc << 64) | INFO_W'(b);
        r.len = g.len + INFOL_W'(64);
      end else if (i == {4'd0, e.count}) begin
        w     = fld_len(e.width);
        r.acc = (g.acc << w) | INFO_W'(fld_extract(b, e.shift, e.width));
        r.len = g.len + INFOL_W'(w);
      end
    end
    return r;
  endfunction

  always_comb begin
    idx     = clear ? 8'd0 : idx_q;
    r1_d    = clear ? '0 : r1_q;
    r2_d    = clear ? '0 : r2_q;
    l1_d    = clear ? '0 : l1_q;
    l2_d    = clear ? '0 : l2_q;
    et_d    = clear ? '0 : et_q;
    err_d   = clear ? 1'b0 : err;
    done_d  = clear ? 1'b0 : done;
    err_now = 1'b0;
    if (beat_p && !done_d && !err_d) begin
      if (idx == {4'd0, c.eth.count}) begin
        et_d = 16'(fld_extract(beat, c.eth.shift, c.eth.width));
        if (!c.ig && et_d != c.ethertype) err_now = 1'b1;
      end
      {r1_d, l1_d} = grp(idx, beat, c.rs1, c.re1, '{acc: r1_d, len: l1_d});
      {r2_d, l2_d} = grp(idx, beat, c.rs2, c.re2, '{acc: r2_d, len: l2_d});
      err_d = err_now;
      if (idx >= {4'd0, last}) done_d = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx_q <= '0; r1_q <= '0; r2_q <= '0; l1_q <= '0; l2_q <= '0;
      et_q <= '0; err <= 1'b0; done <= 1'b0;
      info_vld <= 1'b0; info <= '0; info_len <= '0;
      etype_vld <= 1'b0; etype <= '0;
    end else begin
      info_vld  <= 1'b0;
      etype_vld <= 1'b0;
      if (beat_v) begin
        idx_q <= (beat_v && idx != 8'hFF) ? idx + 8'd1 : idx;
        r1_q <= r1_d; r2_q <= r2_d; l1_q <= l1_d; l2_q <= l2_d;
        et_q <= et_d; err <= err_d; done <= done_d;
        if (done_d && (clear || !done) && !err_d) begin
          info_vld  <= 1'b1;
          info      <= (r1_d << l2_d) | r2_d;
          info_len  <= l1_d + l2_d;
          etype_vld <= 1'b1;
          etype     <= et_d;
        end
      end
    end
  end
endmodule
