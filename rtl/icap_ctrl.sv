// Configuration-port (ICAP) controller of the fine-grained chain.
//
// Rewrites the next parser region with a partial bitstream taken from
// external DDR2 memory. It has two halves in two clock domains.
//
// Parser/memory side (clk): the preceding stage's wrapper reports the
// EtherType of each packet (trig_v, trig_etype). If the next region is not
// already set up for it (next_type) the type is looked up in an EtherType
// CAM; a hit starts a configuration (cfg_start, which also puts the next
// region into bypass), a miss means "unsupported" and nothing happens. The
// CAM index selects a slot of 2**SLOT_LOG2 256-bit words. The bitstream is
// read one 256-bit word at a time (two 128-bit beats); each beat is split
// over four 32-bit lane FIFOs (bits 31:0 to lane 0 ... 127:96 to lane 3),
// the round-robin scheme that turns the wide, slow memory data into the
// narrow port's word stream. The next word is read only when the port side
// has written everything read so far, and only if it has not seen the end
// of the bitstream.
//
// Port side (icap_clk), the state machine of the controller:
//   Idle     -> DataWait   on cm (a CAM hit was signalled)
//   DataWait -> Idle       on tout (no data for TOUT cycles) or dfin (end)
//   DataWait -> Write1     when the lane FIFOs are not empty (fe low)
//   Write1..Write4         write lane 0..3 to the port (ce_n low), one
//                          word per cycle
//   Write4   -> Write1 if more data (fe low), -> DataWait if fe
// Port write is tied on (icap_wr_n = 0), ce_n is low only in a cycle that
// writes, and every word is bit-reversed within each byte (BITSWAP), the
// order the Virtex configuration port expects. Lane k is read in Write(k+1),
// so the lanes are served round robin. dfin is raised when the
// DESYNC command (0x30008001 followed by 0x0000000D, as stored in memory)
// has been written; words after it are dropped. icap_o is the port's
// status output and is kept in status_q; the last word written is kept in
// icap_last.
//
// When the port side returns to Idle the memory side ends the
// configuration: cfg_set with the new type if dfin was seen (cfg_ok), or a
// failed end (n_fail) on a timeout. The state machine, the CAM check, the
// four-lane round robin FIFOs and the "swap before writing" rule follow the
// controller's description; the DESYNC-based end detection, the handshake
// between the halves (Gray-coded beat counter) and the slot layout are this
// design's.
module icap_ctrl #(
  parameter int unsigned CAM_DEPTH = 16,
  parameter int unsigned ADDR_W    = 30,
  parameter int unsigned SLOT_LOG2 = 12,
  parameter int unsigned MAX_READS = 4096,
  parameter int unsigned TOUT      = 1024,
  parameter bit          BITSWAP   = 1'b1,
  localparam int unsigned CAW      = $clog2(CAM_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              icap_clk,
  input  logic              icap_rst_n,
  // CAM load
  input  logic              cam_we,
  input  logic [CAW-1:0]    cam_waddr,
  input  logic [15:0]       cam_wdata,
  input  logic              cam_wvalid,
  // trigger and target region
  input  logic              trig_v,
  input  logic [15:0]       trig_etype,
  input  logic [15:0]       next_type,
  output logic              cfg_start,
  output logic              cfg_set,
  output logic [15:0]       cfg_etype,
  // external memory read port
  output logic              rd_req,
  output logic [ADDR_W-1:0] rd_addr,
  input  logic              rd_ack,
  input  logic              rd_valid,
  input  logic [127:0]      rd_data,
  // configuration port (icap_clk)
  output logic              icap_ce_n,
  output logic              icap_wr_n,
  output logic [31:0]       icap_i,
  input  logic [31:0]       icap_o,
  output logic [31:0]       icap_last,
  output logic [31:0]       status_q,
  // status (clk)
  output logic              busy,
  output logic [15:0]       n_ok,
  output logic [15:0]       n_fail
);
  // ---------------- memory side (clk) ----------------
  typedef enum logic [2:0] {R_IDLE, R_LOOK, R_START, R_READ, R_WAIT, R_NEXT, R_END} r_e;
  r_e            rs;
  logic          res_v, hit, look;
  logic [CAW-1:0] idx;
  logic [15:0]   tgt_q;
  logic          half_q;
  logic [7:0]    pushed_q;           // beats pushed (binary)
  logic          start_tgl_q;
  logic [7:0]    wr_g1, wr_g2, wr_cnt_s; // port-side beat count, synchronised
  logic          done_s1, done_s2, fin_s1, fin_s2;
  logic [$clog2(MAX_READS+1)-1:0] nread;
  logic [3:0]    lane_full, lane_empty;
  // port-side state, declared here because the memory side samples it
  typedef enum logic [2:0] {W_IDLE, W_DWAIT, W_1, W_2, W_3, W_4} w_e;
  w_e          ws;
  logic        st1, st2, st3, cm;
  logic        fe, tout, dfin_q, sync_q, pw_idle_done;
  logic [7:0]  pw_cnt_q, pw_gray_q;
  logic [31:0]   lane_q [4];
  logic [3:0]    lane_pop;

  assign look = (rs == R_IDLE) && trig_v && trig_etype != next_type && trig_etype != 16'h0;
  assign busy = (rs != R_IDLE);

  cam #(.DEPTH(CAM_DEPTH), .KW(16)) u_cam (
    .clk, .rst_n, .we(cam_we), .waddr(cam_waddr), .wdata(cam_wdata),
    .wvalid(cam_wvalid), .lookup_v(look), .key(trig_etype), .res_v, .hit, .idx
  );

  function automatic logic [7:0] g2b(logic [7:0] g);
    logic [7:0] b;
    b[7] = g[7];
    for (int i = 6; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  assign wr_cnt_s = g2b(wr_g2);

  for (genvar k = 0; k < 4; k++) begin : g_lane
    async_fifo #(.W(32), .DEPTH(8)) u_lane (
      .wclk(clk), .wrst_n(rst_n), .wr(rs == R_WAIT && rd_valid), .wdata(rd_data[32*k +: 32]),
      .full(lane_full[k]), .rclk(icap_clk), .rrst_n(icap_rst_n), .rd(lane_pop[k]),
      .rdata(lane_q[k]), .empty(lane_empty[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs <= R_IDLE; tgt_q <= '0; half_q <= 1'b0; pushed_q <= '0; start_tgl_q <= 1'b0;
      rd_req <= 1'b0; rd_addr <= '0; cfg_start <= 1'b0; cfg_set <= 1'b0; cfg_etype <= '0;
      wr_g1 <= '0; wr_g2 <= '0; done_s1 <= 1'b0; done_s2 <= 1'b0; fin_s1 <= 1'b0; fin_s2 <= 1'b0;
      nread <= '0; n_ok <= '0; n_fail <= '0;
    end else begin
      wr_g1 <= pw_gray_q; wr_g2 <= wr_g1;
      done_s1 <= pw_idle_done; done_s2 <= done_s1;
      fin_s1 <= dfin_q; fin_s2 <= fin_s1;
      cfg_start <= 1'b0;
      cfg_set   <= 1'b0;
      unique case (rs)
        R_IDLE: if (look) begin
          rs    <= R_LOOK;
          tgt_q <= trig_etype;
        end
        R_LOOK: if (res_v) begin
          if (hit) begin
            rd_addr     <= ADDR_W'(idx) << SLOT_LOG2;
            cfg_start   <= 1'b1;
            start_tgl_q <= ~start_tgl_q;   // cm towards the port side
            pushed_q    <= '0;
            nread       <= '0;
            rs          <= R_START;
          end else begin
            rs <= R_IDLE;
          end
        end
        // wait until the port side has left Idle (its done flag drops)
        R_START: if (!done_s2) rs <= R_READ;
        R_READ: begin
          rd_req <= 1'b1;
          if (rd_req && rd_ack) begin
            rd_req <= 1'b0;
            half_q <= 1'b0;
            nread  <= nread + 1'b1;
            rs     <= R_WAIT;
          end
          if (done_s2) begin rd_req <= 1'b0; rs <= R_END; end
        end
        R_WAIT: if (rd_valid) begin
          assert (lane_full == 4'b0) else $error("icap_ctrl: lane FIFO overflow");
          pushed_q <= pushed_q + 8'd1;
          half_q   <= 1'b1;
          if (half_q) rs <= R_NEXT;
        end
        R_NEXT: begin
          if (done_s2) rs <= R_END;
          else if (wr_cnt_s == pushed_q) begin
            if (!fin_s2 && 32'(nread) < MAX_READS) begin
              rd_addr <= rd_addr + 1'b1;
              rs      <= R_READ;
            end
          end
        end
        R_END: begin
          if (fin_s2) begin
            cfg_set   <= 1'b1;
            cfg_etype <= tgt_q;
            n_ok      <= n_ok + 16'd1;
          end else begin
            n_fail <= n_fail + 16'd1;
          end
          rs <= R_IDLE;
        end
        default: rs <= R_IDLE;
      endcase
    end
  end

  // ---------------- port side (icap_clk) ----------------
  logic [$clog2(TOUT+1)-1:0] tcnt;
  logic [31:0] word, swapped;
  logic [1:0]  lane_sel;

  assign cm   = st2 ^ st3;
  assign fe   = lane_empty[0];
  assign tout = 32'(tcnt) >= TOUT;

  always_comb begin
    unique case (ws)
      W_1:     lane_sel = 2'd0;
      W_2:     lane_sel = 2'd1;
      W_3:     lane_sel = 2'd2;
      default: lane_sel = 2'd3;
    endcase
    word = lane_q[lane_sel];
    for (int b = 0; b < 4; b++)
      for (int i = 0; i < 8; i++)
        swapped[8*b + i] = BITSWAP ? word[8*b + 7 - i] : word[8*b + i];
  end

  // lane k is popped in Write(k+1), so by Write4 the empty flag of lane 0
  // already tells whether another round follows; lanes are flushed in Idle
  always_comb begin
    for (int k = 0; k < 4; k++)
      lane_pop[k] = !lane_empty[k] && ((ws == W_IDLE) || (ws != W_DWAIT && lane_sel == 2'(k)));
  end
  assign pw_idle_done = (ws == W_IDLE);
  assign icap_wr_n = 1'b0;

  always_ff @(posedge icap_clk or negedge icap_rst_n) begin
    if (!icap_rst_n) begin
      ws <= W_IDLE; st1 <= 1'b0; st2 <= 1'b0; st3 <= 1'b0;
      dfin_q <= 1'b0; sync_q <= 1'b0; pw_cnt_q <= '0; pw_gray_q <= '0; tcnt <= '0;
      icap_ce_n <= 1'b1; icap_i <= '0; icap_last <= '0; status_q <= '0;
    end else begin
      st1 <= start_tgl_q; st2 <= st1; st3 <= st2;
      status_q  <= icap_o;
      icap_ce_n <= 1'b1;
      unique case (ws)
        W_IDLE: if (cm) begin
          ws       <= W_DWAIT;
          dfin_q   <= 1'b0;
          sync_q   <= 1'b0;
          tcnt     <= '0;
          pw_cnt_q <= '0;
          pw_gray_q <= '0;
        end
        W_DWAIT: begin
          if (tout || dfin_q)  ws <= W_IDLE;
          else if (!fe) begin
            ws   <= W_1;
            tcnt <= '0;
          end else tcnt <= tcnt + 1'b1;
        end
        W_1, W_2, W_3, W_4: begin
          if (!dfin_q) begin
            icap_ce_n <= 1'b0;
            icap_i    <= swapped;
            icap_last <= word;
            sync_q    <= (word == 32'h3000_8001);
            if (sync_q && word == 32'h0000_000D) dfin_q <= 1'b1;
          end
          unique case (ws)
            W_1: ws <= W_2;
            W_2: ws <= W_3;
            W_3: ws <= W_4;
            default: begin
              pw_cnt_q  <= pw_cnt_q + 8'd1;
              pw_gray_q <= (pw_cnt_q + 8'd1) ^ ((pw_cnt_q + 8'd1) >> 1);
              ws        <= fe ? W_DWAIT : W_1;
            end
          endcase
        end
        default: ws <= W_IDLE;
      endcase
    end
  end
endmodule
