// Info-dump memory unit (MMU) of the parser chain status path.
//
// Each parser stage reports what it extracted from a packet on a wide info
// bus with a ready pulse (irdy) and a width in bits. For every stage the MMU
// runs its own three-state machine (Idle, Write, Read):
//   Idle  -> Write  on irdy: the info word and its width are latched; the
//                    width is turned into a count of 64-bit words
//                    (rounded up, at least one)
//   Write           each cycle the lowest 64 bits go to the stage's block
//                    RAM at the running address and the word shifts right
//                    by 64; when the count is reached (wfin) -> Idle, and
//                    the next dump starts where this one ended
//   Idle  -> Read   on a read request for this stage with no irdy (writes
//                    win); the RAM word is returned one cycle later with
//                    rd_vld.
// A read request (rd_req, rd_sel = stage, rd_addr) that arrives while the
// stage is writing is held until it is idle. Each stage has its own RAM of
// DEPTH 64-bit words; addresses wrap. wptr tells how many words have been
// written so far.
// The state machine, the divide-by-64 rule, the shift-out order, the
// separate RAMs and the write-over-read priority follow the MMU
// description; the RAM depth, the wrap-around and the held request are this
// design's.
module mmu
  import hp_pkg::*;
#(
  parameter int unsigned NP    = 2,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [NP-1:0]       irdy,
  input  logic [INFO_W-1:0]   info     [NP],
  input  logic [INFOL_W-1:0]  info_len [NP],
  input  logic                rd_req,
  input  logic [$clog2(NP)-1:0] rd_sel,
  input  logic [AW-1:0]       rd_addr,
  output logic                rd_vld,
  output logic [63:0]         rd_data,
  output logic [AW-1:0]       wptr     [NP],
  output logic [NP-1:0]       writing
);
  typedef enum logic [1:0] {M_IDLE, M_WRITE, M_READ} m_e;

  localparam int unsigned SW = $clog2(NP) > 0 ? $clog2(NP) : 1;

  logic               pend_q;
  logic [SW-1:0]      psel_q;
  logic [AW-1:0]      paddr_q;

  for (genvar p = 0; p < NP; p++) begin : g_stage
    m_e                 st;
    logic [INFO_W-1:0]  sh_q;
    logic [INFOL_W-1:0] n_q, cnt_q;
    logic [AW-1:0]      ptr_q;
    logic [63:0]        ram [DEPTH];
    logic [63:0]        rq;
    logic               rd_go, wfin;

    assign rd_go   = pend_q && psel_q == SW'(p) && st == M_IDLE && !irdy[p];
    assign wfin    = (cnt_q + 1'b1 >= n_q);
    assign wptr[p] = ptr_q;
    assign writing[p] = (st == M_WRITE);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        st <= M_IDLE; sh_q <= '0; n_q <= '0; cnt_q <= '0; ptr_q <= '0;
      end else begin
        unique case (st)
          M_IDLE: begin
            if (irdy[p]) begin
              sh_q  <= info[p];
              n_q   <= (info_len[p] == '0) ? INFOL_W'(1) : ((info_len[p] + INFOL_W'(63)) >> 6);
              cnt_q <= '0;
              st    <= M_WRITE;
            end else if (rd_go) begin
              st <= M_READ;
            end
          end
          M_WRITE: begin
            sh_q  <= sh_q >> 64;
            cnt_q <= cnt_q + 1'b1;
            ptr_q <= ptr_q + 1'b1;
            if (wfin) st <= M_IDLE;
          end
          M_READ:  st <= M_IDLE;
          default: st <= M_IDLE;
        endcase
      end
    end

    always_ff @(posedge clk) begin
      if (st == M_WRITE) ram[ptr_q] <= sh_q[63:0];
      if (rd_go)         rq <= ram[paddr_q];
    end
  end

  // request holding and return path
  logic [NP-1:0] go_v, rdn;
  logic [63:0]   rq_v [NP];
  for (genvar p = 0; p < NP; p++) begin : g_ret
    assign go_v[p] = g_stage[p].rd_go;
    assign rq_v[p] = g_stage[p].rq;
    assign rdn[p]  = (g_stage[p].st == M_READ);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_q <= 1'b0; psel_q <= '0; paddr_q <= '0; rd_vld <= 1'b0; rd_data <= '0;
    end else begin
      rd_vld <= 1'b0;
      if (|go_v) begin
        pend_q <= 1'b0;
      end
      if (rd_req && !pend_q) begin
        pend_q  <= 1'b1;
        psel_q  <= SW'(rd_sel);
        paddr_q <= rd_addr;
      end
      for (int p = 0; p < NP; p++) begin
        if (rdn[p]) begin
          rd_vld  <= 1'b1;
          rd_data <= rq_v[p];
        end
      end
    end
  end
endmodule
