// Dual-clock FIFO used for every crossing between clock domains.
//
// Writer and reader live in different clock domains and see only the FULL
// and EMPTY flags of their own side: a writer may write while full is low,
// a reader may read while empty is low. Pointers are kept in Gray code and
// passed to the other side through two flip-flops, so both flags are
// conservative (full and empty may stay raised a few cycles longer than
// needed, never too short). rdata shows the head entry whenever empty is
// low (first-word fall-through); rd pops it.
// DEPTH must be a power of two, at least 4. The FULL/EMPTY protocol comes from the
// clock-crossing description; the Gray-pointer structure and fall-through
// read port are this design's.
module async_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic         wclk,
  input  logic         wrst_n,
  input  logic         wr,
  input  logic [W-1:0] wdata,
  output logic         full,
  input  logic         rclk,
  input  logic         rrst_n,
  input  logic         rd,
  output logic [W-1:0] rdata,
  output logic         empty
);
  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wbin, wgray, rbin, rgray;
  logic [AW:0]  wq1, wq2, rq1, rq2;      // synchronised gray pointers
  logic [AW:0]  wbin_n, rbin_n;

  function automatic logic [AW:0] b2g(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write side
  assign wbin_n = wbin + (AW+1)'(wr && !full);
  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rq1 <= '0; rq2 <= '0;
    end else begin
      wbin  <= wbin_n;
      wgray <= b2g(wbin_n);
      rq1   <= rgray;
      rq2   <= rq1;
    end
  end
  always_ff @(posedge wclk) begin
    if (wr && !full) mem[wbin[AW-1:0]] <= wdata;
  end
  assign full = (wgray == {~rq2[AW:AW-1], rq2[AW-2:0]});

  // read side
  assign rbin_n = rbin + (AW+1)'(rd && !empty);
  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wq1 <= '0; wq2 <= '0;
    end else begin
      rbin  <= rbin_n;
      rgray <= b2g(rbin_n);
      wq1   <= wgray;
      wq2   <= wq1;
    end
  end
  assign empty = (rgray == wq2);
  assign rdata = mem[rbin[AW-1:0]];
endmodule
