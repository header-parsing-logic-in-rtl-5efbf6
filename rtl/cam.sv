// EtherType content-addressable memory (CAM).
//
// Holds up to DEPTH EtherTypes, each with a valid bit. A lookup compares the
// key with all entries in parallel in one cycle and returns the lowest
// matching index; the reconfiguration controllers turn that index into the
// external-memory location of the matching parser configuration. Entries
// are written through a simple write port (we, waddr, wdata, wvalid).
// Timing: the lookup result (hit, idx) is registered, one cycle after
// lookup_v. The CAM's role (EtherType in, address out, miss = unsupported
// type) follows the reconfiguration description; the depth, the write port
// and the priority rule are this design's.
module cam #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned KW    = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [KW-1:0] wdata,
  input  logic          wvalid,
  input  logic          lookup_v,
  input  logic [KW-1:0] key,
  output logic          res_v,
  output logic          hit,
  output logic [AW-1:0] idx
);
  logic [KW-1:0]    ent [DEPTH];
  logic [DEPTH-1:0] vld;
  logic             hit_c;
  logic [AW-1:0]    idx_c;

  always_comb begin
    hit_c = 1'b0;
    idx_c = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (vld[i] && ent[i] == key) begin
        hit_c = 1'b1;
        idx_c = AW'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld   <= '0;
      res_v <= 1'b0;
      hit   <= 1'b0;
      idx   <= '0;
    end else begin
      if (we) vld[waddr] <= wvalid;
      res_v <= lookup_v;
      if (lookup_v) begin
        hit <= hit_c;
        idx <= idx_c;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (we) ent[waddr] <= wdata;
  end
endmodule
