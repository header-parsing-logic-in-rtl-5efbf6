// Comparator Logic Unit of the large coarse parser core.
//
// Three magnitude comparators share one input, the first value V1 pulled
// from the packet. Each compares it with its own second operand (here: V2
// pulled from the packet, and the two stored values SetValue1 and
// SetValue2). Every level has a 4-way select driven by two bits of the
// 6-bit CLUOp configuration: 00 selects constant 1 (level masked off),
// 01 selects "less than", 10 "equal", 11 "greater than", with the upper bit
// of each pair as S1. The three selected results are ANDed. The comparator
// structure, the select truth table and the AND tree follow the unit's
// published description; which CLUOp pair drives which level and which
// operand goes to which level are this design's choice:
//   op[1:0] -> V1 vs b0, op[3:2] -> V1 vs b1, op[5:4] -> V1 vs b2.
// "lt" means V1 < b. Purely combinational, unsigned compare.
module clu #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,      // V1
  input  logic [W-1:0] b0,     // V2
  input  logic [W-1:0] b1,     // SetValue1
  input  logic [W-1:0] b2,     // SetValue2
  input  logic [5:0]   op,     // CLUOp
  output logic         pass
);
  logic [2:0] lvl;
  logic [W-1:0] bs [3];

  assign bs[0] = b0;
  assign bs[1] = b1;
  assign bs[2] = b2;

  always_comb begin
    for (int i = 0; i < 3; i++) begin
      unique case (op[2*i +: 2])
        2'b00: lvl[i] = 1'b1;
        2'b01: lvl[i] = (a <  bs[i]);
        2'b10: lvl[i] = (a == bs[i]);
        2'b11: lvl[i] = (a >  bs[i]);
      endcase
    end
  end

  assign pass = (lvl[0] & lvl[1]) & lvl[2];
endmodule
