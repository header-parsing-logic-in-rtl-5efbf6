// Self-checking testbench for the comparator logic unit (clu).
// Drives random and boundary operands with every one of the 64 CLUOp codes
// and compares the single pass output with a reference computed here from
// the select table (00 -> 1, 01 -> less, 10 -> equal, 11 -> greater, all
// three levels ANDed). Purely combinational: one #1 step per vector.
// The watchdog ends the run after a fixed time in case a step hangs.
module tb_clu;
  logic [15:0] a, b0, b1, b2;
  logic [5:0]  op;
  logic        pass;
  int checks = 0, failures = 0;

  clu #(.W(16)) dut (.a, .b0, .b1, .b2, .op, .pass);

  function automatic bit lvl(input logic [1:0] s, input logic [15:0] x, input logic [15:0] y);
    case (s)
      2'b00: return 1'b1;
      2'b01: return x < y;
      2'b10: return x == y;
      default: return x > y;
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 0; b0 = 0; b1 = 0; b2 = 0; op = 0;
    for (int n = 0; n < 3000; n++) begin
      a  = 16'($urandom_range(0, 7));
      b0 = 16'($urandom_range(0, 7));
      b1 = 16'($urandom_range(0, 7));
      b2 = 16'($urandom_range(0, 7));
      if (n % 5 == 0) begin a = 16'($urandom); b0 = 16'($urandom); end
      op = 6'(n);
      #1;
      checks++;
      if (pass !== (lvl(op[1:0], a, b0) & lvl(op[3:2], a, b1) & lvl(op[5:4], a, b2))) begin
        failures++;
        if (failures < 10) $display("mismatch a=%0d b=%0d/%0d/%0d op=%b pass=%b", a, b0, b1, b2, op, pass);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
