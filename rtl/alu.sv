// alu: the SEQ arithmetic/logic unit.
//
// result = a + b, a - b, a & b or a ^ b for op = ALU_ADD (00), ALU_SUB (01),
// ALU_AND (10), ALU_XOR (11), the operation codes and the a - b order of the
// lecture's ALU exercise. It also produces the flags the condition-code
// register stores: ZF (result is zero), SF (result is negative) and OF
// (two's-complement overflow of add or sub; zero for and/xor). The processor
// feeds a with the rB-side operand so that subq rA,rB computes rB - rA.
// Purely combinational.
module alu
  import seq_pkg::*;
#(
  parameter int unsigned WIDTH = 64
) (
  input  alufun_e          op,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] result,
  output logic             zf,
  output logic             sf,
  output logic             of
);
  always_comb begin
    unique case (op)
      ALU_ADD: result = a + b;
      ALU_SUB: result = a - b;
      ALU_AND: result = a & b;
      ALU_XOR: result = a ^ b;
    endcase
    zf = (result == '0);
    sf = result[WIDTH-1];
    unique case (op)
      ALU_ADD: of = (a[WIDTH-1] == b[WIDTH-1]) && (result[WIDTH-1] != a[WIDTH-1]);
      ALU_SUB: of = (a[WIDTH-1] != b[WIDTH-1]) && (result[WIDTH-1] != a[WIDTH-1]);
      default: of = 1'b0;
    endcase
  end
endmodule
