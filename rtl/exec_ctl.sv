// exec_ctl: ALU input and operation selection for the execute stage.
//
// aluA is valA (rrmovq/cmovXX, OPq), valC (irmovq, rmmovq, mrmovq: the
// immediate or displacement) or the constant 8 (pushq, popq, call, ret).
// The ALU's other input, aluB, is valB wired straight from register port B
// as in the lecture's drawings (so it is not produced here): rrmovq/cmovXX
// and irmovq read register "none" on that port, which gives 0, so the ALU
// passes aluA through. The ALU computes valE = aluB OP aluA: ifun selects
// the operation for OPq, pushq and call subtract (%rsp - 8), everything else
// adds (%rsp + 8, rB + displacement). set_cc is high only for OPq, the one
// instruction that writes the condition codes. The sources (register
// values, instruction constant, +/-8 on %rsp through the normal ALU) and the
// mux inputs follow the lecture; limiting set_cc to OPq is the standard
// Y86-64 rule. Purely combinational.
module exec_ctl
  import seq_pkg::*;
(
  input  icode_e      icode,
  input  logic [3:0]  ifun,
  input  logic [63:0] valA,
  input  logic [63:0] valC,
  output logic [63:0] aluA,
  output alufun_e     alufun,
  output logic        set_cc
);
  always_comb begin
    unique case (icode)
      I_RRMOVQ, I_OPQ:                     aluA = valA;
      I_IRMOVQ, I_RMMOVQ, I_MRMOVQ:        aluA = valC;
      I_PUSHQ, I_POPQ, I_CALL, I_RET:      aluA = 64'd8;
      default:                             aluA = '0;
    endcase

    unique case (icode)
      I_OPQ:           alufun = alufun_e'(ifun[1:0]);
      I_PUSHQ, I_CALL: alufun = ALU_SUB;
      default:         alufun = ALU_ADD;
    endcase

    set_cc = (icode == I_OPQ);
  end
endmodule
