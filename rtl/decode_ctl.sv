// decode_ctl: register-number muxes for decode and write back.
//
// Chooses, from icode, the register numbers the register file reads (srcA,
// srcB) and writes (dstE takes the ALU result valE, dstM the memory value
// valM). 0xF means no read / no write.
//   srcA: rA for rrmovq/cmovXX, rmmovq, OPq, pushq, popq
//   srcB: rB for rmmovq, mrmovq, OPq; %rsp for pushq, popq, call, ret
//   dstE: rB for irmovq, OPq, and rrmovq/cmovXX when Cnd holds;
//         %rsp for pushq, popq, call, ret
//   dstM: rA for mrmovq, popq
// The read table, the %rsp choice for stack instructions, the NOT(Cnd) that
// turns a failed cmov's dstE into 0xF and the two write ports used by popq
// follow the lecture. Purely combinational.
module decode_ctl
  import seq_pkg::*;
(
  input  icode_e     icode,
  input  logic [3:0] rA,
  input  logic [3:0] rB,
  input  logic       cnd,
  output logic [3:0] srcA,
  output logic [3:0] srcB,
  output logic [3:0] dstE,
  output logic [3:0] dstM
);
  always_comb begin
    unique case (icode)
      I_RRMOVQ, I_RMMOVQ, I_OPQ, I_PUSHQ, I_POPQ: srcA = rA;
      default:                                    srcA = REG_NONE;
    endcase

    unique case (icode)
      I_RMMOVQ, I_MRMOVQ, I_OPQ:           srcB = rB;
      I_PUSHQ, I_POPQ, I_CALL, I_RET:      srcB = REG_RSP;
      default:                             srcB = REG_NONE;
    endcase

    unique case (icode)
      I_RRMOVQ:                            dstE = cnd ? rB : REG_NONE;
      I_IRMOVQ, I_OPQ:                     dstE = rB;
      I_PUSHQ, I_POPQ, I_CALL, I_RET:      dstE = REG_RSP;
      default:                             dstE = REG_NONE;
    endcase

    unique case (icode)
      I_MRMOVQ, I_POPQ:                    dstM = rA;
      default:                             dstM = REG_NONE;
    endcase
  end
endmodule
