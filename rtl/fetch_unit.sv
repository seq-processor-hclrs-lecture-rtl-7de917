// fetch_unit: the SEQ fetch stage's split and length logic.
//
// Takes the 10 instruction bytes read at the PC and splits them:
//   icode = byte0[7:4], ifun = byte0[3:0],
//   rA = byte1[7:4], rB = byte1[3:0] (only when the instruction has a
//   register byte; otherwise both read 0xF, "none"),
//   valC = the 8 little-endian bytes after the opcode byte and, if present,
//   the register byte.
// The instruction length is 1 + (register byte ? 1 : 0) + (constant ? 8 : 0),
// and valP = PC + length. instr_valid is low for an undefined icode (>0xB).
// The bit fields, the 1/2/9/10-byte lengths and valC at PC+1 or PC+2 follow
// the lecture; the remaining per-opcode field layout is the standard Y86-64
// one. Purely combinational.
module fetch_unit
  import seq_pkg::*;
(
  input  logic [63:0] pc,
  input  logic [79:0] i10bytes,
  output icode_e      icode,
  output logic [3:0]  ifun,
  output logic [3:0]  rA,
  output logic [3:0]  rB,
  output logic [63:0] valC,
  output logic [63:0] valP,
  output logic        instr_valid
);
  logic need_regids, need_valC;

  assign icode = icode_e'(i10bytes[7:4]);
  assign ifun  = i10bytes[3:0];

  always_comb begin
    need_regids = icode inside {I_RRMOVQ, I_IRMOVQ, I_RMMOVQ, I_MRMOVQ, I_OPQ, I_PUSHQ, I_POPQ};
    need_valC   = icode inside {I_IRMOVQ, I_RMMOVQ, I_MRMOVQ, I_JXX, I_CALL};
    instr_valid = (i10bytes[7:4] <= 4'hB);
  end

  assign rA   = need_regids ? i10bytes[15:12] : REG_NONE;
  assign rB   = need_regids ? i10bytes[11:8]  : REG_NONE;
  assign valC = need_regids ? i10bytes[79:16] : i10bytes[71:8];
  assign valP = pc + 64'd1 + (need_regids ? 64'd1 : 64'd0) + (need_valC ? 64'd8 : 64'd0);
endmodule
