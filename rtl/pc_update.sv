// pc_update: next-PC selection for the SEQ processor.
//
// new_pc is valP (the following instruction) except for call (valC, the
// target), a jXX whose condition holds (valC) and ret (valM, the return
// address popped from the stack). These choices follow the lecture.
// Purely combinational; the PC register itself is a register_bank.
module pc_update
  import seq_pkg::*;
(
  input  icode_e      icode,
  input  logic        cnd,
  input  logic [63:0] valC,
  input  logic [63:0] valM,
  input  logic [63:0] valP,
  output logic [63:0] new_pc
);
  always_comb begin
    unique case (icode)
      I_CALL:  new_pc = valC;
      I_JXX:   new_pc = cnd ? valC : valP;
      I_RET:   new_pc = valM;
      default: new_pc = valP;
    endcase
  end
endmodule
