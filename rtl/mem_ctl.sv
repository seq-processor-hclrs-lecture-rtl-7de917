// mem_ctl: data-memory control for the SEQ memory stage.
//
//   mem_readbit : mrmovq, popq, ret
//   mem_writebit: rmmovq, pushq, call
//   mem_addr    : valE (rmmovq, mrmovq, pushq, call: the computed address or
//                 the decremented %rsp); valB, the old %rsp, for popq and ret
//   mem_input   : valA (rmmovq, pushq); valP, the return address, for call
// The lecture names the address as "mostly ALU output" with popq/ret as the
// exceptions, and draws the data input as a mux of R[srcA] and PC+9 (valP of
// call); its text says "mostly valB", but its rmmovq and pushq semantics
// store valA = R[rA], which is what is built. Purely combinational.
module mem_ctl
  import seq_pkg::*;
(
  input  icode_e      icode,
  input  logic [63:0] valA,
  input  logic [63:0] valB,
  input  logic [63:0] valE,
  input  logic [63:0] valP,
  output logic [63:0] mem_addr,
  output logic [63:0] mem_input,
  output logic        mem_readbit,
  output logic        mem_writebit
);
  always_comb begin
    mem_readbit  = icode inside {I_MRMOVQ, I_POPQ, I_RET};
    mem_writebit = icode inside {I_RMMOVQ, I_PUSHQ, I_CALL};
    mem_addr     = (icode inside {I_POPQ, I_RET}) ? valB : valE;
    mem_input    = (icode == I_CALL) ? valP : valA;
  end
endmodule
