// cond_unit: condition evaluation for jXX and cmovXX.
//
// From the stored condition codes {ZF, SF, OF} and the instruction's ifun it
// computes Cnd:
//   always: 1        le: (SF^OF)|ZF   l: SF^OF     e: ZF
//   ne: !ZF          ge: !(SF^OF)     g: !(SF^OF) & !ZF
// Undefined ifun values give 0. The lecture's drawing shows the mux with
// "always 1", "le SF | ZF" and "l SF"; this design includes OF as the Y86-64
// architecture does (SF^OF is the signed less-than), which agrees with the
// drawing whenever no overflow occurred. Purely combinational.
module cond_unit
  import seq_pkg::*;
(
  input  logic [3:0] ifun,
  input  cc_t        cc,
  output logic       cnd
);
  logic lt;
  assign lt = cc.sf ^ cc.of;

  always_comb begin
    unique case (ifun)
      C_ALWAYS: cnd = 1'b1;
      C_LE:     cnd = lt | cc.zf;
      C_L:      cnd = lt;
      C_E:      cnd = cc.zf;
      C_NE:     cnd = !cc.zf;
      C_GE:     cnd = !lt;
      C_G:      cnd = !lt && !cc.zf;
      default:  cnd = 1'b0;
    endcase
  end
endmodule
