// tb_decode_ctl: checks srcA, srcB, dstE and dstM for every opcode, with
// random register fields and both values of Cnd.
module tb_decode_ctl;
  import seq_pkg::*;
  icode_e icode;
  logic [3:0] rA, rB, srcA, srcB, dstE, dstM;
  logic cnd;
  int checks = 0, failures = 0;

  decode_ctl dut (.icode, .rA, .rB, .cnd, .srcA, .srcB, .dstE, .dstM);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s icode=%h", what, icode); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] eA, eB, eE, eM;
    for (int i = 0; i < 3000; i++) begin
      icode = icode_e'($urandom_range(0, 11));
      rA = 4'($urandom); rB = 4'($urandom); cnd = $urandom_range(0, 1);
      #1;
      eA = 4'hF; eB = 4'hF; eE = 4'hF; eM = 4'hF;
      case (icode)
        I_RRMOVQ: begin eA = rA; eE = cnd ? rB : 4'hF; end
        I_IRMOVQ: eE = rB;
        I_RMMOVQ: begin eA = rA; eB = rB; end
        I_MRMOVQ: begin eB = rB; eM = rA; end
        I_OPQ:    begin eA = rA; eB = rB; eE = rB; end
        I_CALL:   begin eB = 4'd4; eE = 4'd4; end
        I_RET:    begin eB = 4'd4; eE = 4'd4; end
        I_PUSHQ:  begin eA = rA; eB = 4'd4; eE = 4'd4; end
        I_POPQ:   begin eA = rA; eB = 4'd4; eE = 4'd4; eM = rA; end
        default: ;
      endcase
      check(srcA == eA, "srcA");
      check(srcB == eB, "srcB");
      check(dstE == eE, "dstE");
      check(dstM == eM, "dstM");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
