// tb_exec_ctl: checks the aluA mux, ALU operation and set_cc for every
// opcode by computing the ALU result (with aluB = valB, as wired in the
// processor) that the selection must give:
// valB OP valA for OPq, valB + valC for memory moves, %rsp -/+ 8 for the
// stack instructions. For rrmovq and irmovq valB is 0, as the register
// file returns for register "none".
module tb_exec_ctl;
  import seq_pkg::*;
  icode_e icode;
  logic [3:0] ifun;
  logic [63:0] valA, valB, valC, aluA;
  alufun_e alufun;
  logic set_cc;
  int checks = 0, failures = 0;

  exec_ctl dut (.icode, .ifun, .valA, .valC, .aluA, .alufun, .set_cc);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s icode=%h", what, icode); end
  endtask

  function automatic logic [63:0] run_alu(alufun_e f, logic [63:0] x, logic [63:0] y);
    case (f)
      ALU_ADD: return x + y;
      ALU_SUB: return x - y;
      ALU_AND: return x & y;
      default: return x ^ y;
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] valE, e;
    for (int i = 0; i < 3000; i++) begin
      icode = icode_e'($urandom_range(0, 11));
      ifun = (icode == I_OPQ) ? 4'($urandom_range(0, 3)) : 4'($urandom);
      valA = {$urandom, $urandom}; valB = {$urandom, $urandom}; valC = {$urandom, $urandom};
      // these read register "none" on port B, which gives 0
      if (icode inside {I_RRMOVQ, I_IRMOVQ}) valB = '0;
      #1;
      valE = run_alu(alufun, valB, aluA);   // aluB is valB
      check(set_cc == (icode == I_OPQ), "set_cc");
      case (icode)
        I_RRMOVQ: e = valA;
        I_IRMOVQ: e = valC;
        I_RMMOVQ, I_MRMOVQ: e = valB + valC;
        I_OPQ: case (ifun[1:0])
                 2'd0: e = valB + valA;
                 2'd1: e = valB - valA;
                 2'd2: e = valB & valA;
                 default: e = valB ^ valA;
               endcase
        I_PUSHQ, I_CALL: e = valB - 64'd8;
        I_POPQ, I_RET:   e = valB + 64'd8;
        default: e = valE;
      endcase
      check(valE == e, "valE");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
