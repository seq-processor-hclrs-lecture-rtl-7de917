// tb_mem_ctl: checks the data-memory enables, address and write data for
// every opcode with random operand values.
module tb_mem_ctl;
  import seq_pkg::*;
  icode_e icode;
  logic [63:0] valA, valB, valE, valP, mem_addr, mem_input;
  logic mem_readbit, mem_writebit;
  int checks = 0, failures = 0;

  mem_ctl dut (.icode, .valA, .valB, .valE, .valP, .mem_addr, .mem_input, .mem_readbit, .mem_writebit);

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
    for (int i = 0; i < 2000; i++) begin
      icode = icode_e'($urandom_range(0, 11));
      valA = {$urandom, $urandom}; valB = {$urandom, $urandom};
      valE = {$urandom, $urandom}; valP = {$urandom, $urandom};
      #1;
      case (icode)
        I_RMMOVQ, I_PUSHQ: begin
          check(mem_writebit && !mem_readbit, "write enable");
          check(mem_addr == valE && mem_input == valA, "store valA at valE");
        end
        I_CALL: begin
          check(mem_writebit && !mem_readbit, "write enable");
          check(mem_addr == valE && mem_input == valP, "store valP at valE");
        end
        I_MRMOVQ: begin
          check(mem_readbit && !mem_writebit, "read enable");
          check(mem_addr == valE, "load from valE");
        end
        I_POPQ, I_RET: begin
          check(mem_readbit && !mem_writebit, "read enable");
          check(mem_addr == valB, "load from old rsp");
        end
        default: check(!mem_readbit && !mem_writebit, "no access");
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
