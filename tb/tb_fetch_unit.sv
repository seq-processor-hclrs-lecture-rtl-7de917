// tb_fetch_unit: random instruction bytes for every opcode; checks the
// split fields, valC position, instruction length (1, 2, 9 or 10 bytes)
// and validity against a table of Y86-64 encodings kept in the testbench.
module tb_fetch_unit;
  import seq_pkg::*;
  logic [63:0] pc, valC, valP;
  logic [79:0] i10bytes;
  icode_e icode;
  logic [3:0] ifun, rA, rB;
  logic instr_valid;
  int checks = 0, failures = 0;

  fetch_unit dut (.pc, .i10bytes, .icode, .ifun, .rA, .rB, .valC, .valP, .instr_valid);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s icode=%h", what, i10bytes[7:4]); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int len;
    logic regs;
    // lengths by opcode: halt nop rrmovq irmovq rmmovq mrmovq OPq jXX call ret pushq popq
    int lengths [12] = '{1, 1, 2, 10, 10, 10, 2, 9, 9, 1, 2, 2};
    for (int i = 0; i < 4000; i++) begin
      pc = {$urandom, $urandom} >> $urandom_range(0, 63);
      i10bytes = {$urandom, $urandom, $urandom};
      i10bytes[7:4] = 4'($urandom_range(0, 15));
      #1;
      check(icode == icode_e'(i10bytes[7:4]) && ifun == i10bytes[3:0], "icode:ifun");
      check(instr_valid == (i10bytes[7:4] <= 4'hB), "valid");
      if (i10bytes[7:4] <= 4'hB) begin
        len = lengths[i10bytes[7:4]];
        regs = (len == 2 || len == 10);
        check(valP == pc + 64'(len), "valP");
        if (regs) check(rA == i10bytes[15:12] && rB == i10bytes[11:8], "rA rB");
        else      check(rA == 4'hF && rB == 4'hF, "rA rB none");
        if (len == 10) check(valC == i10bytes[79:16], "valC at PC+2");
        if (len == 9)  check(valC == i10bytes[71:8], "valC at PC+1");
      end
    end
    // the two encodings printed in the lecture: nop = 10, jmp = 70 Dest
    i10bytes = 80'h00000000_00000000_0010; pc = 64'h0; #1;
    check(icode == I_NOP && valP == 64'h1, "nop");
    i10bytes = 80'h00_00000000_00000013_70; pc = 64'h1; #1;
    check(icode == I_JXX && valC == 64'h13 && valP == 64'hA, "jmp 0x13");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
