// tb_pc_update: checks the next-PC choice for every opcode and both values
// of Cnd.
module tb_pc_update;
  import seq_pkg::*;
  icode_e icode;
  logic cnd;
  logic [63:0] valC, valM, valP, new_pc;
  int checks = 0, failures = 0;

  pc_update dut (.icode, .cnd, .valC, .valM, .valP, .new_pc);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s icode=%h cnd=%b", what, icode, cnd); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] e;
    for (int i = 0; i < 2000; i++) begin
      icode = icode_e'($urandom_range(0, 11));
      cnd = $urandom_range(0, 1);
      valC = {$urandom, $urandom}; valM = {$urandom, $urandom}; valP = {$urandom, $urandom};
      #1;
      if (icode == I_CALL || (icode == I_JXX && cnd)) e = valC;
      else if (icode == I_RET) e = valM;
      else e = valP;
      check(new_pc == e, "new_pc");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
