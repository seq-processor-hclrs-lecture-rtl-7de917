// tb_regfile: random reads and writes against a shadow copy of the 15
// registers; checks that 0xF reads zero and writes nothing, that writes land
// at the clock edge, and that the M port wins when both ports name one
// register.
module tb_regfile;
  logic clk = 0, rst;
  logic [3:0]  srcA, srcB, dstE, dstM, dbg_reg;
  logic [63:0] inE, inM, outA, outB, dbg_val;
  logic [63:0] shadow [16];
  int checks = 0, failures = 0;
  int both_same = 0;

  regfile dut (.clk, .rst, .reg_srcA(srcA), .reg_srcB(srcB), .reg_dstE(dstE), .reg_dstM(dstM),
               .reg_inputE(inE), .reg_inputM(inM), .reg_outputA(outA), .reg_outputB(outB),
               .dbg_reg, .dbg_val);
  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; dstE = 4'hF; dstM = 4'hF; srcA = 0; srcB = 0; dbg_reg = 0; inE = 0; inM = 0;
    @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < 16; i++) shadow[i] = 0;
    for (int i = 0; i < 16; i++) begin
      dbg_reg = 4'(i); #1;
      check(dbg_val == 0, "reset clears");
    end
    for (int i = 0; i < 3000; i++) begin
      srcA = 4'($urandom); srcB = 4'($urandom);
      dstE = ($urandom_range(0, 4) == 0) ? 4'hF : 4'($urandom);
      dstM = ($urandom_range(0, 5) == 0) ? dstE : 4'($urandom);
      inE = {$urandom, $urandom}; inM = {$urandom, $urandom};
      #1;
      check(outA == ((srcA == 4'hF) ? 64'd0 : shadow[srcA]), "read A");
      check(outB == ((srcB == 4'hF) ? 64'd0 : shadow[srcB]), "read B");
      @(posedge clk);
      if (dstE != 4'hF) shadow[dstE] = inE;
      if (dstM != 4'hF) shadow[dstM] = inM;
      if (dstE == dstM && dstE != 4'hF) both_same++;
      #1;
    end
    for (int i = 0; i < 16; i++) begin
      dbg_reg = 4'(i); #1;
      check(dbg_val == ((i == 15) ? 64'd0 : shadow[i]), "final contents");
    end
    check(both_same > 0, "E and M wrote the same register at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
