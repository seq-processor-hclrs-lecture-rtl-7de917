// tb_stat_reg: checks that the Stat register resets to AOK, follows AOK,
// latches the first non-AOK status and keeps it until reset.
module tb_stat_reg;
  import seq_pkg::*;
  logic clk = 0, rst, halted;
  stat_e stat_in, stat;
  int checks = 0, failures = 0;

  stat_reg dut (.clk, .rst, .stat_in, .stat, .halted);
  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #50000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    stat_e exp, s;
    stat_e vals[4] = '{STAT_AOK, STAT_HLT, STAT_ADR, STAT_INS};
    for (int run = 0; run < 40; run++) begin
      rst = 1; stat_in = STAT_HLT;
      @(posedge clk); #1;
      check(stat == STAT_AOK && !halted, "reset AOK");
      rst = 0; exp = STAT_AOK;
      for (int i = 0; i < 20; i++) begin
        s = ($urandom_range(0, 3) == 0) ? vals[$urandom_range(1, 3)] : STAT_AOK;
        stat_in = s;
        @(posedge clk);
        if (exp == STAT_AOK) exp = s;
        #1;
        check(stat == exp, "stat value");
        check(halted == (exp != STAT_AOK), "halted");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
