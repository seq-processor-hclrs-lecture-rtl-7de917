// tb_add_cpu: random programs of addq instructions ending in halt or an
// invalid opcode. Since addq alone cannot create non-zero values, the
// testbench presets the registers with random values (hierarchically,
// right after reset) and a model predicts PC, Stat and all 15 registers
// after every cycle, including additions that wrap around 2^64 and writes
// to the register a source also names. Counts additions and stop statuses.
module tb_add_cpu;
  import seq_pkg::*;
  localparam int unsigned N = 8192;
  logic clk = 0, rst = 1, load_we = 0, halted;
  logic [63:0] load_addr = 0, pc, cycles, dbg_addr = 0, dbg_mem_val, dbg_reg_val;
  logic [7:0] load_data = 0;
  logic [3:0] dbg_reg = 0;
  stat_e stat;
  int checks = 0, failures = 0;
  int n_add = 0, n_hlt = 0, n_ins = 0, n_wrap = 0;

  add_cpu dut (.clk, .rst, .load_we, .load_addr, .load_data, .stat, .halted, .pc, .cycles,
               .dbg_reg, .dbg_reg_val, .dbg_addr, .dbg_mem_val);
  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s pc=%h", what, pc); end
  endtask

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0]  img [N];
  logic [63:0] R [16];

  task automatic run(input string tag, input int len, input logic [7:0] last);
    logic [63:0] mpc, s;
    stat_e ms;
    logic [3:0] ra, rb;
    int steps;
    for (int i = 0; i < N; i++) img[i] = 8'($urandom);
    for (int i = 0; i < len; i++) begin img[2*i] = 8'h60; img[2*i+1] = 8'($urandom_range(0, 254)); end
    img[2*len] = last;
    @(negedge clk);
    rst = 1; load_we = 1;
    for (int i = 0; i < N; i++) begin load_addr = 64'(i); load_data = img[i]; @(negedge clk); end
    load_we = 0; @(negedge clk);
    rst = 0;
    for (int i = 0; i < 15; i++) begin
      R[i] = {$urandom, $urandom};
      dut.u_rf.r[i] = R[i];
    end
    R[15] = 0;
    mpc = 0; ms = STAT_AOK; steps = 0;
    for (int c = 0; c < len + 5 && ms == STAT_AOK; c++) begin
      steps++;
      if (img[mpc] == 8'h60) begin
        ra = img[mpc + 1][7:4]; rb = img[mpc + 1][3:0];
        s = R[ra] + R[rb];
        if (s < R[ra]) n_wrap++;
        if (rb != 4'hF) R[rb] = s;
        mpc = mpc + 2; n_add++;
      end else if (img[mpc][7:4] == 4'h0) begin ms = STAT_HLT; n_hlt++; end
      else begin ms = STAT_INS; n_ins++; end
      @(posedge clk); #1;
      check(pc == mpc && stat == ms && cycles == 64'(steps), {tag, ": PC/Stat/cycles"});
      for (int i = 0; i < 15; i++) begin
        dbg_reg = 4'(i); #0.1;
        check(dbg_reg_val == R[i], $sformatf("%s: R[%0d]", tag, i));
      end
    end
  endtask

  initial begin
    for (int t = 0; t < 40; t++)
      run($sformatf("prog%0d", t), $urandom_range(1, 60), (t % 4 == 0) ? 8'h20 : 8'h00);
    check(n_add > 0 && n_hlt > 0 && n_ins > 0 && n_wrap > 0, "add, wrap-around, halt and invalid all seen");
    $display("mechanisms: add=%0d wrap=%0d HLT=%0d INS=%0d", n_add, n_wrap, n_hlt, n_ins);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
