// tb_nopjmp_cpu: runs the nop/jmp example program (must halt at 0x1e after
// 7 cycles), then random chains of nops and jumps ending in halt or in an
// invalid byte, comparing PC, Stat and cycle count after every cycle with a
// model of the two instructions. Counts jumps, nops and each stop status.
module tb_nopjmp_cpu;
  import seq_pkg::*;
  localparam int unsigned N = 8192;
  logic clk = 0, rst = 1, load_we = 0, halted;
  logic [63:0] load_addr = 0, pc, cycles, dbg_addr = 0, dbg_mem_val;
  logic [7:0] load_data = 0;
  stat_e stat;
  int checks = 0, failures = 0;
  int n_nop = 0, n_jmp = 0, n_hlt = 0, n_ins = 0;

  nopjmp_cpu dut (.clk, .rst, .load_we, .load_addr, .load_data, .stat, .halted, .pc, .cycles,
                  .dbg_addr, .dbg_mem_val);
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

  logic [7:0] img [N];

  function automatic logic [63:0] q_at(input int a);
    logic [63:0] v;
    for (int k = 0; k < 8; k++) v[8*k +: 8] = img[a + k];
    return v;
  endfunction

  task automatic run(input string tag, input int maxc);
    logic [63:0] mpc;
    stat_e ms;
    int steps;
    @(negedge clk);
    rst = 1; load_we = 1;
    for (int i = 0; i < N; i++) begin load_addr = 64'(i); load_data = img[i]; @(negedge clk); end
    load_we = 0; @(negedge clk);
    check(pc == 0 && stat == STAT_AOK, {tag, ": reset"});
    rst = 0; mpc = 0; ms = STAT_AOK; steps = 0;
    for (int c = 0; c < maxc && ms == STAT_AOK; c++) begin
      steps++;
      case (img[mpc])
        8'h10: begin mpc = mpc + 1; n_nop++; end
        8'h70: begin mpc = q_at(int'(mpc) + 1); n_jmp++; end
        8'h00: begin ms = STAT_HLT; n_hlt++; end
        default: begin ms = STAT_INS; n_ins++; end
      endcase
      @(posedge clk); #1;
      check(pc == mpc && stat == ms && cycles == 64'(steps), {tag, ": state"});
    end
    repeat (2) @(posedge clk); #1;
    check(pc == mpc && stat == ms && cycles == 64'(steps), {tag, ": stopped"});
  endtask

  initial begin
    int at, n, k;
    int addr [40];
    // the lecture's nop/jmp program
    for (int i = 0; i < N; i++) img[i] = 8'h00;
    img[0] = 8'h10;
    img[1] = 8'h70; img[2] = 8'h13;
    img[10] = 8'h70; img[11] = 8'h1c;
    img[19] = 8'h70; img[20] = 8'h0a;
    img[28] = 8'h10; img[29] = 8'h10; img[30] = 8'h00;
    run("nopjmp", 50);
    check(stat == STAT_HLT && pc == 64'h1e && cycles == 64'd7, "nopjmp: halt at 0x1e after 7 cycles");
    // random chains: blocks of nops joined by jumps, visited in random order
    for (int t = 0; t < 30; t++) begin
      for (int i = 0; i < N; i++) img[i] = 8'($urandom_range(1, 255)) | 8'h01;   // never 0x00/0x10/0x70
      n = $urandom_range(3, 39);
      for (int i = 0; i < n; i++) addr[i] = 16 + i * 200 + $urandom_range(0, 100);
      addr[0] = 0;
      for (int i = 0; i < n; i++) begin
        k = $urandom_range(0, 3);
        at = addr[i];
        repeat (k) begin img[at] = 8'h10; at++; end
        if (i == n - 1) img[at] = (t % 3 == 0) ? 8'hC0 : 8'h00;
        else begin
          img[at] = 8'h70;
          for (int b = 0; b < 8; b++) img[at + 1 + b] = 8'(64'(addr[i + 1]) >> (8 * b));
        end
      end
      run($sformatf("chain%0d", t), 400);
    end
    check(n_nop > 0 && n_jmp > 0 && n_hlt > 0 && n_ins > 0, "nop, jmp, halt and invalid all seen");
    $display("mechanisms: nop=%0d jmp=%0d HLT=%0d INS=%0d", n_nop, n_jmp, n_hlt, n_ins);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
