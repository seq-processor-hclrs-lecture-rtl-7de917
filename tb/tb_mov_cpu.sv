// tb_mov_cpu: random programs of rrmovq, irmovq, rmmovq and mrmovq (with a
// base register pointing into a data area), ending in halt, an invalid
// opcode or an out-of-range access. A model predicts PC, Stat, cycle count
// and all 15 registers after every cycle; the whole memory is compared at
// the end of each program. Counts each move and each stop status.
module tb_mov_cpu;
  import seq_pkg::*;
  localparam int unsigned N = 8192;
  logic clk = 0, rst = 1, load_we = 0, halted;
  logic [63:0] load_addr = 0, pc, cycles, dbg_addr = 0, dbg_mem_val, dbg_reg_val;
  logic [7:0] load_data = 0;
  logic [3:0] dbg_reg = 0;
  stat_e stat;
  int checks = 0, failures = 0;
  int n_op [4];
  int n_hlt = 0, n_ins = 0, n_adr = 0;

  mov_cpu dut (.clk, .rst, .load_we, .load_addr, .load_data, .stat, .halted, .pc, .cycles,
               .dbg_reg, .dbg_reg_val, .dbg_addr, .dbg_mem_val);
  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s pc=%h", what, pc); end
  endtask

  initial begin
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0]  img [N];
  logic [7:0]  m [N];
  logic [63:0] R [16];
  int at;

  function automatic logic [63:0] rq(input logic [63:0] a);
    logic [63:0] v;
    for (int k = 0; k < 8; k++) v[8*k +: 8] = m[13'(a + 64'(k))];
    return v;
  endfunction

  task automatic emit(input logic [7:0] op, input logic [3:0] ra, input logic [3:0] rb, input logic [63:0] v);
    img[at] = op; img[at + 1] = {ra, rb};
    if (op != 8'h20) for (int k = 0; k < 8; k++) img[at + 2 + k] = v[8*k +: 8];
    at += (op == 8'h20) ? 2 : 10;
  endtask

  task automatic gen(input int n, input int ending);
    logic [3:0] r1, r2;
    for (int i = 0; i < N; i++) img[i] = 8'($urandom);
    at = 0;
    emit(8'h30, 4'hF, 4'd14, 64'h1000);
    for (int i = 0; i < n; i++) begin
      r1 = 4'($urandom_range(0, 13)); r2 = 4'($urandom_range(0, 13));
      case ($urandom_range(0, 3))
        0: emit(8'h20, r1, r2, 0);
        1: emit(8'h30, 4'hF, r2, {$urandom, $urandom});
        2: emit(8'h40, r1, 4'd14, 64'($urandom_range(0, 16'h7F8)));
        default: emit(8'h50, r1, 4'd14, 64'($urandom_range(0, 16'h7F8)));
      endcase
    end
    case (ending)
      0: img[at] = 8'h00;
      1: img[at] = 8'h60;                              // not a move: INS
      default: emit(8'h50, 4'd1, 4'd14, 64'h2000);     // load past the end: ADR
    endcase
  endtask

  task automatic run(input string tag, input int maxc);
    logic [63:0] mpc, a;
    logic [3:0] ra, rb;
    stat_e ms;
    int steps, bad;
    @(negedge clk);
    rst = 1; load_we = 1;
    for (int i = 0; i < N; i++) begin load_addr = 64'(i); load_data = img[i]; m[i] = img[i]; @(negedge clk); end
    load_we = 0; @(negedge clk);
    rst = 0;
    for (int i = 0; i < 16; i++) R[i] = 0;
    mpc = 0; ms = STAT_AOK; steps = 0;
    for (int c = 0; c < maxc && ms == STAT_AOK; c++) begin
      steps++;
      ra = m[mpc + 1][7:4]; rb = m[mpc + 1][3:0];
      a = R[rb] + rq(mpc + 2);
      case (m[mpc])
        8'h20: begin R[rb] = R[ra]; mpc += 2; n_op[0]++; end
        8'h30: begin R[rb] = rq(mpc + 2); mpc += 10; n_op[1]++; end
        8'h40: if (a > 64'(N - 8)) begin ms = STAT_ADR; n_adr++; end
               else begin for (int k = 0; k < 8; k++) m[13'(a + 64'(k))] = R[ra][8*k +: 8]; mpc += 10; n_op[2]++; end
        8'h50: if (a > 64'(N - 8)) begin ms = STAT_ADR; n_adr++; end
               else begin R[ra] = rq(a); mpc += 10; n_op[3]++; end
        default: if (m[mpc][7:4] == 4'h0) begin ms = STAT_HLT; n_hlt++; end
                 else begin ms = STAT_INS; n_ins++; end
      endcase
      R[15] = 0;
      @(posedge clk); #1;
      check(pc == mpc && stat == ms && cycles == 64'(steps), {tag, ": PC/Stat/cycles"});
      for (int i = 0; i < 15; i++) begin
        dbg_reg = 4'(i); #0.1;
        check(dbg_reg_val == R[i], $sformatf("%s: R[%0d]", tag, i));
      end
    end
    bad = 0;
    for (int i = 0; i < N; i += 8) begin
      dbg_addr = 64'(i); #0.005;
      if (dbg_mem_val != rq(64'(i))) bad++;
    end
    check(bad == 0, {tag, ": memory"});
  endtask

  initial begin
    for (int t = 0; t < 40; t++) begin
      gen($urandom_range(1, 50), t % 3);
      run($sformatf("prog%0d", t), 100);
    end
    for (int i = 0; i < 4; i++) check(n_op[i] > 0, $sformatf("move kind %0d executed", i));
    check(n_hlt > 0 && n_ins > 0 && n_adr > 0, "halt, invalid and address error all seen");
    $display("mechanisms: rrmovq=%0d irmovq=%0d rmmovq=%0d mrmovq=%0d HLT=%0d INS=%0d ADR=%0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_hlt, n_ins, n_adr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
