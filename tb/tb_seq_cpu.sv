// tb_seq_cpu: end-to-end test of the SEQ processor at its default size.
//
// A small instruction-set reference model of Y86-64, written here from the
// architecture's definition, runs in lockstep with the core: before every
// clock edge it executes one instruction, and after the edge the core's PC,
// Stat, condition codes and all 15 registers must equal the model's. At the
// end of each program the whole memory is compared too.
// Programs:
//  1. the nop/jmp example (nop; jmp 0x13; jmp 0x0a; jmp 0x1c; nop; nop;
//     halt): must halt after 7 cycles with PC = 0x1e;
//  2. a directed program summing an array in a called function (call, ret,
//     push, pop, cmov, jXX, all ALU operations), with hand-computed results;
//  3. error programs: an undefined opcode (INS), a jump outside memory, a
//     load outside memory and an instruction running off the end (ADR);
//  4. random programs built from every instruction.
// Each mechanism of the core (every opcode, taken and untaken jumps and
// conditional moves, condition-code writes, both register write ports in
// one cycle, every error status, the freeze after a stop) is counted; one
// that never happened is a failure.
module tb_seq_cpu;
  import seq_pkg::*;
  localparam int unsigned N = 8192;

  logic clk = 0, rst = 1, load_we = 0, halted;
  logic [63:0] load_addr = 0, pc, cycles, dbg_reg_val, dbg_addr = 0, dbg_mem_val;
  logic [7:0] load_data = 0;
  logic [3:0] dbg_reg = 0;
  stat_e stat;
  cc_t cc;
  int checks = 0, failures = 0;

  seq_cpu dut (.clk, .rst, .load_we, .load_addr, .load_data, .stat, .halted, .pc, .cycles, .cc,
               .dbg_reg, .dbg_reg_val, .dbg_addr, .dbg_mem_val);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (pc=%h stat=%0d)", what, pc, stat);
    end
  endtask

  initial begin
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_icode [16];
  int n_cmov_taken, n_cmov_not, n_jmp_taken, n_jmp_not, n_cc_write, n_two_writes;
  int n_aluop [4];
  int n_hlt, n_ins, n_adr_fetch, n_adr_data, n_frozen;

  always @(posedge clk) begin
    if (dut.commit) begin
      n_icode[dut.icode]++;
      if (dut.icode == I_RRMOVQ && dut.ifun != 0) begin
        if (dut.cnd) n_cmov_taken++; else n_cmov_not++;
      end
      if (dut.icode == I_JXX && dut.ifun != 0) begin
        if (dut.cnd) n_jmp_taken++; else n_jmp_not++;
      end
      if (dut.set_cc) begin n_cc_write++; n_aluop[dut.alufun]++; end
      if (dut.dstE != REG_NONE && dut.dstM != REG_NONE) n_two_writes++;
    end
  end

  // ---------------- reference model ----------------
  logic [7:0]  img  [N];   // program image loaded into the core
  logic [7:0]  m    [N];   // model memory
  logic [63:0] R    [15];
  logic [63:0] mpc;
  cc_t         mcc;
  stat_e       mstat;
  int          msteps;

  function automatic logic [63:0] rreg(input logic [3:0] n);
    return (n == 4'hF) ? 64'd0 : R[n];
  endfunction
  function automatic void wreg(input logic [3:0] n, input logic [63:0] v);
    if (n != 4'hF) R[n] = v;
  endfunction
  function automatic logic [7:0] mb(input logic [63:0] a);
    return (a < 64'(N)) ? m[a[12:0]] : 8'h00;
  endfunction
  function automatic logic [63:0] mq(input logic [63:0] a);
    logic [63:0] v;
    for (int k = 0; k < 8; k++) v[8*k +: 8] = mb(a + 64'(k));
    return v;
  endfunction
  function automatic void wq(input logic [63:0] a, input logic [63:0] v);
    for (int k = 0; k < 8; k++) m[13'(a + 64'(k))] = v[8*k +: 8];
  endfunction
  function automatic logic bad(input logic [63:0] a);
    return a > 64'(N - 8);
  endfunction
  function automatic logic holds(input logic [3:0] f, input cc_t c);
    logic lt = c.sf ^ c.of;
    case (f)
      0: return 1;
      1: return lt | c.zf;
      2: return lt;
      3: return c.zf;
      4: return !c.zf;
      5: return !lt;
      6: return !lt & !c.zf;
      default: return 0;
    endcase
  endfunction

  function automatic void model_step();
    logic [7:0] b0;
    logic [3:0] ic, fn, ra, rb;
    logic [63:0] vc, vp, a, b, r, addr;
    logic regs, cst;
    int len;
    if (mstat != STAT_AOK) return;
    msteps++;
    if (mpc >= 64'(N)) begin mstat = STAT_ADR; return; end
    b0 = mb(mpc); ic = b0[7:4]; fn = b0[3:0];
    regs = ic inside {4'h2, 4'h3, 4'h4, 4'h5, 4'h6, 4'hA, 4'hB};
    cst  = ic inside {4'h3, 4'h4, 4'h5, 4'h7, 4'h8};
    len = 1 + (regs ? 1 : 0) + (cst ? 8 : 0);
    vp = mpc + 64'(len);
    if (vp > 64'(N)) begin mstat = STAT_ADR; return; end
    if (ic > 4'hB) begin mstat = STAT_INS; return; end
    ra = regs ? mb(mpc + 1)[7:4] : 4'hF;
    rb = regs ? mb(mpc + 1)[3:0] : 4'hF;
    for (int k = 0; k < 8; k++) vc[8*k +: 8] = mb(mpc + 64'(regs ? 2 : 1) + 64'(k));
    case (ic)
      4'h0: begin mstat = STAT_HLT; return; end
      4'h1: ;
      4'h2: if (holds(fn, mcc)) wreg(rb, rreg(ra));
      4'h3: wreg(rb, vc);
      4'h4: begin
        addr = rreg(rb) + vc;
        if (bad(addr)) begin mstat = STAT_ADR; return; end
        wq(addr, rreg(ra));
      end
      4'h5: begin
        addr = rreg(rb) + vc;
        if (bad(addr)) begin mstat = STAT_ADR; return; end
        wreg(ra, mq(addr));
      end
      4'h6: begin
        a = rreg(ra); b = rreg(rb);
        case (fn[1:0])
          0: begin r = b + a; mcc.of = (a[63] == b[63]) && (r[63] != b[63]); end
          1: begin r = b - a; mcc.of = (a[63] != b[63]) && (r[63] != b[63]); end
          2: begin r = b & a; mcc.of = 0; end
          default: begin r = b ^ a; mcc.of = 0; end
        endcase
        mcc.zf = (r == 0); mcc.sf = r[63];
        wreg(rb, r);
      end
      4'h7: if (holds(fn, mcc)) vp = vc;
      4'h8: begin
        addr = R[4] - 8;
        if (bad(addr)) begin mstat = STAT_ADR; return; end
        wq(addr, vp); R[4] = addr; vp = vc;
      end
      4'h9: begin
        addr = R[4];
        if (bad(addr)) begin mstat = STAT_ADR; return; end
        vp = mq(addr); R[4] = addr + 8;
      end
      4'hA: begin
        a = rreg(ra); addr = R[4] - 8;
        if (bad(addr)) begin mstat = STAT_ADR; return; end
        wq(addr, a); R[4] = addr;
      end
      default: begin // popq
        addr = R[4];
        if (bad(addr)) begin mstat = STAT_ADR; return; end
        R[4] = addr + 8; wreg(ra, mq(addr));
      end
    endcase
    mpc = vp;
  endfunction

  // ---------------- a tiny assembler into img ----------------
  int at;
  task automatic eb(input logic [7:0] b);  img[at] = b; at++; endtask
  task automatic eq(input logic [63:0] v); for (int k = 0; k < 8; k++) eb(v[8*k +: 8]); endtask
  task automatic a1(input logic [7:0] op); eb(op); endtask                      // halt, nop, ret
  task automatic a2(input logic [7:0] op, input logic [3:0] ra, input logic [3:0] rb);
    eb(op); eb({ra, rb});                                                       // rrmovq, cmov, OPq, push, pop
  endtask
  task automatic a10(input logic [7:0] op, input logic [3:0] ra, input logic [3:0] rb, input logic [63:0] v);
    eb(op); eb({ra, rb}); eq(v);                                                // irmovq, rmmovq, mrmovq
  endtask
  task automatic a9(input logic [7:0] op, input logic [63:0] dest);
    eb(op); eq(dest);                                                           // jXX, call
  endtask

  task automatic fill_random();
    for (int i = 0; i < N; i++) img[i] = 8'($urandom);
  endtask

  // ---------------- running a program ----------------
  task automatic compare_state(input string tag);
    check(pc == mpc, {tag, ": PC"});
    check(stat == mstat, {tag, ": Stat"});
    check(cc == mcc, {tag, ": CC"});
    for (int i = 0; i < 15; i++) begin
      dbg_reg = 4'(i); #0.1;
      check(dbg_reg_val == R[i], $sformatf("%s: R[%0d]", tag, i));
    end
  endtask

  task automatic compare_memory(input string tag);
    int bad_words = 0;
    for (int a = 0; a < N; a += 8) begin
      dbg_addr = 64'(a); #0.005;
      if (dbg_mem_val != mq(64'(a))) bad_words++;
    end
    check(bad_words == 0, {tag, ": memory"});
  endtask

  // loads img, runs core and model in lockstep for at most max_cycles
  task automatic run(input string tag, input int max_cycles);
    logic [63:0] pc_at_stop, cycles_at_stop;
    @(negedge clk);
    rst = 1; load_we = 1;
    for (int i = 0; i < N; i++) begin
      load_addr = 64'(i); load_data = img[i]; m[i] = img[i];
      @(negedge clk);
    end
    load_we = 0;
    @(negedge clk);
    for (int i = 0; i < 15; i++) R[i] = 0;
    mpc = 0; mcc = '{zf: 1, sf: 0, of: 0}; mstat = STAT_AOK; msteps = 0;
    compare_state({tag, " reset"});
    rst = 0;
    for (int c = 0; c < max_cycles && mstat == STAT_AOK; c++) begin
      model_step();
      @(posedge clk); #1;
      compare_state(tag);
    end
    // both checks finish before the next clock edge
    check(cycles == 64'(msteps), {tag, ": cycle count"});
    compare_memory(tag);
    if (mstat != STAT_AOK) begin
      check(halted, {tag, ": halted"});
      if (mstat == STAT_HLT) n_hlt++;
      if (mstat == STAT_INS) n_ins++;
      pc_at_stop = pc; cycles_at_stop = cycles;
      repeat (3) @(posedge clk);
      #1;
      check(pc == pc_at_stop && cycles == cycles_at_stop && stat == mstat, {tag, ": frozen"});
      compare_state({tag, " frozen"});
      n_frozen++;
    end
  endtask

  // ---------------- random program generator ----------------
  typedef struct { int kind; logic [3:0] ra, rb, fn; logic [63:0] v; int tgt; } ins_t;

  function automatic logic [3:0] rdst();
    int x = $urandom_range(0, 39);
    if (x == 0) return 4'd4;                    // occasionally %rsp
    if (x == 1) return 4'hF;                    // occasionally none
    x = $urandom_range(0, 12);
    return 4'((x >= 4) ? x + 1 : x);            // 0..13 without %rsp
  endfunction

  task automatic gen_random(input int n);
    ins_t p [];
    int addr [];
    int lens [11] = '{1, 2, 10, 10, 10, 2, 9, 9, 1, 2, 2};
    p = new[n]; addr = new[n + 1];
    fill_random();
    at = 0;
    a10(8'h30, 4'hF, 4'd4, 64'h1F00);             // irmovq $0x1f00, %rsp
    a10(8'h30, 4'hF, 4'd14, 64'h1000);            // irmovq $0x1000, %r14
    for (int r = 0; r < 14; r++)
      if (r != 4) a10(8'h30, 4'hF, 4'(r), {$urandom, $urandom} >> $urandom_range(0, 63));
    for (int i = 0; i < n; i++) begin
      // kinds: 0 nop 1 rrmovq/cmov 2 irmovq 3 rmmovq 4 mrmovq 5 OPq 6 jXX 7 call 8 ret 9 push 10 pop
      int w = $urandom_range(0, 99);
      p[i].kind = (w < 3) ? 0 : (w < 15) ? 1 : (w < 22) ? 2 : (w < 32) ? 3 : (w < 42) ? 4 :
                  (w < 67) ? 5 : (w < 79) ? 6 : (w < 83) ? 7 : (w < 85) ? 8 : (w < 93) ? 9 : 10;
      p[i].ra = ($urandom_range(0, 29) == 0) ? 4'hF : 4'($urandom_range(0, 14));
      p[i].rb = rdst();
      p[i].fn = 4'($urandom_range(0, 6));
      p[i].v = {$urandom, $urandom};
      addr[i] = (i == 0) ? at : addr[i-1] + lens[p[i-1].kind];
    end
    addr[n] = addr[n-1] + lens[p[n-1].kind];
    for (int i = 0; i < n; i++) begin
      p[i].tgt = addr[$urandom_range(0, n)];
      case (p[i].kind)
        0: a1(8'h10);
        1: a2({4'h2, p[i].fn}, p[i].ra, p[i].rb);
        2: a10(8'h30, 4'hF, p[i].rb, p[i].v);
        3: a10(8'h40, p[i].ra, 4'd14, 64'($urandom_range(0, 16'h7F8)));
        4: a10(8'h50, p[i].rb, 4'd14, 64'($urandom_range(0, 16'h7F8)));
        5: a2({4'h6, 2'b00, 2'($urandom_range(0, 3))}, p[i].ra, p[i].rb);
        6: a9({4'h7, p[i].fn}, 64'(p[i].tgt));
        7: a9(8'h80, 64'(p[i].tgt));
        8: a1(8'h90);
        9: a2(8'hA0, p[i].ra, 4'hF);
        default: a2(8'hB0, p[i].rb, 4'hF);
      endcase
    end
    a1(8'h00);                                   // halt
  endtask

  // ---------------- the programs ----------------
  int L_sum, L_loop, L_test, L_array;

  task automatic asm_directed();
    at = 0;
    a10(8'h30, 4'hF, 4'd4, 64'h1F00);            // irmovq $0x1f00, %rsp
    a10(8'h30, 4'hF, 4'd7, 64'(L_array));        // irmovq array, %rdi
    a10(8'h30, 4'hF, 4'd6, 64'd4);               // irmovq $4, %rsi
    a9(8'h80, 64'(L_sum));                       // call sum
    a2(8'h20, 4'd0, 4'd3);                       // rrmovq %rax, %rbx
    a10(8'h30, 4'hF, 4'd1, 64'd1);               // irmovq $1, %rcx
    a10(8'h30, 4'hF, 4'd2, 64'd2);               // irmovq $2, %rdx
    a2(8'h61, 4'd2, 4'd1);                       // subq %rdx, %rcx     (rcx = -1)
    a2(8'h22, 4'd1, 4'd8);                       // cmovl %rcx, %r8     (taken)
    a2(8'h26, 4'd1, 4'd9);                       // cmovg %rcx, %r9     (not taken)
    a10(8'h40, 4'd3, 4'd7, 64'h40);              // rmmovq %rbx, 0x40(%rdi)
    a10(8'h50, 4'd13, 4'd7, 64'h40);             // mrmovq 0x40(%rdi), %r13
    a2(8'h63, 4'd2, 4'd2);                       // xorq %rdx, %rdx     (Z)
    a9(8'h73, 64'(at) + 64'd10);                  // je over the next byte (taken)
    a1(8'hF0);                                   // (skipped, would be INS)
    a1(8'h00);                                   // halt
    L_sum = at;
    a2(8'h63, 4'd0, 4'd0);                       // sum: xorq %rax, %rax
    a2(8'h62, 4'd6, 4'd6);                       // andq %rsi, %rsi
    a9(8'h70, 64'(L_test));                      // jmp test
    L_loop = at;
    a10(8'h50, 4'd10, 4'd7, 64'd0);              // loop: mrmovq (%rdi), %r10
    a2(8'h60, 4'd10, 4'd0);                      // addq %r10, %rax
    a10(8'h30, 4'hF, 4'd11, 64'd8);              // irmovq $8, %r11
    a2(8'h60, 4'd11, 4'd7);                      // addq %r11, %rdi
    a10(8'h30, 4'hF, 4'd11, 64'hFFFF_FFFF_FFFF_FFFF); // irmovq $-1, %r11
    a2(8'h60, 4'd11, 4'd6);                      // addq %r11, %rsi
    L_test = at;
    a9(8'h74, 64'(L_loop));                      // test: jne loop
    a2(8'hA0, 4'd0, 4'hF);                       // pushq %rax
    a2(8'hB0, 4'd12, 4'hF);                      // popq %r12
    a1(8'h90);                                   // ret
    at = (at + 7) & ~7;
    L_array = at;
    eq(64'h1); eq(64'h20); eq(64'h300); eq(64'h4000);
  endtask

  task automatic expect_reg(input int r, input logic [63:0] v, input string what);
    dbg_reg = 4'(r); #0.1;
    check(dbg_reg_val == v, what);
  endtask

  initial begin
    // 1. nop/jmp example
    for (int i = 0; i < N; i++) img[i] = 8'h00;
    at = 0;
    a1(8'h10); a9(8'h70, 64'h13); a9(8'h70, 64'h1c); a9(8'h70, 64'h0a); a1(8'h10); a1(8'h10); a1(8'h00);
    check(at == 31, "nop/jmp image is 31 bytes");
    run("nopjmp", 100);
    check(stat == STAT_HLT && pc == 64'h1e && cycles == 64'd7, "nopjmp: halts at 0x1e after 7 cycles");

    // 2. directed program (assembled twice so labels settle)
    fill_random();
    asm_directed(); asm_directed();
    run("directed", 500);
    check(stat == STAT_HLT, "directed: halted normally");
    expect_reg(0, 64'h4321, "directed: sum in %rax");
    expect_reg(3, 64'h4321, "directed: %rbx");
    expect_reg(8, 64'hFFFF_FFFF_FFFF_FFFF, "directed: cmovl taken");
    expect_reg(9, 64'h0, "directed: cmovg not taken");
    expect_reg(12, 64'h4321, "directed: push/pop");
    expect_reg(13, 64'h4321, "directed: store then load");
    expect_reg(4, 64'h1F00, "directed: stack balanced");

    // 3. error programs
    fill_random(); at = 0;
    a1(8'h10); a1(8'hC0);                        // nop; undefined opcode
    run("ins", 20);
    check(stat == STAT_INS && pc == 64'h1, "ins: INS at 0x1");

    fill_random(); at = 0;
    a9(8'h70, 64'h5000_0000);                    // jmp far outside memory
    run("adr-fetch", 20);
    check(stat == STAT_ADR && pc == 64'h5000_0000, "adr-fetch: ADR at target");
    n_adr_fetch++;

    fill_random(); at = 0;
    a10(8'h30, 4'hF, 4'd1, 64'h3FF8);            // irmovq $0x3ff8, %rcx
    a10(8'h50, 4'd2, 4'd1, 64'h0);               // mrmovq (%rcx), %rdx  -> ADR
    run("adr-data", 20);
    check(stat == STAT_ADR && pc == 64'hA, "adr-data: ADR at the load");
    n_adr_data++;

    fill_random(); at = 0;
    a9(8'h70, 64'(N - 5));                       // jmp to 5 bytes before the end
    at = N - 5; eb(8'h30);                       // irmovq would need 10 bytes
    run("adr-end", 20);
    check(stat == STAT_ADR && pc == 64'(N - 5), "adr-end: ADR for a truncated instruction");

    // 4. random programs
    for (int t = 0; t < 60; t++) begin
      gen_random(60);
      run($sformatf("random%0d", t), 400);
    end

    // mechanism coverage
    for (int i = 1; i <= 11; i++) check(n_icode[i] > 0, $sformatf("opcode %0h executed", i));
    for (int i = 0; i < 4; i++)  check(n_aluop[i] > 0, $sformatf("ALU op %0d used", i));
    check(n_cmov_taken > 0 && n_cmov_not > 0, "cmov taken and not taken");
    check(n_jmp_taken > 0 && n_jmp_not > 0, "conditional jump taken and not taken");
    check(n_cc_write > 0, "condition codes written");
    check(n_two_writes > 0, "both register write ports in one cycle");
    check(n_hlt > 0 && n_ins > 0 && n_adr_fetch > 0 && n_adr_data > 0, "every stop status");
    check(n_frozen > 0, "frozen after stop");
    $display("mechanisms: opcodes nop=%0d rrmovq=%0d irmovq=%0d rmmovq=%0d mrmovq=%0d OPq=%0d jXX=%0d call=%0d ret=%0d pushq=%0d popq=%0d",
             n_icode[1], n_icode[2], n_icode[3], n_icode[4], n_icode[5], n_icode[6], n_icode[7],
             n_icode[8], n_icode[9], n_icode[10], n_icode[11]);
    $display("mechanisms: cmov taken=%0d not=%0d, jXX taken=%0d not=%0d, CC writes=%0d, dual writes=%0d, HLT=%0d INS=%0d ADR fetch=%0d data=%0d, frozen=%0d",
             n_cmov_taken, n_cmov_not, n_jmp_taken, n_jmp_not, n_cc_write, n_two_writes,
             n_hlt, n_ins, n_adr_fetch, n_adr_data, n_frozen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
