// tb_y86_cpus: end-to-end run of all four processors at their default
// sizes, with hand-worked expected results.
//   nop/jmp CPU: the nop/jmp example must halt at 0x1e after 7 cycles.
//   add CPU: with %rcx = 5 and %rdx = 7 preset, "addq %rcx,%rdx;
//     addq %rdx,%rdx; halt" leaves %rdx = 24 after 3 cycles.
//   mov CPU: irmovq/rrmovq/rmmovq/mrmovq move one constant through a
//     register, memory and back.
//   SEQ: a called loop summing 3+2+1 with jne, push/pop, a taken and an
//     untaken cmov and ret (19 cycles, %rax = 6); then the nop/jmp and the
//     mov programs again, which SEQ must finish exactly as the smaller
//     processors did.
// Counts, for each processor, the instructions of each kind it executed
// and its normal stop; any that never happened is a failure.
module tb_y86_cpus;
  import seq_pkg::*;
  localparam int unsigned N = 8192;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        seq_rst = 1, seq_load_we = 0, seq_halted;
  logic [63:0] seq_load_addr = 0, seq_pc, seq_cycles, seq_dbg_reg_val, seq_dbg_addr = 0, seq_dbg_mem_val;
  logic [7:0]  seq_load_data = 0;
  logic [3:0]  seq_dbg_reg = 0;
  stat_e       seq_stat;
  cc_t         seq_cc;
  logic        nj_rst = 1, nj_load_we = 0, nj_halted;
  logic [63:0] nj_load_addr = 0, nj_pc, nj_cycles, nj_dbg_addr = 0, nj_dbg_mem_val;
  logic [7:0]  nj_load_data = 0;
  stat_e       nj_stat;
  logic        add_rst = 1, add_load_we = 0, add_halted;
  logic [63:0] add_load_addr = 0, add_pc, add_cycles, add_dbg_reg_val, add_dbg_addr = 0, add_dbg_mem_val;
  logic [7:0]  add_load_data = 0;
  logic [3:0]  add_dbg_reg = 0;
  stat_e       add_stat;
  logic        mov_rst = 1, mov_load_we = 0, mov_halted;
  logic [63:0] mov_load_addr = 0, mov_pc, mov_cycles, mov_dbg_reg_val, mov_dbg_addr = 0, mov_dbg_mem_val;
  logic [7:0]  mov_load_data = 0;
  logic [3:0]  mov_dbg_reg = 0;
  stat_e       mov_stat;

  y86_cpus dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters, from each processor's commit ----
  int seq_n [16];
  int nj_nop = 0, nj_jmp = 0, add_n = 0, mov_n [4];
  int seq_cmov_taken = 0, seq_cmov_not = 0, seq_jxx_taken = 0, seq_jxx_not = 0;
  always @(posedge clk) begin
    if (dut.u_seq.commit) begin
      seq_n[dut.u_seq.icode]++;
      if (dut.u_seq.icode == I_RRMOVQ && dut.u_seq.ifun != 0) begin
        if (dut.u_seq.cnd) seq_cmov_taken++; else seq_cmov_not++;
      end
      if (dut.u_seq.icode == I_JXX && dut.u_seq.ifun != 0) begin
        if (dut.u_seq.cnd) seq_jxx_taken++; else seq_jxx_not++;
      end
    end
    if (dut.u_nj.commit) begin if (dut.u_nj.is_jmp) nj_jmp++; else nj_nop++; end
    if (dut.u_add.commit) add_n++;
    if (dut.u_mov.commit) mov_n[dut.u_mov.icode - 4'h2]++;
  end

  // ---- program images ----
  logic [7:0] img [N];
  int at;
  task automatic clear(); for (int i = 0; i < N; i++) img[i] = 8'h00; at = 0; endtask
  task automatic eb(input logic [7:0] b); img[at] = b; at++; endtask
  task automatic eq(input logic [63:0] v); for (int k = 0; k < 8; k++) eb(v[8*k +: 8]); endtask

  task automatic prog_nopjmp();
    clear();
    eb(8'h10); eb(8'h70); eq(64'h13); eb(8'h70); eq(64'h1c); eb(8'h70); eq(64'h0a);
    eb(8'h10); eb(8'h10); eb(8'h00);
  endtask

  task automatic prog_mov();
    clear();
    eb(8'h30); eb(8'hF0); eq(64'h1122_3344_5566_7788);   // irmovq V, %rax
    eb(8'h20); eb(8'h03);                                // rrmovq %rax, %rbx
    eb(8'h30); eb(8'hF1); eq(64'h800);                   // irmovq $0x800, %rcx
    eb(8'h40); eb(8'h31); eq(64'h8);                     // rmmovq %rbx, 8(%rcx)
    eb(8'h50); eb(8'h21); eq(64'h8);                     // mrmovq 8(%rcx), %rdx
    eb(8'h00);                                           // halt
  endtask

  task automatic prog_add();
    clear();
    eb(8'h60); eb(8'h12);                                // addq %rcx, %rdx
    eb(8'h60); eb(8'h22);                                // addq %rdx, %rdx
    eb(8'h00);
  endtask

  task automatic prog_seq();
    clear();
    eb(8'h30); eb(8'hF4); eq(64'h1000);                  // 0x00 irmovq $0x1000, %rsp
    eb(8'h30); eb(8'hF6); eq(64'h3);                     // 0x0a irmovq $3, %rsi
    eb(8'h30); eb(8'hFB); eq(64'hFFFF_FFFF_FFFF_FFFF);   // 0x14 irmovq $-1, %r11
    eb(8'h80); eq(64'h28);                               // 0x1e call f
    eb(8'h00);                                           // 0x27 halt
    eb(8'h60); eb(8'h60);                                // 0x28 f: addq %rsi, %rax
    eb(8'h60); eb(8'hB6);                                // 0x2a addq %r11, %rsi
    eb(8'h74); eq(64'h28);                               // 0x2c jne f
    eb(8'hA0); eb(8'h0F);                                // 0x35 pushq %rax
    eb(8'hB0); eb(8'h8F);                                // 0x37 popq %r8
    eb(8'h22); eb(8'h09);                                // 0x39 cmovl %rax, %r9 (not taken)
    eb(8'h23); eb(8'h0A);                                // 0x3b cmove %rax, %r10 (taken)
    eb(8'h90);                                           // 0x3d ret
  endtask

  // ---- loaders (each processor's reset is held while it loads) ----
  task automatic load_seq();
    seq_rst = 1; seq_load_we = 1;
    for (int i = 0; i < N; i++) begin seq_load_addr = 64'(i); seq_load_data = img[i]; @(negedge clk); end
    seq_load_we = 0;
  endtask
  task automatic load_nj();
    nj_rst = 1; nj_load_we = 1;
    for (int i = 0; i < N; i++) begin nj_load_addr = 64'(i); nj_load_data = img[i]; @(negedge clk); end
    nj_load_we = 0;
  endtask
  task automatic load_add();
    add_rst = 1; add_load_we = 1;
    for (int i = 0; i < N; i++) begin add_load_addr = 64'(i); add_load_data = img[i]; @(negedge clk); end
    add_load_we = 0;
  endtask
  task automatic load_mov();
    mov_rst = 1; mov_load_we = 1;
    for (int i = 0; i < N; i++) begin mov_load_addr = 64'(i); mov_load_data = img[i]; @(negedge clk); end
    mov_load_we = 0;
  endtask

  function automatic logic [63:0] seq_reg(input int r);
    return dut.u_seq.u_rf.r[r];
  endfunction

  task automatic check_mov_result(input string who, input logic [63:0] rax, input logic [63:0] rbx,
                                  input logic [63:0] rcx, input logic [63:0] rdx, input logic [63:0] mem);
    check(rax == 64'h1122_3344_5566_7788 && rbx == rax && rdx == rax, {who, ": constant moved through registers and memory"});
    check(rcx == 64'h800, {who, ": %rcx"});
    check(mem == 64'h1122_3344_5566_7788, {who, ": stored word at 0x808"});
  endtask

  initial begin
    @(negedge clk);
    prog_nopjmp(); load_nj();
    prog_add();    load_add();
    prog_mov();    load_mov();
    prog_seq();    load_seq();
    @(negedge clk);
    // preset the add CPU's sources (it cannot create values itself)
    nj_rst = 0; add_rst = 0; mov_rst = 0; seq_rst = 0;
    dut.u_add.u_rf.r[1] = 64'd5;
    dut.u_add.u_rf.r[2] = 64'd7;
    repeat (40) @(negedge clk);

    check(nj_stat == STAT_HLT && nj_pc == 64'h1e && nj_cycles == 64'd7, "nop/jmp CPU: halt at 0x1e after 7 cycles");
    add_dbg_reg = 4'd2; #1;
    check(add_stat == STAT_HLT && add_pc == 64'h4 && add_cycles == 64'd3, "add CPU: halt at 4 after 3 cycles");
    check(add_dbg_reg_val == 64'd24, "add CPU: %rdx = 24");
    mov_dbg_addr = 64'h808; #1;
    check(mov_stat == STAT_HLT && mov_pc == 64'h2A && mov_cycles == 64'd6, "mov CPU: halt at 0x2a after 6 cycles");
    check_mov_result("mov CPU", dut.u_mov.u_rf.r[0], dut.u_mov.u_rf.r[3], dut.u_mov.u_rf.r[1],
                     dut.u_mov.u_rf.r[2], mov_dbg_mem_val);
    check(seq_stat == STAT_HLT && seq_pc == 64'h27 && seq_cycles == 64'd19, "SEQ: halt at 0x27 after 19 cycles");
    check(seq_reg(0) == 64'd6 && seq_reg(6) == 64'd0, "SEQ: sum 3+2+1 = 6, counter at 0");
    check(seq_reg(8) == 64'd6, "SEQ: push then pop");
    check(seq_reg(9) == 64'd0 && seq_reg(10) == 64'd6, "SEQ: cmovl not taken, cmove taken");
    check(seq_reg(4) == 64'h1000, "SEQ: stack pointer restored by ret");

    // SEQ runs the smaller processors' programs
    prog_nopjmp(); load_seq(); seq_rst = 0;
    repeat (20) @(negedge clk);
    check(seq_stat == STAT_HLT && seq_pc == 64'h1e && seq_cycles == 64'd7, "SEQ on nop/jmp: same as the nop/jmp CPU");
    prog_mov(); load_seq(); seq_rst = 0;
    repeat (20) @(negedge clk);
    seq_dbg_addr = 64'h808; #1;
    check(seq_stat == STAT_HLT && seq_pc == 64'h2A && seq_cycles == 64'd6, "SEQ on mov program: halt at 0x2a after 6 cycles");
    check_mov_result("SEQ on mov program", seq_reg(0), seq_reg(3), seq_reg(1), seq_reg(2), seq_dbg_mem_val);

    // mechanisms
    check(nj_nop > 0 && nj_jmp > 0, "nop/jmp CPU ran nop and jmp");
    check(add_n > 0, "add CPU ran addq");
    for (int i = 0; i < 4; i++) check(mov_n[i] > 0, $sformatf("mov CPU ran move kind %0d", i));
    foreach (seq_n[i]) if (i >= 1 && i <= 11) check(seq_n[i] > 0, $sformatf("SEQ ran icode %0h", i));
    check(seq_cmov_taken > 0 && seq_cmov_not > 0, "SEQ cmov taken and not taken");
    check(seq_jxx_taken > 0 && seq_jxx_not > 0, "SEQ jne taken and not taken");
    $display("mechanisms: nj nop=%0d jmp=%0d; add addq=%0d; mov rr=%0d ir=%0d rm=%0d mr=%0d; seq cmov t/n=%0d/%0d jxx t/n=%0d/%0d",
             nj_nop, nj_jmp, add_n, mov_n[0], mov_n[1], mov_n[2], mov_n[3],
             seq_cmov_taken, seq_cmov_not, seq_jxx_taken, seq_jxx_not);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
