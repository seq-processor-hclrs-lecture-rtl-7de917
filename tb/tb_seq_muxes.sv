// tb_seq_muxes: the mux settings of the SEQ processor for the six
// instructions addq %r8,%r9, rmmovq, call, ret, irmovq and popq, checked
// inside the core in the cycle each one executes. For each instruction the
// expected srcA, srcB, dstE, dstM, aluA, ALU operation, valE, memory
// enables, address and data, and next PC are worked out by hand below.
module tb_seq_muxes;
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
    if (!ok) begin failures++; $display("FAIL %s at pc=%h", what, pc); end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    string       name;
    logic [63:0] at;
    logic [3:0]  srcA, srcB, dstE, dstM;
    logic [63:0] aluA;
    alufun_e     fun;
    logic [63:0] valE;
    logic        rd, wr;
    logic [63:0] addr, data, valM, next_pc;
  } row_t;

  logic [7:0] img [N];
  int at;
  task automatic eb(input logic [7:0] b); img[at] = b; at++; endtask
  task automatic eq(input logic [63:0] v); for (int k = 0; k < 8; k++) eb(v[8*k +: 8]); endtask

  task automatic expect_row(input row_t r);
    // sampled before the clock edge that commits the instruction
    check(pc == r.at, {r.name, ": PC"});
    check(dut.srcA == r.srcA && dut.srcB == r.srcB, {r.name, ": srcA/srcB"});
    check(dut.dstE == r.dstE && dut.dstM == r.dstM, {r.name, ": dstE/dstM"});
    check(dut.aluA == r.aluA && dut.alufun == r.fun && dut.valE == r.valE, {r.name, ": ALU"});
    check(dut.mem_readbit == r.rd && dut.mem_writebit == r.wr, {r.name, ": memory enables"});
    if (r.rd || r.wr) check(dut.mem_addr == r.addr, {r.name, ": memory address"});
    if (r.wr) check(dut.mem_input == r.data, {r.name, ": memory data"});
    if (r.rd) check(dut.valM == r.valM, {r.name, ": valM"});
    check(dut.new_pc == r.next_pc, {r.name, ": next PC"});
  endtask

  initial begin
    row_t rows [6];
    for (int i = 0; i < N; i++) img[i] = 8'h00;
    at = 0;
    eb(8'h30); eb(8'hF4); eq(64'h1000);     // 0x00 irmovq $0x1000, %rsp
    eb(8'h30); eb(8'hF8); eq(64'd5);        // 0x0a irmovq $5, %r8
    eb(8'h30); eb(8'hF9); eq(64'd7);        // 0x14 irmovq $7, %r9
    eb(8'h60); eb(8'h89);                   // 0x1e addq %r8, %r9
    eb(8'h40); eb(8'h94); eq(64'h10);       // 0x20 rmmovq %r9, 0x10(%rsp)
    eb(8'h80); eq(64'h40);                  // 0x2a call 0x40
    eb(8'h30); eb(8'hF0); eq(64'h77);       // 0x33 irmovq $0x77, %rax
    eb(8'hB0); eb(8'h3F);                   // 0x3d popq %rbx
    eb(8'h00);                              // 0x3f halt
    at = 'h40; eb(8'h90);                   // 0x40 ret
    at = 'h1000; eq(64'hABCD);              // word popped by popq

    //            name      at    srcA srcB dstE dstM aluA    fun      valE     rd wr addr     data    valM    next
    rows[0] = '{"addq",    'h1e, 8,   9,   9,   15,  5,      ALU_ADD, 12,      0, 0, 0,       0,      0,      'h20};
    rows[1] = '{"rmmovq",  'h20, 9,   4,   15,  15,  'h10,   ALU_ADD, 'h1010,  0, 1, 'h1010,  12,     0,      'h2a};
    rows[2] = '{"call",    'h2a, 15,  4,   4,   15,  8,      ALU_SUB, 'hff8,   0, 1, 'hff8,   'h33,   0,      'h40};
    rows[3] = '{"ret",     'h40, 15,  4,   4,   15,  8,      ALU_ADD, 'h1000,  1, 0, 'hff8,   0,      'h33,   'h33};
    rows[4] = '{"irmovq",  'h33, 15,  15,  0,   15,  'h77,   ALU_ADD, 'h77,    0, 0, 0,       0,      0,      'h3d};
    rows[5] = '{"popq",    'h3d, 3,   4,   4,   3,   8,      ALU_ADD, 'h1008,  1, 0, 'h1000,  0,      'hABCD, 'h3f};

    @(negedge clk);
    load_we = 1;
    for (int i = 0; i < N; i++) begin load_addr = 64'(i); load_data = img[i]; @(negedge clk); end
    load_we = 0; @(negedge clk);
    rst = 0;
    repeat (3) @(negedge clk);              // the three irmovq set-up instructions
    foreach (rows[i]) begin
      expect_row(rows[i]);
      @(negedge clk);
    end
    check(pc == 64'h3f && stat == STAT_AOK, "reaches halt");
    @(negedge clk);
    check(stat == STAT_HLT && cycles == 64'd10, "halted after 10 cycles");
    dbg_reg = 4'd3; #1;
    check(dbg_reg_val == 64'hABCD, "%rbx popped");
    dbg_reg = 4'd4; #1;
    check(dbg_reg_val == 64'h1008, "%rsp after popq");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
