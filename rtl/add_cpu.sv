// add_cpu: a processor that runs only addq rA, rB (and halt).
//
// Every instruction is taken to be two bytes long, so the PC advances by 2
// each cycle. The second byte gives rA (high nibble) and rB (low nibble);
// the register file reads both, an adder forms R[rA] + R[rB], and the sum is
// written back to rB at the clock edge through the register file's E port.
// The M write port is unused (register number 0xF). Status: AOK for addq
// (0x60), HLT for halt (icode 0), INS otherwise.
//
// Interface and timing are those of seq_cpu: synchronous active-high reset
// (PC = 0, registers = 0, Stat = AOK), a byte-wide program loader used
// while rst is high, debug reads of registers and memory. An instruction
// whose status is not AOK changes nothing and the machine stays stopped.
// The datapath (PC + 2, field positions, srcA = rA, srcB = rB, dstE = rB,
// inputE = sum) follows the lecture's example; its status rule is elided
// there, so the one used here (only addq is valid) is this design's choice,
// as are the memory size and the freeze rule.
module add_cpu
  import seq_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 8192
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        load_we,
  input  logic [63:0] load_addr,
  input  logic [7:0]  load_data,
  output stat_e       stat,
  output logic        halted,
  output logic [63:0] pc,
  output logic [63:0] cycles,
  input  logic [3:0]  dbg_reg,
  output logic [63:0] dbg_reg_val,
  input  logic [63:0] dbg_addr,
  output logic [63:0] dbg_mem_val
);
  logic [79:0] i10bytes;
  logic [63:0] valA, valB, sum, unused_mem_out;
  logic [3:0]  icode, ifun, rA, rB;
  logic        imem_error, unused_dmem_error, commit;
  stat_e       instr_stat;

  register_bank #(.WIDTH(64), .INIT(64'd0)) u_pc (
    .clk, .rst, .en(commit), .d(pc + 64'd2), .q(pc)
  );

  y86_memory #(.MEM_BYTES(MEM_BYTES)) u_mem (
    .clk, .pc, .i10bytes, .imem_error,
    .mem_addr('0), .mem_input('0), .mem_readbit(1'b0), .mem_writebit(1'b0),
    .mem_output(unused_mem_out), .dmem_error(unused_dmem_error),
    .load_we, .load_addr, .load_data, .dbg_addr, .dbg_data(dbg_mem_val)
  );

  // decode
  assign icode = i10bytes[7:4];
  assign ifun  = i10bytes[3:0];
  assign rA    = i10bytes[15:12];
  assign rB    = i10bytes[11:8];

  regfile u_rf (
    .clk, .rst,
    .reg_srcA(rA), .reg_srcB(rB),
    .reg_dstE(commit ? rB : REG_NONE), .reg_dstM(REG_NONE),
    .reg_inputE(sum), .reg_inputM('0),
    .reg_outputA(valA), .reg_outputB(valB),
    .dbg_reg, .dbg_val(dbg_reg_val)
  );

  // execute
  assign sum = valA + valB;

  always_comb begin
    if (imem_error || pc + 64'd2 > 64'(MEM_BYTES))  instr_stat = STAT_ADR;
    else if (icode == I_OPQ && ifun == 4'h0)        instr_stat = STAT_AOK;
    else if (icode == I_HALT)                       instr_stat = STAT_HLT;
    else                                            instr_stat = STAT_INS;
  end

  assign commit = !halted && !rst && (instr_stat == STAT_AOK);

  stat_reg u_stat (.clk, .rst, .stat_in(halted ? stat : instr_stat), .stat, .halted);

  always_ff @(posedge clk) begin
    if (rst)          cycles <= '0;
    else if (!halted) cycles <= cycles + 64'd1;
  end
endmodule
