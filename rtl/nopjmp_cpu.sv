// nopjmp_cpu: the smallest processor of the series, running only nop and jmp.
//
// Each clock cycle executes one instruction. The instruction memory is read
// at the PC and split into icode and the jump destination (valC, the 8
// bytes after the opcode byte). A control function of icode gives 1 for jmp
// and 0 for nop; it drives a mux that loads the PC with valC (jmp) or with
// valP = PC + 1, the size of a nop. The status is AOK for nop and jmp
// (icode 1 and 7), HLT for halt (icode 0) and INS for anything else.
// Encodings: nop = 0x10, jmp = 0x70 followed by the 8-byte destination.
//
// Interface and timing are those of seq_cpu: synchronous active-high reset
// (PC = 0, Stat = AOK), a byte-wide program loader used while rst is high,
// and a debug memory read port. An instruction whose status is not AOK does
// not update the PC, and the machine then stays stopped; `cycles` counts
// executed cycles including the halt.
// The datapath (PC register, +1, split, "1 if jmp / 0 if nop", PC mux) and
// the status rule follow the lecture; treating every jXX encoding other
// than plain jmp as invalid, the memory size and the stop-and-freeze rule
// are this design's choices.
module nopjmp_cpu
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
  input  logic [63:0] dbg_addr,
  output logic [63:0] dbg_mem_val
);
  logic [79:0] i10bytes;
  logic [63:0] valP, valC, new_pc, unused_mem_out;
  logic [3:0]  icode, ifun;
  logic        is_jmp, imem_error, unused_dmem_error, commit;
  stat_e       instr_stat;

  register_bank #(.WIDTH(64), .INIT(64'd0)) u_pc (
    .clk, .rst, .en(commit), .d(new_pc), .q(pc)
  );

  // instruction memory only: the data port is idle
  y86_memory #(.MEM_BYTES(MEM_BYTES)) u_mem (
    .clk, .pc, .i10bytes, .imem_error,
    .mem_addr('0), .mem_input('0), .mem_readbit(1'b0), .mem_writebit(1'b0),
    .mem_output(unused_mem_out), .dmem_error(unused_dmem_error),
    .load_we, .load_addr, .load_data, .dbg_addr, .dbg_data(dbg_mem_val)
  );

  // split
  assign icode = i10bytes[7:4];
  assign ifun  = i10bytes[3:0];
  assign valC  = i10bytes[71:8];
  assign valP  = pc + 64'd1;

  // control: 1 if jmp, 0 if nop; PC mux
  assign is_jmp = (icode == I_JXX);
  assign new_pc = is_jmp ? valC : valP;

  always_comb begin
    if (imem_error)                                            instr_stat = STAT_ADR;
    else if (icode == I_NOP || (icode == I_JXX && ifun == 4'h0)) instr_stat = STAT_AOK;
    else if (icode == I_HALT)                                  instr_stat = STAT_HLT;
    else                                                       instr_stat = STAT_INS;
  end

  assign commit = !halted && !rst && (instr_stat == STAT_AOK);

  stat_reg u_stat (.clk, .rst, .stat_in(halted ? stat : instr_stat), .stat, .halted);

  always_ff @(posedge clk) begin
    if (rst)          cycles <= '0;
    else if (!halted) cycles <= cycles + 64'd1;
  end
endmodule
