// seq_cpu: single-cycle (SEQ) Y86-64 processor.
//
// Every clock cycle executes one whole instruction. Within the cycle the
// combinational logic runs through the six conceptual stages:
//   fetch      read 10 bytes at PC, split icode:ifun, rA, rB, valC, valP
//   decode     read R[srcA] -> valA, R[srcB] -> valB
//   execute    valE = aluB OP aluA; evaluate Cnd; OPq computes new flags
//   memory     read (valM) or write the data memory
//   write back R[dstE] <- valE, R[dstM] <- valM
//   PC update  next PC = valP, valC or valM
// and at the rising clock edge the state elements (PC register, register
// file, data memory, condition codes, Stat) all take their new values
// together. The status of the instruction (AOK, HLT for halt, INS for an
// undefined opcode, ADR for an instruction or data address outside memory)
// goes into the Stat register; an instruction whose status is not AOK
// changes no other state, and once Stat leaves AOK the machine is frozen
// until reset. `cycles` counts executed cycles, the halt included.
//
// Interface: synchronous active-high reset sets PC=0, all registers to 0,
// CC to Z=1 S=0 O=0 and Stat to AOK. Hold rst high while writing the
// program one byte per clock through load_we/load_addr/load_data, then
// release it. dbg_reg/dbg_addr read a register or a memory word at any time.
//
// The stage structure, the muxes (srcA, srcB, dstE, dstM, aluA, aluB, memory
// address and data, PC), the 15-register 2-read/2-write register file, the
// 10-byte instruction port and the Stat values follow the lecture. The
// memory size, the freeze-on-error behaviour, the reset values, the loader
// and debug ports and the use of OF in the conditions are this design's
// choices, taken from the standard Y86-64 architecture where it has one.
module seq_cpu
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
  output cc_t         cc,
  input  logic [3:0]  dbg_reg,
  output logic [63:0] dbg_reg_val,
  input  logic [63:0] dbg_addr,
  output logic [63:0] dbg_mem_val
);
  // fetch
  logic [79:0] i10bytes;
  logic        imem_error, instr_valid;
  icode_e      icode;
  logic [3:0]  ifun, rA, rB;
  logic [63:0] valC, valP;
  // decode / write back
  logic [3:0]  srcA, srcB, dstE, dstM;
  logic [63:0] valA, valB;
  // execute
  logic [63:0] aluA, valE;
  alufun_e     alufun;
  logic        set_cc, cnd;
  cc_t         new_cc;
  // memory
  logic [63:0] mem_addr, mem_input, valM;
  logic        mem_readbit, mem_writebit, dmem_error;
  // PC update / status
  logic [63:0] new_pc;
  stat_e       instr_stat;
  logic        commit;

  // ---------------- fetch ----------------
  register_bank #(.WIDTH(64), .INIT(64'd0)) u_pc (
    .clk, .rst, .en(commit), .d(new_pc), .q(pc)
  );

  fetch_unit u_fetch (
    .pc, .i10bytes, .icode, .ifun, .rA, .rB, .valC, .valP, .instr_valid
  );

  // ---------------- decode ----------------
  decode_ctl u_dctl (
    .icode, .rA, .rB, .cnd, .srcA, .srcB, .dstE, .dstM
  );

  regfile u_rf (
    .clk, .rst,
    .reg_srcA(srcA), .reg_srcB(srcB),
    .reg_dstE(commit ? dstE : REG_NONE),
    .reg_dstM(commit ? dstM : REG_NONE),
    .reg_inputE(valE), .reg_inputM(valM),
    .reg_outputA(valA), .reg_outputB(valB),
    .dbg_reg, .dbg_val(dbg_reg_val)
  );

  // ---------------- execute ----------------
  exec_ctl u_ectl (
    .icode, .ifun, .valA, .valC, .aluA, .alufun, .set_cc
  );

  // valE = aluB OP aluA with aluB = valB straight from register port B
  // (subq rA,rB gives rB - rA; pushq gives %rsp - 8)
  alu #(.WIDTH(64)) u_alu (
    .op(alufun), .a(valB), .b(aluA), .result(valE),
    .zf(new_cc.zf), .sf(new_cc.sf), .of(new_cc.of)
  );

  register_bank #(.WIDTH(3), .INIT(3'b100)) u_cc (
    .clk, .rst, .en(commit && set_cc), .d(new_cc), .q(cc)
  );

  cond_unit u_cond (.ifun, .cc, .cnd);

  // ---------------- memory ----------------
  mem_ctl u_mctl (
    .icode, .valA, .valB, .valE, .valP,
    .mem_addr, .mem_input, .mem_readbit, .mem_writebit
  );

  y86_memory #(.MEM_BYTES(MEM_BYTES)) u_mem (
    .clk,
    .pc, .i10bytes, .imem_error,
    .mem_addr, .mem_input, .mem_readbit,
    .mem_writebit(mem_writebit && commit),
    .mem_output(valM), .dmem_error,
    .load_we, .load_addr, .load_data,
    .dbg_addr, .dbg_data(dbg_mem_val)
  );

  // ---------------- PC update ----------------
  pc_update u_pcu (.icode, .cnd, .valC, .valM, .valP, .new_pc);

  // ---------------- status ----------------
  // An instruction that does not fit in memory is an address error too.
  always_comb begin
    if (imem_error || valP > 64'(MEM_BYTES) || (instr_valid && dmem_error && (mem_readbit || mem_writebit)))
      instr_stat = STAT_ADR;
    else if (!instr_valid)
      instr_stat = STAT_INS;
    else if (icode == I_HALT)
      instr_stat = STAT_HLT;
    else
      instr_stat = STAT_AOK;
  end

  assign commit = !halted && !rst && (instr_stat == STAT_AOK);

  stat_reg u_stat (
    .clk, .rst, .stat_in(halted ? stat : instr_stat), .stat, .halted
  );

  // invariants of the control logic
  a_mem_rw_exclusive: assert property (@(posedge clk) disable iff (rst)
    !(mem_readbit && mem_writebit));
  a_two_writes_popq: assert property (@(posedge clk) disable iff (rst)
    (dstE != REG_NONE && dstM != REG_NONE) |-> icode == I_POPQ);
  a_frozen: assert property (@(posedge clk) disable iff (rst)
    halted |=> ($stable(pc) && $stable(stat) && $stable(cc)));

  always_ff @(posedge clk) begin
    if (rst)          cycles <= '0;
    else if (!halted) cycles <= cycles + 64'd1;
  end
endmodule
