// mov_cpu: a processor that runs the four Y86-64 moves (and halt).
//
// Instructions: rrmovq rA, rB (0x20, 2 bytes), irmovq V, rB (0x30, 10
// bytes), rmmovq rA, D(rB) (0x40, 10 bytes) and mrmovq D(rB), rA (0x50,
// 10 bytes). One instruction per clock cycle. The instruction is split into
// icode, rA, rB and the immediate (bytes 2..9); a "convert opcode" function
// of icode sets every mux:
//   PC mux        PC + 2 (rrmovq) or PC + 10 (the others)
//   dstE mux      rB (rrmovq, irmovq), rA (mrmovq), 0xF (rmmovq: no write)
//   write-data mux R[srcA] (rrmovq), immediate (irmovq), memory Data out
//                 (mrmovq)
//   memory write  enabled for rmmovq only
// The register file reads srcA = rA and srcB = rB; an adder forms the data
// address R[rB] + immediate, and the memory's Data in is R[rA]. Only the
// register file's E write port is used. Status: AOK for the four moves,
// HLT for halt, ADR for an address outside memory, INS for anything else.
//
// Interface and timing are those of seq_cpu: synchronous active-high reset
// (PC = 0, registers = 0, Stat = AOK), a byte-wide loader used while rst is
// high, debug reads of registers and memory. Memory reads are in the same
// cycle, writes land at the clock edge. An instruction whose status is not
// AOK changes nothing and the machine stays stopped.
// The datapath and the muxes follow the lecture's drawing of this CPU; the
// status rule, the memory size and the freeze rule are this design's.
module mov_cpu
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
  logic [63:0] imm, valA, valB, addr, data_out, reg_in, new_pc;
  logic [3:0]  icode, ifun, rA, rB, dstE;
  logic        imem_error, dmem_error, mem_read, mem_write, commit, is_move;
  stat_e       instr_stat;

  register_bank #(.WIDTH(64), .INIT(64'd0)) u_pc (
    .clk, .rst, .en(commit), .d(new_pc), .q(pc)
  );

  // split
  assign icode = i10bytes[7:4];
  assign ifun  = i10bytes[3:0];
  assign rA    = i10bytes[15:12];
  assign rB    = i10bytes[11:8];
  assign imm   = i10bytes[79:16];

  // convert opcode: mux controls
  always_comb begin
    mem_read  = (icode == I_MRMOVQ);
    mem_write = (icode == I_RMMOVQ);
    new_pc    = (icode == I_RRMOVQ) ? pc + 64'd2 : pc + 64'd10;
    unique case (icode)
      I_RRMOVQ, I_IRMOVQ: dstE = rB;
      I_MRMOVQ:           dstE = rA;
      default:            dstE = REG_NONE;
    endcase
    unique case (icode)
      I_RRMOVQ: reg_in = valA;
      I_IRMOVQ: reg_in = imm;
      default:  reg_in = data_out;
    endcase
  end

  regfile u_rf (
    .clk, .rst,
    .reg_srcA(rA), .reg_srcB(rB),
    .reg_dstE(commit ? dstE : REG_NONE), .reg_dstM(REG_NONE),
    .reg_inputE(reg_in), .reg_inputM('0),
    .reg_outputA(valA), .reg_outputB(valB),
    .dbg_reg, .dbg_val(dbg_reg_val)
  );

  // address adder
  assign addr = valB + imm;

  y86_memory #(.MEM_BYTES(MEM_BYTES)) u_mem (
    .clk, .pc, .i10bytes, .imem_error,
    .mem_addr(addr), .mem_input(valA), .mem_readbit(mem_read),
    .mem_writebit(mem_write && commit),
    .mem_output(data_out), .dmem_error,
    .load_we, .load_addr, .load_data, .dbg_addr, .dbg_data(dbg_mem_val)
  );

  assign is_move = (icode inside {I_RRMOVQ, I_IRMOVQ, I_RMMOVQ, I_MRMOVQ}) && ifun == 4'h0;

  always_comb begin
    if (imem_error || (is_move && new_pc > 64'(MEM_BYTES)) ||
        (is_move && (mem_read || mem_write) && dmem_error))
      instr_stat = STAT_ADR;
    else if (is_move)          instr_stat = STAT_AOK;
    else if (icode == I_HALT)  instr_stat = STAT_HLT;
    else                       instr_stat = STAT_INS;
  end

  assign commit = !halted && !rst && (instr_stat == STAT_AOK);

  stat_reg u_stat (.clk, .rst, .stat_in(halted ? stat : instr_stat), .stat, .halted);

  always_ff @(posedge clk) begin
    if (rst)          cycles <= '0;
    else if (!halted) cycles <= cycles + 64'd1;
  end
endmodule
