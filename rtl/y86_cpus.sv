// y86_cpus: the four Y86-64 processors of the series, side by side.
//
// The processors are independent designs that share only the clock:
//   seq_*  seq_cpu    the full single-cycle SEQ processor (all instructions)
//   nj_*   nopjmp_cpu runs nop and jmp only
//   add_*  add_cpu    runs addq only
//   mov_*  mov_cpu    runs rrmovq, irmovq, rmmovq and mrmovq
// Each has its own reset, program loader, status, PC, cycle counter and
// debug read ports, with the timing described in its own module: one
// instruction per clock, synchronous active-high reset, program bytes
// loaded one per clock while its reset is held. The smaller three are the
// steps by which SEQ is built up; they are kept as separate processors
// rather than as modes of one, and grouping them here is this design's
// choice.
module y86_cpus
  import seq_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 8192
) (
  input  logic        clk,
  // SEQ
  input  logic        seq_rst,
  input  logic        seq_load_we,
  input  logic [63:0] seq_load_addr,
  input  logic [7:0]  seq_load_data,
  output stat_e       seq_stat,
  output logic        seq_halted,
  output logic [63:0] seq_pc,
  output logic [63:0] seq_cycles,
  output cc_t         seq_cc,
  input  logic [3:0]  seq_dbg_reg,
  output logic [63:0] seq_dbg_reg_val,
  input  logic [63:0] seq_dbg_addr,
  output logic [63:0] seq_dbg_mem_val,
  // nop/jmp CPU
  input  logic        nj_rst,
  input  logic        nj_load_we,
  input  logic [63:0] nj_load_addr,
  input  logic [7:0]  nj_load_data,
  output stat_e       nj_stat,
  output logic        nj_halted,
  output logic [63:0] nj_pc,
  output logic [63:0] nj_cycles,
  input  logic [63:0] nj_dbg_addr,
  output logic [63:0] nj_dbg_mem_val,
  // add CPU
  input  logic        add_rst,
  input  logic        add_load_we,
  input  logic [63:0] add_load_addr,
  input  logic [7:0]  add_load_data,
  output stat_e       add_stat,
  output logic        add_halted,
  output logic [63:0] add_pc,
  output logic [63:0] add_cycles,
  input  logic [3:0]  add_dbg_reg,
  output logic [63:0] add_dbg_reg_val,
  input  logic [63:0] add_dbg_addr,
  output logic [63:0] add_dbg_mem_val,
  // mov CPU
  input  logic        mov_rst,
  input  logic        mov_load_we,
  input  logic [63:0] mov_load_addr,
  input  logic [7:0]  mov_load_data,
  output stat_e       mov_stat,
  output logic        mov_halted,
  output logic [63:0] mov_pc,
  output logic [63:0] mov_cycles,
  input  logic [3:0]  mov_dbg_reg,
  output logic [63:0] mov_dbg_reg_val,
  input  logic [63:0] mov_dbg_addr,
  output logic [63:0] mov_dbg_mem_val
);
  seq_cpu #(.MEM_BYTES(MEM_BYTES)) u_seq (
    .clk, .rst(seq_rst), .load_we(seq_load_we), .load_addr(seq_load_addr), .load_data(seq_load_data),
    .stat(seq_stat), .halted(seq_halted), .pc(seq_pc), .cycles(seq_cycles), .cc(seq_cc),
    .dbg_reg(seq_dbg_reg), .dbg_reg_val(seq_dbg_reg_val), .dbg_addr(seq_dbg_addr), .dbg_mem_val(seq_dbg_mem_val)
  );

  nopjmp_cpu #(.MEM_BYTES(MEM_BYTES)) u_nj (
    .clk, .rst(nj_rst), .load_we(nj_load_we), .load_addr(nj_load_addr), .load_data(nj_load_data),
    .stat(nj_stat), .halted(nj_halted), .pc(nj_pc), .cycles(nj_cycles),
    .dbg_addr(nj_dbg_addr), .dbg_mem_val(nj_dbg_mem_val)
  );

  add_cpu #(.MEM_BYTES(MEM_BYTES)) u_add (
    .clk, .rst(add_rst), .load_we(add_load_we), .load_addr(add_load_addr), .load_data(add_load_data),
    .stat(add_stat), .halted(add_halted), .pc(add_pc), .cycles(add_cycles),
    .dbg_reg(add_dbg_reg), .dbg_reg_val(add_dbg_reg_val), .dbg_addr(add_dbg_addr), .dbg_mem_val(add_dbg_mem_val)
  );

  mov_cpu #(.MEM_BYTES(MEM_BYTES)) u_mov (
    .clk, .rst(mov_rst), .load_we(mov_load_we), .load_addr(mov_load_addr), .load_data(mov_load_data),
    .stat(mov_stat), .halted(mov_halted), .pc(mov_pc), .cycles(mov_cycles),
    .dbg_reg(mov_dbg_reg), .dbg_reg_val(mov_dbg_reg_val), .dbg_addr(mov_dbg_addr), .dbg_mem_val(mov_dbg_mem_val)
  );
endmodule
