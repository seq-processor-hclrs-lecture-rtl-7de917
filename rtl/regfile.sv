// regfile: the Y86-64 register file.
//
// Fifteen 64-bit registers (%rax=0 .. %r14=14) with two read ports and two
// write ports. Reads are combinational: reg_outputA = R[reg_srcA] and
// reg_outputB = R[reg_srcB]; register number 0xF (none) reads as zero.
// Writes happen at the rising clock edge: R[reg_dstE] <= reg_inputE and
// R[reg_dstM] <= reg_inputM, a destination of 0xF writing nothing. If both
// ports name the same register, the M port wins (this design's choice).
// dbg_reg/dbg_val let a testbench watch any register. Reset (synchronous,
// active high) clears every register, matching a machine that starts with all
// registers at zero. Port names, the register count and the 0xF convention
// follow the lecture.
module regfile
  import seq_pkg::*;
#(
  parameter int unsigned NREGS = 15
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [3:0]  reg_srcA,
  input  logic [3:0]  reg_srcB,
  input  logic [3:0]  reg_dstE,
  input  logic [3:0]  reg_dstM,
  input  logic [63:0] reg_inputE,
  input  logic [63:0] reg_inputM,
  output logic [63:0] reg_outputA,
  output logic [63:0] reg_outputB,
  input  logic [3:0]  dbg_reg,
  output logic [63:0] dbg_val
);
  logic [63:0] r [NREGS];

  function automatic logic [63:0] rd(input logic [3:0] n);
    if (32'(n) < NREGS) return r[n];
    else                return '0;
  endfunction

  assign reg_outputA = rd(reg_srcA);
  assign reg_outputB = rd(reg_srcB);
  assign dbg_val     = rd(dbg_reg);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(NREGS); i++) r[i] <= '0;
    end else begin
      if (32'(reg_dstE) < NREGS) r[reg_dstE] <= reg_inputE;
      if (32'(reg_dstM) < NREGS) r[reg_dstM] <= reg_inputM;
    end
  end
endmodule
