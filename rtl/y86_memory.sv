// y86_memory: unified byte-addressed instruction and data memory.
//
// One array of MEM_BYTES bytes serves two ports, as the Y86-64 machine keeps
// program and data in the same address space:
//  * instruction port: i10bytes holds the 10 bytes at pc..pc+9, bit 0 being
//    the least significant bit of the byte at pc (10 bytes is the longest
//    instruction). Combinational. Bytes past the end read as zero;
//    imem_error is set when pc itself is outside the memory.
//  * data port: mem_output holds the little-endian 8-byte word at mem_addr in
//    the same cycle (combinational read, gated by mem_readbit); with
//    mem_writebit high the word mem_input is stored at the clock edge, so it
//    is visible in the next cycle. dmem_error flags a mem_addr whose 8 bytes
//    do not all lie inside the memory (whether or not an access is made, so
//    that it does not depend on the enables); such a read returns zero and
//    such a write is dropped.
// A byte-wide loader port (load_we/load_addr/load_data), written at the clock
// edge and taking precedence over the data port, fills the memory with a
// program; dbg_addr/dbg_data let a testbench read any word.
// The port names and the same-cycle read / next-cycle write timing follow
// the lecture; the size, the error rules and the loader port are this
// design's choices.
module y86_memory #(
  parameter int unsigned MEM_BYTES = 8192
) (
  input  logic        clk,
  // instruction port
  input  logic [63:0] pc,
  output logic [79:0] i10bytes,
  output logic        imem_error,
  // data port
  input  logic [63:0] mem_addr,
  input  logic [63:0] mem_input,
  input  logic        mem_readbit,
  input  logic        mem_writebit,
  output logic [63:0] mem_output,
  output logic        dmem_error,
  // program loader
  input  logic        load_we,
  input  logic [63:0] load_addr,
  input  logic [7:0]  load_data,
  // observation
  input  logic [63:0] dbg_addr,
  output logic [63:0] dbg_data
);
  localparam int unsigned AW = $clog2(MEM_BYTES);

  logic [7:0] mem [MEM_BYTES];

  // byte at a 64-bit address, zero outside the array
  function automatic logic [7:0] rd_byte(input logic [63:0] a);
    if (a < 64'(MEM_BYTES)) return mem[a[AW-1:0]];
    else                    return 8'h00;
  endfunction

  function automatic logic word_ok(input logic [63:0] a);
    return (a <= 64'(MEM_BYTES - 8));
  endfunction

  always_comb begin
    for (int k = 0; k < 10; k++) i10bytes[8*k +: 8] = rd_byte(pc + 64'(k));
  end
  assign imem_error = (pc >= 64'(MEM_BYTES));

  assign dmem_error = !word_ok(mem_addr);

  always_comb begin
    mem_output = '0;
    if (mem_readbit && word_ok(mem_addr))
      for (int k = 0; k < 8; k++) mem_output[8*k +: 8] = rd_byte(mem_addr + 64'(k));
  end

  always_comb begin
    for (int k = 0; k < 8; k++) dbg_data[8*k +: 8] = rd_byte(dbg_addr + 64'(k));
  end

  always_ff @(posedge clk) begin
    if (load_we) begin
      if (load_addr < 64'(MEM_BYTES)) mem[load_addr[AW-1:0]] <= load_data;
    end else if (mem_writebit && word_ok(mem_addr)) begin
      for (int k = 0; k < 8; k++) mem[AW'(mem_addr[AW-1:0] + AW'(k))] <= mem_input[8*k +: 8];
    end
  end
endmodule
