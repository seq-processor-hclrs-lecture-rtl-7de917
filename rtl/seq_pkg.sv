// seq_pkg: shared types and constants of the Y86-64 SEQ processor.
//
// Instruction codes, status codes, register numbers, ALU operations and
// jump/move conditions used by every block of the single-cycle (SEQ) core.
// The opcodes nop=1 and jmp=7 and the ALU operation codes (ADD=00, SUB=01,
// AND=10, XOR=11) follow the lecture material this core is built from; the
// remaining opcode, status and register encodings are the standard Y86-64
// ones, which that material uses by name.
package seq_pkg;

  typedef enum logic [3:0] {
    I_HALT   = 4'h0,
    I_NOP    = 4'h1,
    I_RRMOVQ = 4'h2,   // also cmovXX (ifun != 0)
    I_IRMOVQ = 4'h3,
    I_RMMOVQ = 4'h4,
    I_MRMOVQ = 4'h5,
    I_OPQ    = 4'h6,
    I_JXX    = 4'h7,
    I_CALL   = 4'h8,
    I_RET    = 4'h9,
    I_PUSHQ  = 4'hA,
    I_POPQ   = 4'hB
  } icode_e;

  typedef enum logic [2:0] {
    STAT_AOK = 3'd1,   // keep going
    STAT_HLT = 3'd2,   // halt instruction executed
    STAT_ADR = 3'd3,   // bad instruction or data address
    STAT_INS = 3'd4    // invalid instruction
  } stat_e;

  typedef enum logic [1:0] {
    ALU_ADD = 2'b00,
    ALU_SUB = 2'b01,
    ALU_AND = 2'b10,
    ALU_XOR = 2'b11
  } alufun_e;

  // jXX / cmovXX conditions (ifun)
  typedef enum logic [3:0] {
    C_ALWAYS = 4'h0,
    C_LE     = 4'h1,
    C_L      = 4'h2,
    C_E      = 4'h3,
    C_NE     = 4'h4,
    C_GE     = 4'h5,
    C_G      = 4'h6
  } cond_e;

  localparam logic [3:0] REG_RSP  = 4'h4;
  localparam logic [3:0] REG_NONE = 4'hF;

  // condition codes
  typedef struct packed {
    logic zf;
    logic sf;
    logic of;
  } cc_t;

endpackage
