// mips_pkg -- encodings shared by the subset-MIPS processor and its testbenches.
//
// The processor is a multicycle machine: four byte fetches, a decode cycle and one to three
// execute cycles per instruction. This package holds the 4-bit state codes of its controller,
// the 6-bit opcodes of the six supported instruction classes and the 6-bit function codes of
// the five R-type operations. All codes are the standard MIPS ones and the state codes are the
// ones the original model uses (FETCH1 = 1 ... ADDIEX = 14; codes 0 and 15 are unused and
// return the machine to FETCH1).
package mips_pkg;

  // Controller states, in the original encoding.
  typedef enum logic [3:0] {
    FETCH1  = 4'b0001,
    FETCH2  = 4'b0010,
    FETCH3  = 4'b0011,
    FETCH4  = 4'b0100,
    DECODE  = 4'b0101,
    MEMADR  = 4'b0110,
    LBRD    = 4'b0111,
    LBWR    = 4'b1000,
    SBWR    = 4'b1001,
    RTYPEEX = 4'b1010,
    RTYPEWR = 4'b1011,
    BEQEX   = 4'b1100,
    JEX     = 4'b1101,
    ADDIEX  = 4'b1110
  } state_t;

  // Opcodes (instruction bits 31:26).
  localparam logic [5:0] OP_LB    = 6'b100000;
  localparam logic [5:0] OP_SB    = 6'b101000;
  localparam logic [5:0] OP_RTYPE = 6'b000000;
  localparam logic [5:0] OP_BEQ   = 6'b000100;
  localparam logic [5:0] OP_J     = 6'b000010;
  localparam logic [5:0] OP_ADDI  = 6'b001000;

  // R-type function codes (instruction bits 5:0).
  localparam logic [5:0] FN_ADD = 6'b100000;
  localparam logic [5:0] FN_SUB = 6'b100010;
  localparam logic [5:0] FN_AND = 6'b100100;
  localparam logic [5:0] FN_OR  = 6'b100101;
  localparam logic [5:0] FN_SLT = 6'b101010;

endpackage
