// y86_pkg: constants shared by the small Y86-64 CPUs.
//
// Instruction codes are the high nibble of the first instruction byte, as in
// the Y86-64 encoding table (halt 0, nop 1, ... popq B). Stat codes are the
// 3-bit status values a CPU reports each cycle: AOK keeps the machine going,
// HLT is a normal stop, INS an invalid instruction. AOK = 1 matches the value
// a running machine reports; the other numeric values (HLT 2, ADR 3, INS 4)
// are the usual Y86-64 ones and are this design's choice.
package y86_pkg;

  typedef enum logic [3:0] {
    I_HALT   = 4'h0,
    I_NOP    = 4'h1,
    I_RRMOVQ = 4'h2,
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
    STAT_AOK = 3'd1,
    STAT_HLT = 3'd2,
    STAT_ADR = 3'd3,
    STAT_INS = 3'd4
  } stat_e;

  // Ten instruction bytes, little endian: the byte at pc is bits 7:0.
  typedef logic [79:0] i10bytes_t;

  // Next-PC value the nop/jmp CPU produces for an unknown instruction.
  localparam logic [63:0] BAD_PC = 64'h0000_000B_ADBA_DBAD;

endpackage
