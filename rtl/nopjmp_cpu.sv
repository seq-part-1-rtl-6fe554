// nopjmp_cpu: a processor that executes nop, jmp and halt.
//
// Fetch: the 64-bit register thePc (initially 0) addresses the instruction
// memory, which returns ten bytes, i10bytes. Decode: icode is bits 7:4 (high
// nibble of the first byte) and dest is bits 71:8 (the 8-byte little-endian
// constant after the first byte). Next PC, a priority multiplexer on icode:
// nop -> pc + 1 (a nop is one byte), jmp (icode 7) -> dest, anything else ->
// 0xBADBADBAD, a recognisable junk value. Stat: AOK for nop and jmp, HLT for
// halt, INS for any other opcode.
//
// The jump ignores its condition field, so every jCC behaves as jmp; the
// length of the jmp (9 bytes) is never needed because the jump is always
// taken. The en input, which freezes thePc when the run control stops the
// machine, is this design's addition.
//
// Interface: clk, rst (sync, thePc = 0), en, i10bytes in; pc, stat, and the
// decoded icode and next PC (valP) out for observation.
// Timing: single cycle; one instruction per enabled clock edge.
module nopjmp_cpu
  import y86_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic [79:0] i10bytes,
  output logic [63:0] pc,
  output logic [2:0]  stat,
  output logic [3:0]  icode,
  output logic [63:0] valP
);

  logic [63:0] dest;

  hcl_reg #(.WIDTH(64), .INIT('0)) u_thePc (
    .clk(clk), .rst(rst), .en(en), .d(valP), .q(pc)
  );

  always_comb begin
    icode = i10bytes[7:4];
    dest  = i10bytes[71:8];

    if (icode == I_NOP)      valP = pc + 64'd1;
    else if (icode == I_JXX) valP = dest;
    else                     valP = BAD_PC;

    if (icode == I_NOP || icode == I_JXX) stat = STAT_AOK;
    else if (icode == I_HALT)             stat = STAT_HLT;
    else                                  stat = STAT_INS;
  end

endmodule
