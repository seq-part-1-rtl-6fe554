// nophalt_cpu: a processor that knows two instructions, nop (10) and halt (00).
//
// As in the nop CPU, the 64-bit register thePc starts at 0 and advances by one
// byte each cycle. A multiplexer on the opcode, bits 7:4 of the fetched
// i10bytes (the high nibble of the byte at pc), sets Stat: AOK for nop, HLT for
// halt and INS (invalid instruction) for any other opcode. The run control then
// stops the machine on the first non-AOK Stat.
//
// Interface: clk, rst (sync, thePc = 0), en (update enable; this design's
// addition), i10bytes (fetched bytes for pc), pc, stat.
// Timing: single cycle; Stat is combinational from the fetched bytes.
module nophalt_cpu
  import y86_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic [79:0] i10bytes,
  output logic [63:0] pc,
  output logic [2:0]  stat
);

  logic [3:0]  icode;
  logic [63:0] next_pc;

  hcl_reg #(.WIDTH(64), .INIT('0)) u_thePc (
    .clk(clk), .rst(rst), .en(en), .d(next_pc), .q(pc)
  );

  always_comb begin
    icode   = i10bytes[7:4];
    next_pc = pc + 64'd1;
    if (icode == I_NOP)       stat = STAT_AOK;
    else if (icode == I_HALT) stat = STAT_HLT;
    else                      stat = STAT_INS;
  end

endmodule
