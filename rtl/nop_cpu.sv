// nop_cpu: the smallest processor, which treats every instruction as a nop.
//
// A 64-bit register thePc, starting at 0, drives the instruction memory
// address; an add-1 unit feeds thePc + 1 back into the register, so the
// machine fetches from address 0, 1, 2, ... one per cycle and never stops on
// its own. Stat is always AOK. The fetched bytes are not used.
//
// Interface: clk, rst (sync, thePc = 0), en (register update enable, from the
// run control; this design's addition), pc (fetch address), stat.
// Timing: single cycle; pc = n after n enabled clock edges.
module nop_cpu
  import y86_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  output logic [63:0] pc,
  output logic [2:0]  stat
);

  logic [63:0] next_pc;

  hcl_reg #(.WIDTH(64), .INIT('0)) u_thePc (
    .clk(clk), .rst(rst), .en(en), .d(next_pc), .q(pc)
  );

  assign next_pc = pc + 64'd1;
  assign stat    = STAT_AOK;

endmodule
