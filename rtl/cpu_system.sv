// cpu_system: one of the small CPUs together with its instruction memory and
// run control, i.e. a complete machine that can be loaded and run.
//
// CPU_KIND selects the processor: 0 the nop CPU, 1 the nop/halt CPU, 2 the
// nop/jmp CPU. The CPU's pc addresses the instruction memory, whose ten-byte
// output goes back to the CPU; the CPU's Stat goes to the run control, which
// returns the register enable. After reset the machine runs from address 0
// until Stat is not AOK or TIMEOUT cycles have run.
//
// A program is written, while rst is held, through the memory's byte port
// (load_en, load_addr, load_data). Outputs: pc, the current Stat, running,
// cycles run, timed_out and the Stat that stopped the machine.
module cpu_system
  import y86_pkg::*;
#(
  parameter int unsigned CPU_KIND  = 2,
  parameter int unsigned MEM_BYTES = 4096,
  parameter int unsigned TIMEOUT   = 9999
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        load_en,
  input  logic [63:0] load_addr,
  input  logic [7:0]  load_data,
  output logic [63:0] pc,
  output logic [2:0]  stat,
  output logic        running,
  output logic [31:0] cycles,
  output logic        timed_out,
  output logic [2:0]  final_stat
);

  logic [79:0] i10bytes;
  logic        en;

  instr_mem #(.MEM_BYTES(MEM_BYTES)) u_imem (
    .clk(clk), .load_en(load_en), .load_addr(load_addr), .load_data(load_data),
    .pc(pc), .i10bytes(i10bytes)
  );

  run_ctrl #(.TIMEOUT(TIMEOUT)) u_ctrl (
    .clk(clk), .rst(rst), .stat(stat), .en(en), .running(running),
    .cycles(cycles), .timed_out(timed_out), .final_stat(final_stat)
  );

  if (CPU_KIND == 0) begin : g_nop
    nop_cpu u_cpu (.clk(clk), .rst(rst), .en(en), .pc(pc), .stat(stat));
  end else if (CPU_KIND == 1) begin : g_nophalt
    nophalt_cpu u_cpu (.clk(clk), .rst(rst), .en(en), .i10bytes(i10bytes), .pc(pc), .stat(stat));
  end else begin : g_nopjmp
    logic [3:0]  icode;
    logic [63:0] valP;
    nopjmp_cpu u_cpu (.clk(clk), .rst(rst), .en(en), .i10bytes(i10bytes), .pc(pc),
                      .stat(stat), .icode(icode), .valP(valP));
  end

endmodule
