// seq1_top: all example circuits, side by side.
//
// The examples are independent: three small processors of growing ability
// (nop only; nop and halt; nop, jmp and halt), each a complete machine with
// its own instruction memory and run control, plus the sequential and
// combinational building blocks they are made from: the 3-bit counter, the
// two-register exercise, a four-input multiplexer, two priority case
// expressions and the 2-bit gate example. Every example keeps its own ports;
// only clk and rst are shared.
//
// Machines: hold rst, write the program through <cpu>_load_*, release rst;
// each then runs one instruction per clock until it stops (see run_ctrl).
module seq1_top #(
  parameter int unsigned MEM_BYTES = 4096,
  parameter int unsigned TIMEOUT   = 9999
) (
  input  logic        clk,
  input  logic        rst,
  // nop/jmp machine
  input  logic        jmp_load_en,
  input  logic [63:0] jmp_load_addr,
  input  logic [7:0]  jmp_load_data,
  output logic [63:0] jmp_pc,
  output logic [2:0]  jmp_stat,
  output logic        jmp_running,
  output logic [31:0] jmp_cycles,
  output logic        jmp_timed_out,
  output logic [2:0]  jmp_final_stat,
  // nop/halt machine
  input  logic        halt_load_en,
  input  logic [63:0] halt_load_addr,
  input  logic [7:0]  halt_load_data,
  output logic [63:0] halt_pc,
  output logic [2:0]  halt_stat,
  output logic        halt_running,
  output logic [31:0] halt_cycles,
  output logic        halt_timed_out,
  output logic [2:0]  halt_final_stat,
  // nop machine
  input  logic        nop_load_en,
  input  logic [63:0] nop_load_addr,
  input  logic [7:0]  nop_load_data,
  output logic [63:0] nop_pc,
  output logic [2:0]  nop_stat,
  output logic        nop_running,
  output logic [31:0] nop_cycles,
  output logic        nop_timed_out,
  output logic [2:0]  nop_final_stat,
  // counter
  output logic [2:0]  count,
  output logic [2:0]  next_count,
  // two-register exercise
  output logic [3:0]  ya,
  output logic [3:0]  yb,
  // four-input multiplexer
  input  logic [1:0]  mux_sel,
  input  logic [63:0] mux_a,
  input  logic [63:0] mux_b,
  input  logic [63:0] mux_c,
  input  logic [63:0] mux_d,
  output logic [63:0] mux_y,
  // case expressions
  input  logic [63:0] case_x,
  output logic [2:0]  case_result,
  input  logic [63:0] ex_bar,
  output logic [8:0]  ex_foo,
  // gate example
  input  logic [1:0]  gate_a,
  input  logic [1:0]  gate_b,
  output logic [1:0]  gate_and,
  output logic [1:0]  gate_add
);

  cpu_system #(.CPU_KIND(2), .MEM_BYTES(MEM_BYTES), .TIMEOUT(TIMEOUT)) u_nopjmp (
    .clk(clk), .rst(rst), .load_en(jmp_load_en), .load_addr(jmp_load_addr),
    .load_data(jmp_load_data), .pc(jmp_pc), .stat(jmp_stat), .running(jmp_running),
    .cycles(jmp_cycles), .timed_out(jmp_timed_out), .final_stat(jmp_final_stat)
  );

  cpu_system #(.CPU_KIND(1), .MEM_BYTES(MEM_BYTES), .TIMEOUT(TIMEOUT)) u_nophalt (
    .clk(clk), .rst(rst), .load_en(halt_load_en), .load_addr(halt_load_addr),
    .load_data(halt_load_data), .pc(halt_pc), .stat(halt_stat), .running(halt_running),
    .cycles(halt_cycles), .timed_out(halt_timed_out), .final_stat(halt_final_stat)
  );

  cpu_system #(.CPU_KIND(0), .MEM_BYTES(MEM_BYTES), .TIMEOUT(TIMEOUT)) u_nop (
    .clk(clk), .rst(rst), .load_en(nop_load_en), .load_addr(nop_load_addr),
    .load_data(nop_load_data), .pc(nop_pc), .stat(nop_stat), .running(nop_running),
    .cycles(nop_cycles), .timed_out(nop_timed_out), .final_stat(nop_final_stat)
  );

  counter3 u_counter (.clk(clk), .rst(rst), .count(count), .next_count(next_count));

  ab_regs u_ab (.clk(clk), .rst(rst), .ya(ya), .yb(yb));

  mux4 u_mux4 (.sel(mux_sel), .a(mux_a), .b(mux_b), .c(mux_c), .d(mux_d), .y(mux_y));

  case_mux u_case (.x(case_x), .result(case_result));

  mux_exercise u_ex (.bar(ex_bar), .foo(ex_foo));

  gates_example u_gates (.a(gate_a), .b(gate_b), .c_and(gate_and), .c_add(gate_add));

endmodule
