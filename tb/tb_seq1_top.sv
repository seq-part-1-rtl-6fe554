// tb_seq1_top: end-to-end run of every example in the top, at the default
// sizes (4096-byte instruction memories, 9999-cycle timeout).
//
// Machines: the three memories are cleared and loaded through their byte
// ports while reset is held, then all three run together.
//  - nop/jmp machine, the nop/jmp/halt program: stops with HLT after 7 cycles
//    at pc 0x1e, having taken three jumps.
//  - nop/halt machine, five nops: the sixth byte (00) halts it after 6 cycles.
//  - nop machine, five nops: never stops by itself and times out after 9999
//    cycles with pc 0x270f.
// A second run loads 10 60 into the nop/halt machine and 10 20 into the
// nop/jmp machine; both must stop with INS after 2 cycles.
// Meanwhile the counter, the two-register bank and the combinational
// examples are checked against reference values. Each mechanism (halt stop,
// invalid-instruction stop, timeout stop, jump, nop step, counter wrap, every
// MUX input, every case arm, a lost carry) is counted, and one that never
// happened counts as a failure.
module tb_seq1_top;
  import y86_pkg::*;
  localparam int unsigned MB = 4096;
  logic clk = 0, rst;
  logic        jmp_load_en, halt_load_en, nop_load_en;
  logic [63:0] jmp_load_addr, halt_load_addr, nop_load_addr;
  logic [7:0]  jmp_load_data, halt_load_data, nop_load_data;
  logic [63:0] jmp_pc, halt_pc, nop_pc;
  logic [2:0]  jmp_stat, halt_stat, nop_stat, jmp_final_stat, halt_final_stat, nop_final_stat;
  logic        jmp_running, halt_running, nop_running, jmp_timed_out, halt_timed_out, nop_timed_out;
  logic [31:0] jmp_cycles, halt_cycles, nop_cycles;
  logic [2:0]  count, next_count;
  logic [3:0]  ya, yb;
  logic [1:0]  mux_sel;
  logic [63:0] mux_a, mux_b, mux_c, mux_d, mux_y, case_x, ex_bar;
  logic [2:0]  case_result;
  logic [8:0]  ex_foo;
  logic [1:0]  gate_a, gate_b, gate_and, gate_add;
  int checks = 0, failures = 0;
  // mechanism counters
  int n_halt = 0, n_ins = 0, n_timeout = 0, n_jump = 0, n_nopstep = 0, n_wrap = 0;
  int n_mux [4] = '{0, 0, 0, 0};
  int n_arm [5] = '{0, 0, 0, 0, 0};
  int n_ex  [3] = '{0, 0, 0};
  int n_carry = 0;

  seq1_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000; failures++;
    $display("TIMEOUT of the testbench");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++; if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // Program images, as (address, byte) lists.
  logic [7:0] nopjmp_img [31];
  logic [7:0] nops_img [5];

  task automatic load_all(input int which_jmp, input int which_halt);
    // which_*: 0 = example program, 1 = invalid-instruction program
    jmp_load_en = 1; halt_load_en = 1; nop_load_en = 1;
    for (int a = 0; a < MB; a++) begin
      jmp_load_addr = 64'(a); halt_load_addr = 64'(a); nop_load_addr = 64'(a);
      jmp_load_data = 8'h00; halt_load_data = 8'h00;
      nop_load_data = (a < 5) ? nops_img[a] : 8'h00;
      if (which_jmp == 0 && a < 31) jmp_load_data = nopjmp_img[a];
      if (which_jmp == 1 && a < 2)  jmp_load_data = (a == 0) ? 8'h10 : 8'h20;
      if (which_halt == 0 && a < 5) halt_load_data = nops_img[a];
      if (which_halt == 1 && a < 2) halt_load_data = (a == 0) ? 8'h10 : 8'h60;
      @(posedge clk); #1;
    end
    jmp_load_en = 0; halt_load_en = 0; nop_load_en = 0;
  endtask

  // Reference for the combinational examples.
  function automatic logic [2:0] case_ref(input logic [63:0] v);
    if (v == 5) return 1;
    if (v == 0 || v == 6) return 2;
    if (v > 2) return 3;
    return 4;
  endfunction
  function automatic int ex_ref(input logic [63:0] v);
    if (v > 10) return 100;
    if (v[0]) return 200;
    if (v < 20) return 300;
    return 400;
  endfunction

  // Exercise the combinational examples once per cycle while the machines run.
  task automatic comb_step(input int i);
    mux_sel = 2'($urandom); mux_a = {$urandom, $urandom}; mux_b = {$urandom, $urandom};
    mux_c = {$urandom, $urandom}; mux_d = {$urandom, $urandom};
    case_x = (i % 3 != 0) ? 64'((i / 2) % 12) : {$urandom, $urandom};
    ex_bar = (i % 2) ? 64'(i % 25) : {$urandom, $urandom};
    gate_a = 2'($urandom); gate_b = 2'($urandom);
    #1;
    check(mux_y == (mux_sel == 0 ? mux_a : mux_sel == 1 ? mux_b : mux_sel == 2 ? mux_c : mux_d), "mux4");
    n_mux[mux_sel]++;
    check(case_result == case_ref(case_x), "case expression");
    n_arm[case_result]++;
    check(int'(ex_foo) == ex_ref(ex_bar), "mux exercise");
    n_ex[ex_foo == 100 ? 0 : ex_foo == 200 ? 1 : 2]++;
    check(gate_and == (gate_a & gate_b) && int'(gate_add) == (int'(gate_a) + int'(gate_b)) % 4, "gates");
    if (int'(gate_a) + int'(gate_b) > 3) n_carry++;
  endtask

  initial begin
    int cyc;
    logic [3:0] ra, rb, na;
    logic [63:0] jmp_trace [8];
    int jtr;
    nopjmp_img = '{8'h10, 8'h70, 8'h13, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00,
                   8'h70, 8'h1c, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00,
                   8'h70, 8'h0a, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00,
                   8'h10, 8'h10, 8'h00};
    nops_img = '{8'h10, 8'h10, 8'h10, 8'h10, 8'h10};
    jmp_load_en = 0; halt_load_en = 0; nop_load_en = 0;
    jmp_load_addr = 0; halt_load_addr = 0; nop_load_addr = 0;
    jmp_load_data = 0; halt_load_data = 0; nop_load_data = 0;
    comb_step(0);

    // ---- run 1: example programs ----
    rst = 1;
    load_all(0, 0);
    @(posedge clk); #1; rst = 0;
    check(count == 3'd0 && ya == 4'd1 && yb == 4'd1, "initial register values");
    ra = 1; rb = 1; jtr = 0;
    for (cyc = 0; cyc < 10005; cyc++) begin
      logic [63:0] jpc_before, hpc_before;
      logic [2:0] cnt_before;
      jpc_before = jmp_pc; hpc_before = halt_pc; cnt_before = count;
      if (jmp_running && jtr < 8) begin jmp_trace[jtr] = jmp_pc; jtr++; end
      if (cyc < 64) comb_step(cyc);
      @(posedge clk); #1;
      // counter and register-bank references
      check(count == 3'(cnt_before + 1), "counter step");
      if (cnt_before == 3'd7) n_wrap++;
      na = ra + rb; rb = na + ra; ra = na;
      check(ya == ra && yb == rb, "two-register bank");
      if (cyc == 1) check(ya == 4'd5 && yb == 4'd7, "exercise answer after two edges");
      if (jmp_running && jmp_pc != jpc_before + 1) n_jump++;
      if (halt_running && halt_pc == hpc_before + 1) n_nopstep++;
    end
    check(jtr == 7, "nop/jmp machine ran 7 instructions");
    check(jmp_trace[0] == 64'h0 && jmp_trace[1] == 64'h1 && jmp_trace[2] == 64'h13 &&
          jmp_trace[3] == 64'ha && jmp_trace[4] == 64'h1c && jmp_trace[5] == 64'h1d &&
          jmp_trace[6] == 64'h1e, "nop/jmp trace 0 1 13 a 1c 1d 1e");
    check(!jmp_running && jmp_cycles == 32'd7 && jmp_final_stat == STAT_HLT && jmp_pc == 64'h1e,
          "nop/jmp machine halts after 7 cycles at 0x1e");
    check(!halt_running && halt_cycles == 32'd6 && halt_final_stat == STAT_HLT && halt_pc == 64'h5,
          "nop/halt machine halts after 6 cycles at 5");
    check(!nop_running && nop_timed_out && nop_cycles == 32'd9999 && nop_pc == 64'h270f &&
          nop_final_stat == STAT_AOK, "nop machine times out after 9999 cycles, pc 0x270f");
    if (jmp_final_stat == STAT_HLT) n_halt++;
    if (halt_final_stat == STAT_HLT) n_halt++;
    if (nop_timed_out) n_timeout++;

    // ---- run 2: invalid instructions ----
    rst = 1;
    load_all(1, 1);
    @(posedge clk); #1; rst = 0;
    repeat (20) @(posedge clk);
    #1;
    check(!jmp_running && jmp_cycles == 32'd2 && jmp_final_stat == STAT_INS && jmp_pc == 64'h1,
          "nop/jmp machine stops with INS");
    check(!halt_running && halt_cycles == 32'd2 && halt_final_stat == STAT_INS && halt_pc == 64'h1,
          "nop/halt machine stops with INS");
    check(nop_running && nop_cycles == 32'd20, "nop machine keeps running");
    if (jmp_final_stat == STAT_INS) n_ins++;
    if (halt_final_stat == STAT_INS) n_ins++;

    // ---- mechanisms ----
    $display("halt stops=%0d ins stops=%0d timeouts=%0d jumps=%0d nop steps=%0d counter wraps=%0d lost carries=%0d",
             n_halt, n_ins, n_timeout, n_jump, n_nopstep, n_wrap, n_carry);
    $display("mux inputs %0d %0d %0d %0d, case arms %0d %0d %0d %0d, exercise arms %0d %0d %0d",
             n_mux[0], n_mux[1], n_mux[2], n_mux[3], n_arm[1], n_arm[2], n_arm[3], n_arm[4],
             n_ex[0], n_ex[1], n_ex[2]);
    check(n_halt == 2, "halt stop happened");
    check(n_ins == 2, "invalid-instruction stop happened");
    check(n_timeout == 1, "timeout stop happened");
    check(n_jump == 3, "three jumps taken");
    check(n_nopstep == 5, "five nop steps on the nop/halt machine");
    check(n_wrap > 0, "counter wrapped");
    check(n_carry > 0, "carry lost");
    for (int k = 0; k < 4; k++) check(n_mux[k] > 0, "every mux input selected");
    for (int k = 1; k <= 4; k++) check(n_arm[k] > 0, "every case arm taken");
    for (int k = 0; k < 3; k++) check(n_ex[k] > 0, "every reachable exercise arm taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
