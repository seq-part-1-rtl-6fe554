// tb_nopjmp_cpu: runs the CPU on a memory held in the testbench.
//  1. The nop/jmp/halt program
//       0x000 nop; 0x001 jmp 0x13; 0x00a jmp 0x1c; 0x013 jmp 0x0a;
//       0x01c nop; 0x01d nop; 0x01e halt
//     must visit pc 0, 1, 0x13, 0xa, 0x1c, 0x1d, 0x1e and stop there with
//     Stat HLT after 7 cycles.
//  2. An unknown opcode must give Stat INS and next PC 0xBADBADBAD.
//  3. Random chains of nops and jumps against a reference interpreter.
module tb_nopjmp_cpu;
  import y86_pkg::*;
  localparam int MB = 512;
  logic clk = 0, rst, en;
  logic [79:0] i10bytes;
  logic [63:0] pc, valP;
  logic [2:0] stat;
  logic [3:0] icode;
  logic [7:0] mem [MB];
  int checks = 0, failures = 0;

  nopjmp_cpu dut (.clk(clk), .rst(rst), .en(en), .i10bytes(i10bytes), .pc(pc),
                  .stat(stat), .icode(icode), .valP(valP));

  always #5 clk = ~clk;

  always_comb
    for (int k = 0; k < 10; k++)
      i10bytes[8*k +: 8] = (pc + 64'(k) < MB) ? mem[pc + 64'(k)] : 8'h00;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++; if (!cond) begin failures++; $display("FAIL %s pc=%h stat=%0d valP=%h", what, pc, stat, valP); end
  endtask

  task automatic clear();
    for (int a = 0; a < MB; a++) mem[a] = 8'h00;
  endtask

  task automatic put_jmp(input int a, input logic [63:0] dst);
    mem[a] = 8'h70;
    for (int k = 0; k < 8; k++) mem[a + 1 + k] = dst[8*k +: 8];
  endtask

  // Run until Stat is not AOK, enabling the register only on AOK cycles.
  task automatic run(output int cyc, input int limit);
    cyc = 0; en = 0;
    rst = 1; @(posedge clk); #1; rst = 0;
    while (cyc < limit) begin
      #1; cyc++;
      en = (stat == STAT_AOK);
      if (!en) break;
      @(posedge clk); #1;
    end
    en = 0;
  endtask

  initial begin
    int cyc;
    logic [63:0] expect_pc [7];
    en = 0;
    // 1: the example program
    clear();
    mem[0] = 8'h10; put_jmp(1, 64'h13); put_jmp(10, 64'h1c); put_jmp(19, 64'h0a);
    mem[28] = 8'h10; mem[29] = 8'h10; mem[30] = 8'h00;
    expect_pc = '{64'h0, 64'h1, 64'h13, 64'ha, 64'h1c, 64'h1d, 64'h1e};
    rst = 1; @(posedge clk); #1; rst = 0;
    for (int i = 0; i < 7; i++) begin
      en = 1; #1;
      check(pc == expect_pc[i], "example trace");
      if (i < 6) check(stat == STAT_AOK, "AOK while running");
      else       check(stat == STAT_HLT, "halt at 0x1e");
      if (i == 0) check(i10bytes == 80'h00000000000000137010 && icode == 4'h1 && valP == 64'h1,
                        "first fetch reads 0x137010, nop gives valP 1");
      if (i == 1) check(icode == 4'h7 && valP == 64'h13, "jmp decodes dest");
      if (stat != STAT_AOK) en = 0;
      @(posedge clk); #1;
    end
    check(pc == 64'h1e, "pc stays on halt when frozen");
    run(cyc, 100);
    check(cyc == 7 && stat == STAT_HLT, "example runs 7 cycles");
    // 2: invalid instruction
    clear(); mem[0] = 8'h10; mem[1] = 8'h60; mem[2] = 8'h12;
    run(cyc, 100);
    check(cyc == 2 && pc == 64'h1 && stat == STAT_INS, "invalid opcode gives INS");
    check(valP == BAD_PC, "invalid opcode next PC is 0xBADBADBAD");
    // 3: random nop/jmp chains ending in halt
    for (int r = 0; r < 20; r++) begin
      int a, steps, ref_cyc;
      clear();
      a = 0; steps = 2 + $urandom % 12; ref_cyc = 0;
      for (int s = 0; s < steps; s++) begin
        ref_cyc++;
        if ($urandom % 2) begin
          int nxt; nxt = a + 9 + ($urandom % 20);
          put_jmp(a, 64'(nxt)); a = nxt;
        end else begin
          mem[a] = 8'h10; a = a + 1;
        end
      end
      mem[a] = 8'h00; ref_cyc++;
      run(cyc, 200);
      check(cyc == ref_cyc && pc == 64'(a) && stat == STAT_HLT, "random chain");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
