// tb_nophalt_cpu: n nops followed by a byte with opcode X must run n + 1
// cycles, advancing pc by one per nop, and end with Stat HLT when X is 0 and
// INS for any opcode other than 0 and 1. Covers every opcode 0..F.
module tb_nophalt_cpu;
  import y86_pkg::*;
  localparam int MB = 128;
  logic clk = 0, rst, en;
  logic [79:0] i10bytes;
  logic [63:0] pc;
  logic [2:0] stat;
  logic [7:0] mem [MB];
  int checks = 0, failures = 0;

  nophalt_cpu dut (.clk(clk), .rst(rst), .en(en), .i10bytes(i10bytes), .pc(pc), .stat(stat));

  always #5 clk = ~clk;

  always_comb
    for (int k = 0; k < 10; k++)
      i10bytes[8*k +: 8] = (pc + 64'(k) < MB) ? mem[pc + 64'(k)] : 8'h00;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int op = 0; op < 16; op++) begin
      if (op == 1) continue;
      for (int rep = 0; rep < 3; rep++) begin
        int n, cyc;
        logic [2:0] want;
        n = $urandom % 40;
        for (int a = 0; a < MB; a++) mem[a] = 8'h10;
        mem[n] = {4'(op), 4'($urandom)};
        want = (op == 0) ? STAT_HLT : STAT_INS;
        en = 0; rst = 1; @(posedge clk); #1; rst = 0;
        cyc = 0;
        while (cyc < 100) begin
          #1; cyc++;
          checks++; if (pc != 64'(cyc - 1)) begin failures++; $display("FAIL pc=%0d cycle %0d", pc, cyc); end
          en = (stat == STAT_AOK);
          if (!en) break;
          @(posedge clk); #1;
        end
        en = 0;
        checks++;
        if (cyc != n + 1 || stat != want) begin
          failures++; $display("FAIL op=%0d n=%0d cycles=%0d stat=%0d", op, n, cyc, stat);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
