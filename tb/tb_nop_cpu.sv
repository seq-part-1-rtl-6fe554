// tb_nop_cpu: Stat must always be AOK and pc must count the enabled clock
// edges from 0, whatever en does. 9999 enabled edges leave pc at 0x270f.
module tb_nop_cpu;
  import y86_pkg::*;
  logic clk = 0, rst, en;
  logic [63:0] pc, ref_pc;
  logic [2:0] stat;
  int checks = 0, failures = 0;

  nop_cpu dut (.clk(clk), .rst(rst), .en(en), .pc(pc), .stat(stat));

  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    en = 0; rst = 1; @(posedge clk); #1; rst = 0;
    ref_pc = 0;
    for (int i = 0; i < 500; i++) begin
      en = ($urandom % 4) != 0;
      checks++; if (pc != ref_pc || stat != STAT_AOK) begin failures++; $display("FAIL pc=%h exp=%h", pc, ref_pc); end
      @(posedge clk); #1;
      if (en) ref_pc++;
    end
    en = 1; rst = 1; @(posedge clk); #1; rst = 0;
    repeat (9999) @(posedge clk);
    #1;
    checks++; if (pc != 64'h270f) begin failures++; $display("FAIL after 9999 pc=%h", pc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
