// tb_run_ctrl: three runs against a reference of the stopping rule.
//  1. Stat AOK for six cycles, then HLT: 7 cycles run, en high on the first
//     six only, final_stat HLT, no timeout.
//  2. Stat AOK forever with TIMEOUT = 25: exactly 25 cycles run, all enabled,
//     timed_out set.
//  3. Random Stat values: the run stops on the first non-AOK value.
module tb_run_ctrl;
  import y86_pkg::*;
  localparam int unsigned TO = 25;
  logic clk = 0, rst, en, running, timed_out;
  logic [2:0] stat, final_stat;
  logic [31:0] cycles;
  int checks = 0, failures = 0, ens;

  run_ctrl #(.TIMEOUT(TO)) dut (.clk(clk), .rst(rst), .stat(stat), .en(en), .running(running),
                                .cycles(cycles), .timed_out(timed_out), .final_stat(final_stat));

  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++; if (!cond) begin failures++; $display("FAIL %s (cycles=%0d)", what, cycles); end
  endtask

  task automatic restart();
    rst = 1; stat = STAT_AOK; @(posedge clk); #1; rst = 0; ens = 0;
  endtask

  initial begin
    // 1: halt after six AOK cycles
    restart();
    for (int c = 0; c < 12; c++) begin
      stat = (c < 6) ? STAT_AOK : STAT_HLT; #1;
      if (c <= 6) check(running == 1'b1, "running before stop");
      check(en == (c < 6), "enable follows stat");
      if (en) ens++;
      @(posedge clk); #1;
    end
    check(cycles == 32'd7, "halt run is 7 cycles");
    check(ens == 6, "six register updates");
    check(!running && final_stat == STAT_HLT && !timed_out, "stopped by halt");
    // 2: timeout
    restart();
    for (int c = 0; c < TO + 10; c++) begin
      stat = STAT_AOK; #1; if (en) ens++;
      @(posedge clk); #1;
    end
    check(cycles == 32'(TO), "timeout run length");
    check(ens == TO, "every timed-out cycle updates");
    check(!running && timed_out && final_stat == STAT_AOK, "stopped by timeout");
    // 3: random stat
    for (int r = 0; r < 20; r++) begin
      int stop_at; logic [2:0] bad;
      restart();
      stop_at = $urandom % 20;
      bad = ($urandom % 2) ? STAT_INS : STAT_HLT;
      for (int c = 0; c < 24; c++) begin
        stat = (c < stop_at) ? STAT_AOK : bad; #1;
        @(posedge clk); #1;
      end
      check(cycles == 32'(stop_at + 1) && final_stat == bad && !running, "random stop");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
