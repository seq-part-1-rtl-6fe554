// run_ctrl: decides, cycle by cycle, whether the simulated machine keeps going.
//
// Every CPU drives a 3-bit Stat signal. While Stat is AOK the machine runs:
// each clock cycle counts as run and the CPU's registers update (en = 1). The
// first cycle whose Stat is not AOK (halt, invalid instruction, ...) also
// counts as run, but the registers do not update and the machine stops for
// good, keeping that Stat in final_stat. Independently, the machine stops after
// TIMEOUT cycles have run, every one of them with its register update. So a
// program of six instructions followed by halt runs 7 cycles, and a machine
// that never stops runs TIMEOUT cycles with TIMEOUT register updates.
//
// Interface: clk, rst (sync, restart), stat in; en (register enable for this
// cycle), running, cycles (cycles run), timed_out, final_stat out.
// Freezing the registers on the stopping cycle and the timeout default of 9999
// follow the behaviour of the course simulator; building it as hardware is this
// design's choice.
module run_ctrl
  import y86_pkg::*;
#(
  parameter int unsigned TIMEOUT = 9999
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [2:0]  stat,
  output logic        en,
  output logic        running,
  output logic [31:0] cycles,
  output logic        timed_out,
  output logic [2:0]  final_stat
);

  logic stop_now;

  always_comb begin
    stop_now = running && (stat != STAT_AOK);
    en       = running && (stat == STAT_AOK);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      running    <= 1'b1;
      cycles     <= '0;
      timed_out  <= 1'b0;
      final_stat <= STAT_AOK;
    end else if (running) begin
      cycles <= cycles + 32'd1;
      if (stop_now) begin
        running    <= 1'b0;
        final_stat <= stat;
      end else if (cycles + 32'd1 >= 32'(TIMEOUT)) begin
        running   <= 1'b0;
        timed_out <= 1'b1;
      end
    end
  end

  // Once stopped, nothing may change any more.
  a_frozen: assert property (@(posedge clk) disable iff (rst) !running |=> (!running && $stable(cycles)));

endmodule
