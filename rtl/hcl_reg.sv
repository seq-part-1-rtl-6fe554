// hcl_reg: one register of a register bank.
//
// Models the register element of the course's hardware language: a register
// has an input side (lowercase-prefixed wire, d) and an output side
// (uppercase-prefixed wire, q). On each rising clock edge q takes d; before the
// first edge q holds the declared initial value INIT. That initial value is
// applied here by a synchronous reset, and the enable input (used by the CPUs
// to freeze once the run has stopped) is this design's addition.
//
// Interface: clk, rst (sync, loads INIT), en (update enable), d, q.
// Timing: q changes only at a rising edge of clk.
module hcl_reg #(
  parameter int unsigned     WIDTH = 64,
  parameter logic [WIDTH-1:0] INIT = '0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= INIT;
    else if (en) q <= d;
  end

endmodule
