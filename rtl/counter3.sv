// counter3: the corrected counter circuit.
//
// A register "count" (3 bits, initial value 000) whose input is its own output
// plus one, so the count advances by one on every rising clock edge and wraps
// from 111 to 000 (the carry out of the adder is lost). The register breaks
// the loop that makes x = x + 1 without a register unstable.
//
// Interface: clk, rst (sync, back to the initial 000); count is the register
// output (Y_count), next_count its input (x_count = Y_count + 1).
// Timing: count is 0 after reset and n after n clock edges (mod 8).
module counter3 #(
  parameter int unsigned WIDTH = 3
) (
  input  logic             clk,
  input  logic             rst,
  output logic [WIDTH-1:0] count,
  output logic [WIDTH-1:0] next_count
);

  assign next_count = count + WIDTH'(1);

  hcl_reg #(.WIDTH(WIDTH), .INIT('0)) u_count (
    .clk(clk), .rst(rst), .en(1'b1), .d(next_count), .q(count)
  );

endmodule
