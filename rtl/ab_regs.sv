// ab_regs: the two-register exercise circuit.
//
// A register bank with two 4-bit registers a and b, both starting at 1. Their
// inputs are x_a = Y_a + Y_b and x_b = x_a + Y_a, where Y_ are the register
// outputs; note x_b uses the new value x_a, not a register output. Sums keep
// the low 4 bits. From (1,1) the registers go to (2,3) after one edge and to
// (5,7) after two.
//
// Interface: clk, rst (sync, back to a = b = 1); ya, yb are Y_a, Y_b.
module ab_regs #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst,
  output logic [WIDTH-1:0] ya,
  output logic [WIDTH-1:0] yb
);

  logic [WIDTH-1:0] xa, xb;

  always_comb begin
    xa = ya + yb;
    xb = xa + ya;
  end

  hcl_reg #(.WIDTH(WIDTH), .INIT(WIDTH'(1))) u_a (
    .clk(clk), .rst(rst), .en(1'b1), .d(xa), .q(ya)
  );
  hcl_reg #(.WIDTH(WIDTH), .INIT(WIDTH'(1))) u_b (
    .clk(clk), .rst(rst), .en(1'b1), .d(xb), .q(yb)
  );

endmodule
