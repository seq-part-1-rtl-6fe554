// gates_example: bitwise and arithmetic logic on 2-bit wires.
//
// Two 2-bit inputs a and b. c_and is their bitwise AND (0b10 & 0b11 = 0b10);
// c_add is their sum cut to 2 bits, the extra carry bit being lost
// (0b10 + 0b11 = 0b101 -> 0b01). Combinational: the outputs follow the inputs.
// The example drives a and b from constants; here they are inputs.
module gates_example #(
  parameter int unsigned WIDTH = 2
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] c_and,
  output logic [WIDTH-1:0] c_add
);

  assign c_and = b & a;
  assign c_add = b + a;

endmodule
