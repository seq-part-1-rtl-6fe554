// mux4: four-input multiplexer.
//
// Two select bits choose one of four equally wide inputs, following the truth
// table: sel 00 -> a, 01 -> b, 10 -> c, 11 -> d (sel[1] is select bit 1).
// Purely combinational. The data width is not fixed by the truth table
// ("many bits"); 64 bits is this design's default.
module mux4 #(
  parameter int unsigned WIDTH = 64
) (
  input  logic [1:0]       sel,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] y
);

  always_comb begin
    unique case (sel)
      2'b00: y = a;
      2'b01: y = b;
      2'b10: y = c;
      2'b11: y = d;
    endcase
  end

endmodule
