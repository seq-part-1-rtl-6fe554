// case_mux: a priority case expression built as a chain of multiplexers.
//
// The conditions are tried in order and the first one that holds picks the
// output: x == 5 gives 1, x equal to 0 or 6 gives 2, x > 2 gives 3, and
// anything else gives 4. So x = 5 -> 1, 6 -> 2, 3 and 4 -> 3, 1 -> 4.
// Combinational. The input width (64, the machine word) and the 3-bit result
// are this design's choices; x is compared as an unsigned number.
module case_mux #(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] x,
  output logic [2:0]       result
);

  always_comb begin
    if (x == WIDTH'(5))                          result = 3'd1;
    else if (x inside {WIDTH'(0), WIDTH'(6)})    result = 3'd2;
    else if (x > WIDTH'(2))                      result = 3'd3;
    else                                         result = 3'd4;
  end

endmodule
