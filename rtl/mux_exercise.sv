// mux_exercise: the four-way priority multiplexer of the MUX exercise.
//
// foo is 100 when bar > 10, else 200 when bar is odd, else 300 when bar < 20,
// else 400. Conditions are tried in order, so bar = 9 gives 200, bar = 10
// gives 300 and bar = 11 gives 100. Combinational. bar is an unsigned 64-bit
// word and foo 9 bits wide; both widths are this design's choice. With an
// unsigned bar the last two arms are only reached for even bar <= 10, so foo
// is never 400; the arm is kept to mirror the expression.
module mux_exercise #(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] bar,
  output logic [8:0]       foo
);

  always_comb begin
    if (bar > WIDTH'(10))       foo = 9'd100;
    else if (bar[0])            foo = 9'd200;
    else if (bar < WIDTH'(20))  foo = 9'd300;
    else                        foo = 9'd400;
  end

endmodule
