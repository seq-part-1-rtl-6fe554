// tb_mux_exercise: the three exercise questions (bar = 9 -> 200, 10 -> 300,
// 11 -> 100) plus a sweep of small values against an in-order reference.
module tb_mux_exercise;
  logic [63:0] bar;
  logic [8:0] foo;
  int checks = 0, failures = 0;

  mux_exercise dut (.bar(bar), .foo(foo));

  function automatic int model(input longint unsigned v);
    if (v > 10) return 100;
    if ((v & 1) == 1) return 200;
    if (v < 20) return 300;
    return 400;
  endfunction

  task automatic try_bar(input logic [63:0] v, input int e);
    bar = v; #1;
    checks++; if (int'(foo) != e) begin failures++; $display("FAIL bar=%0d foo=%0d exp=%0d", v, foo, e); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    try_bar(9, 200); try_bar(10, 300); try_bar(11, 100);
    for (int v = 0; v < 40; v++) try_bar(64'(v), model(longint'(v)));
    for (int i = 0; i < 50; i++) begin
      logic [63:0] r; r = {$urandom, $urandom}; try_bar(r, model(r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
