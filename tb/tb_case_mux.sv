// tb_case_mux: the worked examples (x = 5 -> 1, 6 -> 2, 3 -> 3, 4 -> 3,
// 1 -> 4) plus x = 0..20 and random large values against a reference that
// tries the conditions in order.
module tb_case_mux;
  logic [63:0] x;
  logic [2:0] result;
  int checks = 0, failures = 0;

  case_mux dut (.x(x), .result(result));

  function automatic logic [2:0] model(input logic [63:0] v);
    if (v == 5) return 1;
    if (v == 0 || v == 6) return 2;
    if (v > 2) return 3;
    return 4;
  endfunction

  task automatic try_x(input logic [63:0] v, input logic [2:0] e);
    x = v; #1;
    checks++; if (result !== e) begin failures++; $display("FAIL x=%0d result=%0d exp=%0d", v, result, e); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    try_x(5, 1); try_x(6, 2); try_x(3, 3); try_x(4, 3); try_x(1, 4);
    for (int v = 0; v <= 20; v++) try_x(64'(v), model(64'(v)));
    for (int i = 0; i < 50; i++) begin
      logic [63:0] r; r = {$urandom, $urandom}; try_x(r, model(r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
