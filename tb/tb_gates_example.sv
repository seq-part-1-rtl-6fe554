// tb_gates_example: the printed case (a = 0b10, b = 0b11 gives AND 0b10 and
// sum 0b01) and then all sixteen input pairs against integer arithmetic.
module tb_gates_example;
  logic [1:0] a, b, c_and, c_add;
  int checks = 0, failures = 0;

  gates_example dut (.a(a), .b(b), .c_and(c_and), .c_add(c_add));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    a = 2'b10; b = 2'b11; #1;
    checks++; if (c_and !== 2'b10) begin failures++; $display("FAIL and %b", c_and); end
    checks++; if (c_add !== 2'b01) begin failures++; $display("FAIL add %b", c_add); end
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        a = 2'(i); b = 2'(j); #1;
        checks++; if (int'(c_and) != (i & j)) begin failures++; $display("FAIL %0d&%0d=%0d", i, j, c_and); end
        checks++; if (int'(c_add) != ((i + j) % 4)) begin failures++; $display("FAIL %0d+%0d=%0d", i, j, c_add); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
