// tb_mux4: every select value with random data; the output must equal the
// input the truth table names (00 a, 01 b, 10 c, 11 d).
module tb_mux4;
  logic [1:0] sel;
  logic [63:0] a, b, c, d, y, e;
  int checks = 0, failures = 0;

  mux4 dut (.sel(sel), .a(a), .b(b), .c(c), .d(d), .y(y));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      c = {$urandom, $urandom}; d = {$urandom, $urandom};
      sel = 2'(i);
      #1;
      e = (sel == 2'd0) ? a : (sel == 2'd1) ? b : (sel == 2'd2) ? c : d;
      checks++; if (y !== e) begin failures++; $display("FAIL sel=%0d y=%h exp=%h", sel, y, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
