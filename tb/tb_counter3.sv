// tb_counter3: the counter starts at 000 and counts 001, 010, 011, ... one
// step per rising edge, wrapping after 111; next_count is always count + 1.
module tb_counter3;
  logic clk = 0, rst;
  logic [2:0] count, next_count;
  int checks = 0, failures = 0;

  counter3 dut (.clk(clk), .rst(rst), .count(count), .next_count(next_count));

  always #5 clk = ~clk;

  initial begin
    #10000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1; @(posedge clk); #1; rst = 0;
    for (int n = 0; n < 20; n++) begin
      checks++; if (count !== 3'(n)) begin failures++; $display("FAIL edge %0d count=%b", n, count); end
      checks++; if (next_count !== 3'(n + 1)) begin failures++; $display("FAIL edge %0d next=%b", n, next_count); end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
