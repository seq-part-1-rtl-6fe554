// tb_ab_regs: from a = b = 1 the registers must read (2,3) after one edge and
// (5,7) after two; later edges are checked against a 4-bit reference of
// x_a = a + b, x_b = x_a + a.
module tb_ab_regs;
  logic clk = 0, rst;
  logic [3:0] ya, yb, ra, rb, na;
  int checks = 0, failures = 0;

  ab_regs dut (.clk(clk), .rst(rst), .ya(ya), .yb(yb));

  always #5 clk = ~clk;

  initial begin
    #10000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic expect_ab(input logic [3:0] ea, input logic [3:0] eb, input string what);
    checks++;
    if (ya !== ea || yb !== eb) begin
      failures++; $display("FAIL %s: a=%0d b=%0d expected %0d %0d", what, ya, yb, ea, eb);
    end
  endtask

  initial begin
    rst = 1; @(posedge clk); #1; rst = 0;
    expect_ab(4'd1, 4'd1, "initial");
    @(posedge clk); #1; expect_ab(4'd2, 4'd3, "one edge");
    @(posedge clk); #1; expect_ab(4'd5, 4'd7, "two edges");
    ra = 4'd5; rb = 4'd7;
    for (int i = 0; i < 10; i++) begin
      na = ra + rb; rb = na + ra; ra = na;
      @(posedge clk); #1; expect_ab(ra, rb, "later edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
