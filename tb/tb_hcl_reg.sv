// tb_hcl_reg: checks the register element against a reference copy held in
// the testbench: initial value after reset, update on every enabled edge,
// hold while en is low. Random data, 200 cycles.
module tb_hcl_reg;
  localparam int W = 16;
  localparam logic [W-1:0] INIT = 16'hA5C3;
  logic clk = 0, rst, en;
  logic [W-1:0] d, q, ref_q;
  int checks = 0, failures = 0;

  hcl_reg #(.WIDTH(W), .INIT(INIT)) dut (.clk(clk), .rst(rst), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1; en = 0; d = '0;
    @(posedge clk); #1; rst = 0;
    checks++; if (q !== INIT) begin failures++; $display("FAIL init q=%h", q); end
    ref_q = INIT;
    for (int i = 0; i < 200; i++) begin
      d = W'($urandom); en = ($urandom % 3) != 0;
      @(posedge clk); #1;
      if (en) ref_q = d;
      checks++; if (q !== ref_q) begin failures++; $display("FAIL cycle %0d q=%h exp=%h", i, q, ref_q); end
    end
    rst = 1; @(posedge clk); #1; rst = 0;
    checks++; if (q !== INIT) begin failures++; $display("FAIL reset q=%h", q); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
