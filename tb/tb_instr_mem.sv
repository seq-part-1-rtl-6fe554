// tb_instr_mem: loads the eleven example bytes 60 12 61 21 00 00 00 00 00 00 01
// and checks the ten-byte words read at pc = 0..3 against hand-assembled
// values (the 01 at address 0xa is only included from pc = 1 on). Then loads
// random bytes and compares random reads, including reads that run past the
// end of the memory (those bytes read as 0) and a read whose address wraps
// past 2^64 back to 0, with a reference array.
module tb_instr_mem;
  localparam int unsigned MB = 256;
  logic clk = 0, load_en;
  logic [63:0] load_addr, pc;
  logic [7:0] load_data;
  logic [79:0] i10bytes, e;
  logic [7:0] refmem [MB];
  int checks = 0, failures = 0;

  instr_mem #(.MEM_BYTES(MB)) dut (.clk(clk), .load_en(load_en), .load_addr(load_addr),
                                   .load_data(load_data), .pc(pc), .i10bytes(i10bytes));

  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic put(input logic [63:0] a, input logic [7:0] v);
    load_en = 1; load_addr = a; load_data = v;
    @(posedge clk); #1; load_en = 0;
    if (a < 64'(MB)) refmem[a[7:0]] = v;
  endtask

  task automatic look(input logic [63:0] p, input logic [79:0] ev);
    pc = p; #1;
    checks++; if (i10bytes !== ev) begin failures++; $display("FAIL pc=%h got %h exp %h", p, i10bytes, ev); end
  endtask

  function automatic logic [79:0] model(input logic [63:0] p);
    logic [79:0] r;
    for (int k = 0; k < 10; k++) r[8*k +: 8] = (p + 64'(k) < 64'(MB)) ? refmem[8'(p + 64'(k))] : 8'h00;
    return r;
  endfunction

  initial begin
    load_en = 0; load_addr = 0; load_data = 0; pc = 0;
    for (int a = 0; a < MB; a++) put(64'(a), 8'h00);
    put(0, 8'h60); put(1, 8'h12); put(2, 8'h61); put(3, 8'h21); put(10, 8'h01);
    look(64'h0, 80'h00000000000021611260);
    look(64'h1, 80'h01000000000000216112);
    look(64'h2, 80'h00010000000000002161);
    look(64'h3, 80'h00000100000000000021);
    for (int i = 0; i < 300; i++) put(64'($urandom % MB), 8'($urandom));
    put(64'(MB + 3), 8'hFF);   // outside the memory: ignored
    for (int i = 0; i < 300; i++) begin
      logic [63:0] p; p = 64'($urandom % (MB + 16));
      look(p, model(p));
    end
    look(64'hFFFF_FFFF_FFFF_FFFB, model(64'hFFFF_FFFF_FFFF_FFFB));   // wraps to address 0
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
