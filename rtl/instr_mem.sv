// instr_mem: byte-addressed program memory with a ten-byte fetch port.
//
// The CPU presents an address pc and reads back the ten bytes at pc .. pc+9 as
// one 80-bit word, i10bytes, little endian: the byte at pc is bits 7:0, the
// byte at pc+1 bits 15:8, and so on up to pc+9 in bits 79:72. For the bytes
// 60 12 61 21 00 00 00 00 00 00 01 at addresses 0..a, pc = 0 reads
// 0x00000000000021611260; the 01 at address a is the eleventh byte and is not
// included. The read is combinational: the output follows the address after
// a logic delay, with no clock.
//
// Storage is MEM_BYTES bytes (a size of this design's choosing). Addresses at
// or above MEM_BYTES read as 0, as unused memory does. A program is loaded one
// byte per clock through the write port (load_en, load_addr, load_data); the
// port and the size are this design's own.
module instr_mem #(
  parameter int unsigned MEM_BYTES = 4096
) (
  input  logic        clk,
  input  logic        load_en,
  input  logic [63:0] load_addr,
  input  logic [7:0]  load_data,
  input  logic [63:0] pc,
  output logic [79:0] i10bytes
);

  logic [7:0] mem [MEM_BYTES];

  always_ff @(posedge clk) begin
    if (load_en && load_addr < 64'(MEM_BYTES))
      mem[load_addr[$clog2(MEM_BYTES)-1:0]] <= load_data;
  end

  always_comb begin
    for (int k = 0; k < 10; k++) begin
      logic [63:0] addr;
      addr = pc + 64'(k);
      if (addr < 64'(MEM_BYTES)) i10bytes[8*k +: 8] = mem[addr[$clog2(MEM_BYTES)-1:0]];
      else                       i10bytes[8*k +: 8] = 8'h00;
    end
  end

endmodule
