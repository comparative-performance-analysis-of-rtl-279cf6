// dmem: data memory of the pipelined processor.
//
// MEM_SIZE 32-bit words (16384 = 64 KB by default) written as a
// single-port block RAM: when en is high, each byte lane whose we bit is
// set takes the matching byte of wdata at the rising edge, and the word
// at addr is latched onto rdata (read-before-write: a store returns the
// old contents).  A load issued in the memory stage therefore has its
// word on rdata in the write-back stage.  Byte placement and load
// extension are done outside, by mem_align.  The word index is
// addr[AW+1:2] and wraps modulo the memory size.  Contents are cleared at
// start-up.
//
// The 64 KB size, block-RAM mapping and en/we[3:0]/addr/wdata/rdata ports
// follow the reference pipelined design; read-before-write is this
// design's own choice.
module dmem #(
  parameter int unsigned MEM_SIZE = 16384
) (
  input  logic        clk,
  input  logic        en,
  input  logic [3:0]  we,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata
);

  localparam int unsigned AW = $clog2(MEM_SIZE);

  logic [31:0] mem [MEM_SIZE];
  logic [AW-1:0] word_addr;

  initial for (int i = 0; i < int'(MEM_SIZE); i++) mem[i] = '0;

  assign word_addr = addr[AW+1:2];

  always_ff @(posedge clk) begin
    if (en) begin
      rdata <= mem[word_addr];
      for (int b = 0; b < 4; b++)
        if (we[b]) mem[word_addr][8*b +: 8] <= wdata[8*b +: 8];
    end
  end

endmodule
