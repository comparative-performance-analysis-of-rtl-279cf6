// instr_mem: instruction memory of the single-cycle processor.
//
// A read-only word array of MEM_SIZE 32-bit words (16384 words = 64 KB by
// default) with an asynchronous read: the instruction at byte address
// addr appears in the same cycle, as a single-cycle datapath needs (on an
// FPGA this maps to LUT-based distributed memory).  The word index is
// addr[ADDR_LSB +: $clog2(MEM_SIZE)], so addresses wrap modulo the memory
// size and the two low address bits are ignored.  Contents are cleared at
// start-up and then loaded from INIT_FILE (Intel-style $readmemh text,
// one 32-bit word per entry) when a file name is given.
//
// The 64 KB size and the LUT-memory (asynchronous) style follow the
// reference single-cycle design; the address wrap is this design's own.
module instr_mem #(
  parameter int unsigned MEM_SIZE  = 16384,
  parameter string       INIT_FILE = ""
) (
  input  logic [31:0] addr,
  output logic [31:0] inst
);

  localparam int unsigned AW = $clog2(MEM_SIZE);

  logic [31:0] mem [MEM_SIZE];

  initial begin
    for (int i = 0; i < int'(MEM_SIZE); i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  assign inst = mem[addr[AW+1:2]];

endmodule
