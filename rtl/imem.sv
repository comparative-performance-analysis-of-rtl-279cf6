// imem: instruction memory of the pipelined processor.
//
// MEM_SIZE 32-bit words (16384 = 64 KB by default) with a registered,
// synchronous read, so that it maps onto FPGA block RAM.  When en is high
// the word at byte address addr is latched at the rising edge and shows
// on rdata in the next cycle; when en is low rdata holds, which is how
// the pipeline freezes its fetch during a stall.  The output register
// thus doubles as the instruction half of the IF/ID pipeline register.
// The word index is addr[AW+1:2] and wraps modulo the memory size.
// Contents are cleared at start-up and then loaded from INIT_FILE
// ($readmemh format) when a file name is given.
//
// The 64 KB size and block-RAM mapping follow the reference pipelined
// design; using the enable for stalls is this design's own.
module imem #(
  parameter int unsigned MEM_SIZE  = 16384,
  parameter string       INIT_FILE = ""
) (
  input  logic        clk,
  input  logic        en,
  input  logic [31:0] addr,
  output logic [31:0] rdata
);

  localparam int unsigned AW = $clog2(MEM_SIZE);

  logic [31:0] mem [MEM_SIZE];

  initial begin
    for (int i = 0; i < int'(MEM_SIZE); i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (en) rdata <= mem[addr[AW+1:2]];
  end

endmodule
