// rv32_single_top: the single-cycle processor with its memories.
//
// Joins rv32_single_core to a 64 KB asynchronous-read instruction memory
// (instr_mem) and a 64 KB asynchronous-read data memory (data_mem), the
// LUT-based memory style a single-cycle datapath needs.  Programs leave
// their result in data word 0 (byte address 0 modulo the memory size),
// which is brought out continuously as final_result; its low 16 bits
// also drive the board LEDs.  reset is
// synchronous and active high.  One instruction completes per clock.
//
// Port names and the result in data word 0 follow the reference design;
// the LED mapping of the low 16 bits is this design's reading of it.
module rv32_single_top #(
  parameter int unsigned MEM_SIZE  = 16384,   // words per memory
  parameter string       INIT_FILE = ""       // instruction memory image
) (
  input  logic        clk,
  input  logic        reset,
  output logic [31:0] final_result,
  output logic [15:0] leds
);

  logic [31:0] imem_addr, imem_inst, dmem_addr, dmem_wr_data, dmem_rd_data;
  logic [2:0]  dmem_funct3;
  logic        dmem_wr_en, retire;

  rv32_single_core u_core (
    .clk(clk), .rst(reset),
    .imem_addr(imem_addr), .imem_inst(imem_inst),
    .dmem_wr_en(dmem_wr_en), .dmem_funct3(dmem_funct3), .dmem_addr(dmem_addr),
    .dmem_wr_data(dmem_wr_data), .dmem_rd_data(dmem_rd_data),
    .retire(retire)
  );

  instr_mem #(.MEM_SIZE(MEM_SIZE), .INIT_FILE(INIT_FILE)) u_imem (
    .addr(imem_addr), .inst(imem_inst)
  );

  data_mem #(.DATA_WIDTH(32), .ADDR_WIDTH(32), .MEM_SIZE(MEM_SIZE)) u_dmem (
    .clk(clk), .wr_en(dmem_wr_en), .funct3(dmem_funct3), .addr(dmem_addr),
    .wr_data(dmem_wr_data), .rd_data(dmem_rd_data), .debug_data(final_result)
  );

  assign leds = final_result[15:0];

endmodule
