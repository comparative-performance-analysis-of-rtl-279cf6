// data_mem: data memory of the single-cycle processor.
//
// MEM_SIZE 32-bit words (16384 = 64 KB by default).  Reads are
// asynchronous, so a load completes within the single cycle; writes take
// effect on the rising clock edge when wr_en is high.  funct3 of the load
// or store selects the access size: byte (LB/LBU/SB), halfword
// (LH/LHU/SH) or word (LW/SW), with loads sign- or zero-extended as RV32I
// defines.  The byte lane comes from addr[1:0]; halfwords use addr[1]
// only, so accesses are assumed aligned.  The word index wraps modulo the
// memory size.  debug_data always shows word 0, where the test programs
// leave their result.  Contents are cleared at start-up.
//
// The 64 KB size, the DATA_WIDTH/ADDR_WIDTH/MEM_SIZE parameters and the
// funct3/debug ports follow the reference single-cycle design; the single
// shared address port and alignment rule are this design's own.
module data_mem #(
  parameter int unsigned DATA_WIDTH = 32,
  parameter int unsigned ADDR_WIDTH = 32,
  parameter int unsigned MEM_SIZE   = 16384
) (
  input  logic                  clk,
  input  logic                  wr_en,
  input  logic [2:0]            funct3,
  input  logic [ADDR_WIDTH-1:0] addr,
  input  logic [DATA_WIDTH-1:0] wr_data,
  output logic [DATA_WIDTH-1:0] rd_data,
  output logic [DATA_WIDTH-1:0] debug_data
);

  localparam int unsigned AW = $clog2(MEM_SIZE);

  logic [DATA_WIDTH-1:0] data_ram [MEM_SIZE];
  logic [AW-1:0]         word_addr;
  logic [DATA_WIDTH-1:0] word;
  logic [7:0]            rbyte;
  logic [15:0]           rhalf;

  initial for (int i = 0; i < int'(MEM_SIZE); i++) data_ram[i] = '0;

  assign word_addr = addr[AW+1:2];
  assign word      = data_ram[word_addr];
  assign rbyte     = word[8*addr[1:0] +: 8];
  assign rhalf     = word[16*addr[1] +: 16];

  always_comb begin
    unique case (funct3)
      3'b000:  rd_data = DATA_WIDTH'({{24{rbyte[7]}}, rbyte});   // LB
      3'b001:  rd_data = DATA_WIDTH'({{16{rhalf[15]}}, rhalf});  // LH
      3'b100:  rd_data = DATA_WIDTH'({24'b0, rbyte});            // LBU
      3'b101:  rd_data = DATA_WIDTH'({16'b0, rhalf});            // LHU
      default: rd_data = word;                                   // LW
    endcase
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      unique case (funct3[1:0])
        2'b00:   data_ram[word_addr][8*addr[1:0] +: 8] <= wr_data[7:0];
        2'b01:   data_ram[word_addr][16*addr[1] +: 16] <= wr_data[15:0];
        default: data_ram[word_addr] <= wr_data;
      endcase
    end
  end

  assign debug_data = data_ram[0];

endmodule
