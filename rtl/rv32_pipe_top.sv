// rv32_pipe_top: the pipelined processor as a board-level design.
//
// Joins rv32_pipe_core to a 64 KB instruction memory (imem) and a 64 KB
// data memory (dmem), both synchronous-read so they map onto block RAM.
// rst_btn is a push button: it is passed through two flip-flops before
// it resets the core (synchronous, active high).  leds shows the low 16
// bits of data word 0, the word the test programs leave their result in:
// a result register watches the data-memory port and takes every byte
// stored to word 0 (address 0 modulo the memory size), so the LEDs follow
// memory without a second read port.  It is cleared by reset, like the
// memory contents are at start-up.
//
// Port names (clk, rst_btn, leds[15:0]) and the result in data word 0
// follow the reference design; the synchronizer and the result register
// are this design's own.
module rv32_pipe_top #(
  parameter int unsigned MEM_SIZE  = 16384,   // words per memory
  parameter string       INIT_FILE = ""       // instruction memory image
) (
  input  logic        clk,
  input  logic        rst_btn,
  output logic [15:0] leds
);

  localparam int unsigned AW = $clog2(MEM_SIZE);

  logic [1:0]  rst_sync;
  logic        rst;
  logic        imem_en, dmem_en, retire, stall, flush;
  logic [31:0] imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata;
  logic [3:0]  dmem_we;
  logic [31:0] result_q;

  always_ff @(posedge clk) rst_sync <= {rst_sync[0], rst_btn};
  assign rst = rst_sync[1];

  rv32_pipe_core u_core (
    .clk(clk), .rst(rst),
    .imem_en(imem_en), .imem_addr(imem_addr), .imem_rdata(imem_rdata),
    .dmem_en(dmem_en), .dmem_we(dmem_we), .dmem_addr(dmem_addr),
    .dmem_wdata(dmem_wdata), .dmem_rdata(dmem_rdata),
    .retire(retire), .stall(stall), .flush(flush)
  );

  imem #(.MEM_SIZE(MEM_SIZE), .INIT_FILE(INIT_FILE)) u_imem (
    .clk(clk), .en(imem_en), .addr(imem_addr), .rdata(imem_rdata)
  );

  dmem #(.MEM_SIZE(MEM_SIZE)) u_dmem (
    .clk(clk), .en(dmem_en), .we(dmem_we), .addr(dmem_addr),
    .wdata(dmem_wdata), .rdata(dmem_rdata)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      result_q <= '0;
    end else if (dmem_en && dmem_addr[AW+1:2] == '0) begin
      for (int b = 0; b < 4; b++)
        if (dmem_we[b]) result_q[8*b +: 8] <= dmem_wdata[8*b +: 8];
    end
  end

  assign leds = result_q[15:0];

endmodule
