// regfile: the 32 x 32-bit integer register file.
//
// Two asynchronous read ports (rs1, rs2) and one write port that writes
// on the rising clock edge when we is high.  Register x0 always reads as
// zero and ignores writes.  A synchronous, active-high reset clears every
// register so that simulation and hardware start from a known state.
// The read ports return the value stored before the edge; the pipelined
// core adds its own write-to-read bypass around this block.
//
// A two-read, one-write register file is part of the reference datapath;
// asynchronous read and the reset are this design's own choices.
module regfile #(
  parameter int unsigned XLEN  = 32,
  parameter int unsigned NREGS = 32
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [$clog2(NREGS)-1:0] ra1,
  input  logic [$clog2(NREGS)-1:0] ra2,
  output logic [XLEN-1:0]          rd1,
  output logic [XLEN-1:0]          rd2,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] wa,
  input  logic [XLEN-1:0]          wd
);

  logic [XLEN-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = (ra1 == '0) ? '0 : regs[ra1];
  assign rd2 = (ra2 == '0) ? '0 : regs[ra2];

endmodule
