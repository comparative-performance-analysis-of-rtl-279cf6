// hazard_unit: stall and flush control of the pipelined processor.
//
// Combinational.  A stall holds the PC and IF/ID and sends a bubble into
// ID/EX for one cycle.  It is raised when the instruction in decode reads
// a register that
//   * a load in execute will write (load-use: the loaded word is only
//     available from write-back), or
//   * any instruction in execute or memory will write, and the decode
//     instruction is a branch or JALR, which consumes its operands in
//     decode where only the write-back value can be bypassed.
// Register x0 never causes a stall.  flush squashes the instruction being
// fetched when decode redirects the PC (taken branch, JAL, JALR); it is
// suppressed while stalling, because the redirect is then not yet valid.
//
// Hazard detection and the stall appear in the reference pipeline diagram;
// the exact stall conditions follow from its forwarding paths and are
// this design's own.
module hazard_unit (
  input  logic       id_uses_rs1,
  input  logic       id_uses_rs2,
  input  logic [4:0] id_rs1,
  input  logic [4:0] id_rs2,
  input  logic       id_needs_early,  // branch or JALR in decode
  input  logic       id_redirect,     // decode wants to change the PC
  input  logic       ex_reg_write,
  input  logic       ex_mem_read,
  input  logic [4:0] ex_rd,
  input  logic       mem_reg_write,
  input  logic [4:0] mem_rd,
  output logic       stall,
  output logic       flush
);

  logic dep_ex, dep_mem;

  assign dep_ex  = ex_reg_write && ex_rd != '0 &&
                   ((id_uses_rs1 && id_rs1 == ex_rd) || (id_uses_rs2 && id_rs2 == ex_rd));
  assign dep_mem = mem_reg_write && mem_rd != '0 &&
                   ((id_uses_rs1 && id_rs1 == mem_rd) || (id_uses_rs2 && id_rs2 == mem_rd));

  assign stall = (dep_ex && (ex_mem_read || id_needs_early)) ||
                 (dep_mem && id_needs_early);
  assign flush = id_redirect && !stall;

endmodule
