// forwarding_unit: operand bypass selection for the pipelined processor.
//
// Combinational.  Execute stage: for each source register of the
// instruction in ID/EX it picks the ALU result held in EX/MEM ("from ex")
// when the instruction there writes that register, else the write-back
// value in MEM/WB ("from wb") when that one writes it, else the value read
// in decode.  The younger producer wins.  Decode stage: for each source
// register of the instruction in IF/ID it flags when MEM/WB is writing
// that register in the same cycle, so decode takes the write-back value
// instead of the register file's stale one.  Register x0 is never
// forwarded.  A load in EX/MEM is never forwarded from there; the hazard
// unit keeps a dependent instruction back until the load reaches MEM/WB.
//
// The 'from ex', 'from wb' and decode write-back paths follow the
// reference pipeline diagram; the priority rule is this design's own.
module forwarding_unit
  import rv32_pkg::*;
(
  // execute-stage consumers (ID/EX)
  input  logic [4:0] ex_rs1,
  input  logic [4:0] ex_rs2,
  // decode-stage consumers (IF/ID)
  input  logic [4:0] id_rs1,
  input  logic [4:0] id_rs2,
  // producers
  input  logic       mem_reg_write,
  input  logic       mem_mem_read,
  input  logic [4:0] mem_rd,
  input  logic       wb_reg_write,
  input  logic [4:0] wb_rd,
  output fwd_sel_e   fwd_a,
  output fwd_sel_e   fwd_b,
  output logic       fwd_id_a,
  output logic       fwd_id_b
);

  function automatic fwd_sel_e pick(input logic [4:0] rs);
    if (mem_reg_write && !mem_mem_read && mem_rd != '0 && mem_rd == rs) return FWD_EX;
    if (wb_reg_write && wb_rd != '0 && wb_rd == rs)                     return FWD_WB;
    return FWD_REG;
  endfunction

  assign fwd_a    = pick(ex_rs1);
  assign fwd_b    = pick(ex_rs2);
  assign fwd_id_a = wb_reg_write && wb_rd != '0 && wb_rd == id_rs1;
  assign fwd_id_b = wb_reg_write && wb_rd != '0 && wb_rd == id_rs2;

endmodule
