// branch_unit: decode-stage branch decision of the pipelined processor.
//
// Combinational.  Compares the two source operands (already bypassed from
// write-back where needed) by the branch's funct3: BEQ, BNE, BLT, BGE
// (signed) and BLTU, BGEU (unsigned).  taken is high only when branch is
// high and the condition holds.  Resolving branches in decode limits the
// cost of a taken branch to one squashed fetch.
//
// A decode-stage branch unit appears in the reference pipeline diagram;
// its conditions are the RV32I ones.
module branch_unit
  import rv32_pkg::*;
(
  input  logic        branch,
  input  logic [2:0]  funct3,
  input  logic [31:0] op1,
  input  logic [31:0] op2,
  output logic        taken
);

  logic cond;

  always_comb begin
    unique case (funct3)
      F3_BEQ:  cond = (op1 == op2);
      F3_BNE:  cond = (op1 != op2);
      F3_BLT:  cond = ($signed(op1) < $signed(op2));
      F3_BGE:  cond = ($signed(op1) >= $signed(op2));
      F3_BLTU: cond = (op1 < op2);
      F3_BGEU: cond = (op1 >= op2);
      default: cond = 1'b0;
    endcase
  end

  assign taken = branch && cond;

endmodule
