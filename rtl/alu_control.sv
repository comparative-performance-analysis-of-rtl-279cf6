// alu_control: chooses the ALU operation.
//
// Combinational.  The control unit gives an operation class from the
// opcode; this block refines it with funct3 and bit 30 of the instruction
// (the only funct7 bit RV32I uses).  R-type uses bit 30 for SUB and SRA;
// I-type uses it only for SRAI, so ADDI with a negative immediate is not
// mistaken for a subtract.  Branch compares map BEQ/BNE to SUB, BLT/BGE
// to SLT and BLTU/BGEU to SLTU, so that the Zero flag decides the branch.
//
// A separate ALU control fed by funct3 and funct7 follows the reference
// pipeline diagram; the class encoding is this design's own.
module alu_control
  import rv32_pkg::*;
(
  input  alu_class_e  alu_class,
  input  logic [2:0]  funct3,
  input  logic        funct7_b5,
  output alu_op_e     alu_op
);

  function automatic alu_op_e arith(input logic [2:0] f3, input logic alt, input logic is_reg);
    unique case (f3)
      3'b000:  return (is_reg && alt) ? ALU_SUB : ALU_ADD;
      3'b001:  return ALU_SLL;
      3'b010:  return ALU_SLT;
      3'b011:  return ALU_SLTU;
      3'b100:  return ALU_XOR;
      3'b101:  return alt ? ALU_SRA : ALU_SRL;
      3'b110:  return ALU_OR;
      default: return ALU_AND;
    endcase
  endfunction

  always_comb begin
    unique case (alu_class)
      ALUC_ADD:    alu_op = ALU_ADD;
      ALUC_BRANCH: begin
        unique case (funct3[2:1])
          2'b00:   alu_op = ALU_SUB;
          2'b10:   alu_op = ALU_SLT;
          2'b11:   alu_op = ALU_SLTU;
          default: alu_op = ALU_SUB;
        endcase
      end
      ALUC_REG:    alu_op = arith(funct3, funct7_b5, 1'b1);
      ALUC_IMM:    alu_op = arith(funct3, funct7_b5, 1'b0);
      ALUC_PASSA:  alu_op = ALU_PASSA;
      ALUC_PASSB:  alu_op = ALU_PASSB;
      default:     alu_op = ALU_ADD;
    endcase
  end

endmodule
