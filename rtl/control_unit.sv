// control_unit: main decoder shared by both processors.
//
// Combinational.  Turns the 7-bit opcode into the control bundle ctrl_t:
// register write enable, data-memory read and write, branch/JAL/JALR
// flags, the ALU operation class, the operand-A source (rs1, PC or PC+4),
// the operand-B source (rs2 or immediate), the immediate format and the
// write-back source (ALU or memory).  It also says which source registers
// the instruction really reads, which the pipelined hazard logic needs.
// FENCE, ECALL/EBREAK and unknown opcodes decode as no-operations; RV32I
// semantics otherwise.  JAL and JALR route PC+4 through the ALU (pass A)
// to the destination register, LUI routes its immediate (pass B).
//
// An opcode-driven control unit is part of both reference datapaths; the
// signal set and encodings are this design's own.
module control_unit
  import rv32_pkg::*;
(
  input  logic [6:0] opcode,
  output ctrl_t      ctrl
);

  always_comb begin
    ctrl = '{reg_write: 1'b0, mem_read: 1'b0, mem_write: 1'b0,
             branch: 1'b0, jal: 1'b0, jalr: 1'b0,
             uses_rs1: 1'b0, uses_rs2: 1'b0,
             alu_class: ALUC_ADD, opa_sel: OPA_RS1, opb_sel: OPB_IMM,
             imm_sel: IMM_I, wb_sel: WB_ALU};
    unique case (opcode)
      OPC_REG: begin
        ctrl.reg_write = 1'b1;
        ctrl.uses_rs1  = 1'b1;
        ctrl.uses_rs2  = 1'b1;
        ctrl.alu_class = ALUC_REG;
        ctrl.opb_sel   = OPB_RS2;
      end
      OPC_IMM: begin
        ctrl.reg_write = 1'b1;
        ctrl.uses_rs1  = 1'b1;
        ctrl.alu_class = ALUC_IMM;
      end
      OPC_LOAD: begin
        ctrl.reg_write = 1'b1;
        ctrl.mem_read  = 1'b1;
        ctrl.uses_rs1  = 1'b1;
        ctrl.wb_sel    = WB_MEM;
      end
      OPC_STORE: begin
        ctrl.mem_write = 1'b1;
        ctrl.uses_rs1  = 1'b1;
        ctrl.uses_rs2  = 1'b1;
        ctrl.imm_sel   = IMM_S;
      end
      OPC_BRANCH: begin
        ctrl.branch    = 1'b1;
        ctrl.uses_rs1  = 1'b1;
        ctrl.uses_rs2  = 1'b1;
        ctrl.alu_class = ALUC_BRANCH;
        ctrl.opb_sel   = OPB_RS2;
        ctrl.imm_sel   = IMM_B;
      end
      OPC_JAL: begin
        ctrl.reg_write = 1'b1;
        ctrl.jal       = 1'b1;
        ctrl.alu_class = ALUC_PASSA;
        ctrl.opa_sel   = OPA_PC4;
        ctrl.imm_sel   = IMM_J;
      end
      OPC_JALR: begin
        ctrl.reg_write = 1'b1;
        ctrl.jalr      = 1'b1;
        ctrl.uses_rs1  = 1'b1;
        ctrl.alu_class = ALUC_PASSA;
        ctrl.opa_sel   = OPA_PC4;
      end
      OPC_LUI: begin
        ctrl.reg_write = 1'b1;
        ctrl.alu_class = ALUC_PASSB;
        ctrl.imm_sel   = IMM_U;
      end
      OPC_AUIPC: begin
        ctrl.reg_write = 1'b1;
        ctrl.opa_sel   = OPA_PC;
        ctrl.imm_sel   = IMM_U;
      end
      default: ;  // FENCE, SYSTEM and unknown opcodes: no effect
    endcase
  end

endmodule
