// rv32_pkg: types and constants shared by both RV32I processors.
//
// Holds the RV32I major opcodes, the ALU operation codes, the ALU
// operation classes that the control unit hands to the ALU control, the
// immediate-format and operand-select codes, and the control-signal
// bundle (ctrl_t) that both the single-cycle datapath and the ID/EX
// pipeline register carry.  The opcode and funct values are those of the
// RV32I base ISA; the encodings of the internal select codes are this
// design's own choice.
//
// The RV32I opcode and funct values are standard; the grouping into these
// types follows the reference datapath, the encodings are this design's.
package rv32_pkg;

  localparam int unsigned XLEN = 32;

  // RV32I major opcodes (instruction bits 6:0)
  typedef enum logic [6:0] {
    OPC_LOAD   = 7'b0000011,
    OPC_FENCE  = 7'b0001111,
    OPC_IMM    = 7'b0010011,
    OPC_AUIPC  = 7'b0010111,
    OPC_STORE  = 7'b0100011,
    OPC_REG    = 7'b0110011,
    OPC_LUI    = 7'b0110111,
    OPC_BRANCH = 7'b1100011,
    OPC_JALR   = 7'b1100111,
    OPC_JAL    = 7'b1101111,
    OPC_SYSTEM = 7'b1110011
  } opcode_e;

  // Branch funct3 values
  localparam logic [2:0] F3_BEQ  = 3'b000;
  localparam logic [2:0] F3_BNE  = 3'b001;
  localparam logic [2:0] F3_BLT  = 3'b100;
  localparam logic [2:0] F3_BGE  = 3'b101;
  localparam logic [2:0] F3_BLTU = 3'b110;
  localparam logic [2:0] F3_BGEU = 3'b111;

  // Load/store funct3 values
  localparam logic [2:0] F3_B  = 3'b000;
  localparam logic [2:0] F3_H  = 3'b001;
  localparam logic [2:0] F3_W  = 3'b010;
  localparam logic [2:0] F3_BU = 3'b100;
  localparam logic [2:0] F3_HU = 3'b101;

  // Operations the ALU performs
  typedef enum logic [3:0] {
    ALU_ADD   = 4'd0,
    ALU_SUB   = 4'd1,
    ALU_SLL   = 4'd2,
    ALU_SLT   = 4'd3,
    ALU_SLTU  = 4'd4,
    ALU_XOR   = 4'd5,
    ALU_SRL   = 4'd6,
    ALU_SRA   = 4'd7,
    ALU_OR    = 4'd8,
    ALU_AND   = 4'd9,
    ALU_PASSA = 4'd10,
    ALU_PASSB = 4'd11
  } alu_op_e;

  // Operation class chosen by the control unit from the opcode; the ALU
  // control refines it with funct3/funct7.
  typedef enum logic [2:0] {
    ALUC_ADD    = 3'd0,  // address arithmetic: loads, stores, AUIPC
    ALUC_BRANCH = 3'd1,  // comparison for a conditional branch
    ALUC_REG    = 3'd2,  // R-type
    ALUC_IMM    = 3'd3,  // I-type arithmetic
    ALUC_PASSA  = 3'd4,  // link value (PC+4) for JAL/JALR
    ALUC_PASSB  = 3'd5   // LUI
  } alu_class_e;

  typedef enum logic [2:0] {
    IMM_I = 3'd0,
    IMM_S = 3'd1,
    IMM_B = 3'd2,
    IMM_U = 3'd3,
    IMM_J = 3'd4
  } imm_sel_e;

  typedef enum logic [1:0] {
    OPA_RS1 = 2'd0,
    OPA_PC  = 2'd1,
    OPA_PC4 = 2'd2
  } opa_sel_e;

  typedef enum logic {
    OPB_RS2 = 1'b0,
    OPB_IMM = 1'b1
  } opb_sel_e;

  typedef enum logic {
    WB_ALU = 1'b0,
    WB_MEM = 1'b1
  } wb_sel_e;

  // Operand source chosen by the forwarding unit
  typedef enum logic [1:0] {
    FWD_REG = 2'd0,  // value read in decode (register file)
    FWD_EX  = 2'd1,  // ALU result held in EX/MEM ("from ex")
    FWD_WB  = 2'd2   // write-back value of MEM/WB ("from wb")
  } fwd_sel_e;

  // Control signals produced by the control unit
  typedef struct packed {
    logic       reg_write;
    logic       mem_read;
    logic       mem_write;
    logic       branch;
    logic       jal;
    logic       jalr;
    logic       uses_rs1;
    logic       uses_rs2;
    alu_class_e alu_class;
    opa_sel_e   opa_sel;
    opb_sel_e   opb_sel;
    imm_sel_e   imm_sel;
    wb_sel_e    wb_sel;
  } ctrl_t;

  localparam logic [31:0] NOP = 32'h0000_0013;  // addi x0, x0, 0

endpackage
