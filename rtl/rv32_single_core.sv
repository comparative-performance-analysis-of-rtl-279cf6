// rv32_single_core: single-cycle RV32I core.
//
// Every instruction is fetched, decoded, executed, given its memory access
// and written back within one clock cycle; the PC and the register file
// (and the data memory, outside) are the only state that changes at the
// clock edge.  The instruction and data memories are outside and must
// read asynchronously (instr_mem, data_mem).
//   * The PC addresses the instruction memory; the next PC is PC+4, the
//     branch/JAL target PC+imm, or the JALR target (rs1+imm) with bit 0
//     cleared.
//   * The control unit decodes the opcode; the register file reads rs1
//     and rs2; the immediate generator extends the immediate.
//   * Operand muxes ahead of the ALU pick rs1 / PC / PC+4 and rs2 /
//     immediate.  For a conditional branch the ALU compares rs1 with rs2
//     (SUB for BEQ/BNE, SLT for BLT/BGE, SLTU for BLTU/BGEU) and its Zero
//     flag, with funct3, decides the branch.  A separate adder forms the
//     target address.
//   * The ALU result addresses data memory; loads and stores pass funct3
//     so data_mem handles the access size.
//   * Write-back takes the ALU result or the loaded value.
// retire is high on every cycle out of reset.  rst is synchronous and
// active high; execution starts at RESET_PC.
//
// The datapath blocks and the Zero-flag branch follow the reference
// single-cycle design; the separate branch-target adder is this design's
// own, as the ALU is busy comparing.
module rv32_single_core
  import rv32_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  // instruction memory
  output logic [31:0] imem_addr,
  input  logic [31:0] imem_inst,
  // data memory
  output logic        dmem_wr_en,
  output logic [2:0]  dmem_funct3,
  output logic [31:0] dmem_addr,
  output logic [31:0] dmem_wr_data,
  input  logic [31:0] dmem_rd_data,
  // status
  output logic        retire
);

  logic [31:0] pc, pc4, pc_next, imm, rs1_val, rs2_val, op_a, op_b, alu_y, wb_data;
  logic [31:0] br_target;
  logic [31:0] inst;
  ctrl_t       ctrl;
  alu_op_e     alu_op;
  logic        zero, cond, br_taken;

  assign inst      = imem_inst;
  assign imem_addr = pc;
  assign pc4       = pc + 32'd4;

  control_unit u_ctrl (.opcode(inst[6:0]), .ctrl(ctrl));
  imm_gen      u_imm  (.inst(inst), .imm_sel(ctrl.imm_sel), .imm(imm));

  regfile u_rf (
    .clk(clk), .rst(rst),
    .ra1(inst[19:15]), .ra2(inst[24:20]), .rd1(rs1_val), .rd2(rs2_val),
    .we(ctrl.reg_write && !rst), .wa(inst[11:7]), .wd(wb_data)
  );

  always_comb begin
    unique case (ctrl.opa_sel)
      OPA_PC:  op_a = pc;
      OPA_PC4: op_a = pc4;
      default: op_a = rs1_val;
    endcase
  end
  assign op_b = (ctrl.opb_sel == OPB_IMM) ? imm : rs2_val;

  alu_control u_aluc (
    .alu_class(ctrl.alu_class), .funct3(inst[14:12]), .funct7_b5(inst[30]), .alu_op(alu_op)
  );
  alu u_alu (.a(op_a), .b(op_b), .op(alu_op), .y(alu_y), .zero(zero));

  // BEQ/BGE/BGEU take the branch on Zero, BNE/BLT/BLTU on not-Zero
  assign cond      = inst[14] ? !zero : zero;
  assign br_taken  = ctrl.branch && (cond ^ inst[12]);
  assign br_target = pc + imm;

  always_comb begin
    if (ctrl.jalr)                  pc_next = (rs1_val + imm) & ~32'd1;
    else if (ctrl.jal || br_taken)  pc_next = br_target;
    else                            pc_next = pc4;
  end

  always_ff @(posedge clk) begin
    if (rst) pc <= RESET_PC;
    else     pc <= pc_next;
  end

  assign dmem_wr_en   = ctrl.mem_write && !rst;
  assign dmem_funct3  = inst[14:12];
  assign dmem_addr    = alu_y;
  assign dmem_wr_data = rs2_val;

  assign wb_data = (ctrl.wb_sel == WB_MEM) ? dmem_rd_data : alu_y;
  assign retire  = !rst;

endmodule
