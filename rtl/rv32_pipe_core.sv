// rv32_pipe_core: five-stage pipelined RV32I core.
//
// Stages IF, ID, EX, MEM, WB are separated by the IF/ID, ID/EX, EX/MEM and
// MEM/WB registers; one instruction enters per cycle, so a stall-free run
// of n instructions takes n + 4 cycles.  The instruction and data
// memories are outside (imem, dmem) and both read synchronously, as block
// RAM does:
//   * IF presents the PC to imem; the word latched by imem is the
//     instruction half of IF/ID.  imem_en is low during a stall.
//   * ID decodes (control_unit, imm_gen), reads the register file and
//     bypasses the write-back value into both operands ("forward sel 1").
//     The branch unit decides conditional branches here, and JAL/JALR
//     targets are formed here, so a taken branch or jump squashes only the
//     one instruction fetched behind it.
//   * EX picks operand A from rs1 / PC / PC+4 and operand B from rs2 /
//     immediate, with rs1 and rs2 bypassed from EX/MEM ("from ex") or
//     MEM/WB ("from wb") by the forwarding unit; the ALU control and ALU
//     produce the result.
//   * MEM drives dmem with the ALU result as address; mem_align places
//     store bytes and builds the byte enables.
//   * WB selects the ALU result or the load word (arriving from dmem this
//     cycle, extended by mem_align) and writes the register file.
// The hazard unit stalls one cycle for a load-use dependence and up to two
// cycles when a branch or JALR in decode needs a result not yet written
// back.  retire pulses once per instruction leaving WB.  rst is
// synchronous and active high; execution starts at address RESET_PC.
//
// Stage split, decode-stage branching and the forwarding paths follow the
// reference pipeline diagram; block-RAM memories follow its report; the
// stall rules and squash mechanism are this design's own.
module rv32_pipe_core
  import rv32_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  // instruction memory
  output logic        imem_en,
  output logic [31:0] imem_addr,
  input  logic [31:0] imem_rdata,
  // data memory
  output logic        dmem_en,
  output logic [3:0]  dmem_we,
  output logic [31:0] dmem_addr,
  output logic [31:0] dmem_wdata,
  input  logic [31:0] dmem_rdata,
  // status
  output logic        retire,
  output logic        stall,
  output logic        flush
);

  // ---------------------------------------------------------------- types
  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
  } if_id_t;

  typedef struct packed {
    logic        valid;
    ctrl_t       ctrl;
    logic [31:0] pc;
    logic [31:0] pc4;
    logic [31:0] rs1_val;
    logic [31:0] rs2_val;
    logic [31:0] imm;
    logic [4:0]  rs1;
    logic [4:0]  rs2;
    logic [4:0]  rd;
    logic [2:0]  funct3;
    logic        funct7_b5;
  } id_ex_t;

  typedef struct packed {
    logic        valid;
    logic        reg_write;
    logic        mem_read;
    logic        mem_write;
    wb_sel_e     wb_sel;
    logic [31:0] alu_out;
    logic [31:0] rs2_val;
    logic [4:0]  rd;
    logic [2:0]  funct3;
  } ex_mem_t;

  typedef struct packed {
    logic        valid;
    logic        reg_write;
    wb_sel_e     wb_sel;
    logic [31:0] alu_out;
    logic [4:0]  rd;
    logic [2:0]  funct3;
  } mem_wb_t;

  if_id_t  if_id;
  id_ex_t  id_ex;
  ex_mem_t ex_mem;
  mem_wb_t mem_wb;

  // ------------------------------------------------------------------- IF
  logic [31:0] pc, pc_next, redirect_pc;
  logic        redirect;

  assign imem_en   = !stall;
  assign imem_addr = pc;
  assign pc_next   = flush ? redirect_pc : pc + 32'd4;

  always_ff @(posedge clk) begin
    if (rst) begin
      pc    <= RESET_PC;
      if_id <= '0;
    end else if (!stall) begin
      pc       <= pc_next;
      if_id.pc <= pc;
      if_id.valid <= !flush;
    end
  end

  // ------------------------------------------------------------------- ID
  logic [31:0] id_inst, id_imm, rf_rd1, rf_rd2, id_rs1_val, id_rs2_val;
  logic [31:0] wb_data;
  ctrl_t       id_ctrl;
  logic [4:0]  id_rs1, id_rs2, id_rd;
  logic        fwd_id_a, fwd_id_b, br_taken;

  assign id_inst = if_id.valid ? imem_rdata : NOP;
  assign id_rs1  = id_inst[19:15];
  assign id_rs2  = id_inst[24:20];
  assign id_rd   = id_inst[11:7];

  control_unit u_ctrl (.opcode(id_inst[6:0]), .ctrl(id_ctrl));
  imm_gen      u_imm  (.inst(id_inst), .imm_sel(id_ctrl.imm_sel), .imm(id_imm));

  regfile u_rf (
    .clk(clk), .rst(rst),
    .ra1(id_rs1), .ra2(id_rs2), .rd1(rf_rd1), .rd2(rf_rd2),
    .we(mem_wb.valid && mem_wb.reg_write), .wa(mem_wb.rd), .wd(wb_data)
  );

  assign id_rs1_val = fwd_id_a ? wb_data : rf_rd1;
  assign id_rs2_val = fwd_id_b ? wb_data : rf_rd2;

  branch_unit u_br (
    .branch(id_ctrl.branch), .funct3(id_inst[14:12]),
    .op1(id_rs1_val), .op2(id_rs2_val), .taken(br_taken)
  );

  assign redirect = br_taken || id_ctrl.jal || id_ctrl.jalr;
  assign redirect_pc = id_ctrl.jalr ? ((id_rs1_val + id_imm) & ~32'd1)
                                    : (if_id.pc + id_imm);

  hazard_unit u_hz (
    .id_uses_rs1(id_ctrl.uses_rs1), .id_uses_rs2(id_ctrl.uses_rs2),
    .id_rs1(id_rs1), .id_rs2(id_rs2),
    .id_needs_early(id_ctrl.branch || id_ctrl.jalr),
    .id_redirect(redirect),
    .ex_reg_write(id_ex.valid && id_ex.ctrl.reg_write),
    .ex_mem_read(id_ex.ctrl.mem_read), .ex_rd(id_ex.rd),
    .mem_reg_write(ex_mem.valid && ex_mem.reg_write), .mem_rd(ex_mem.rd),
    .stall(stall), .flush(flush)
  );

  always_ff @(posedge clk) begin
    if (rst || stall) begin
      id_ex <= '0;
    end else begin
      id_ex.valid     <= if_id.valid;
      id_ex.ctrl      <= id_ctrl;
      id_ex.pc        <= if_id.pc;
      id_ex.pc4       <= if_id.pc + 32'd4;
      id_ex.rs1_val   <= id_rs1_val;
      id_ex.rs2_val   <= id_rs2_val;
      id_ex.imm       <= id_imm;
      id_ex.rs1       <= id_ctrl.uses_rs1 ? id_rs1 : 5'd0;
      id_ex.rs2       <= id_ctrl.uses_rs2 ? id_rs2 : 5'd0;
      id_ex.rd        <= id_ctrl.reg_write ? id_rd : 5'd0;
      id_ex.funct3    <= id_inst[14:12];
      id_ex.funct7_b5 <= id_inst[30];
    end
  end

  // ------------------------------------------------------------------- EX
  fwd_sel_e    fwd_a, fwd_b;
  logic [31:0] ex_rs1_val, ex_rs2_val, op_a, op_b, alu_y;
  alu_op_e     alu_op;
  logic        alu_zero;

  forwarding_unit u_fwd (
    .ex_rs1(id_ex.rs1), .ex_rs2(id_ex.rs2),
    .id_rs1(id_rs1), .id_rs2(id_rs2),
    .mem_reg_write(ex_mem.valid && ex_mem.reg_write), .mem_mem_read(ex_mem.mem_read),
    .mem_rd(ex_mem.rd),
    .wb_reg_write(mem_wb.valid && mem_wb.reg_write), .wb_rd(mem_wb.rd),
    .fwd_a(fwd_a), .fwd_b(fwd_b), .fwd_id_a(fwd_id_a), .fwd_id_b(fwd_id_b)
  );

  function automatic logic [31:0] fwd_mux(input fwd_sel_e sel, input logic [31:0] reg_val);
    unique case (sel)
      FWD_EX:  return ex_mem.alu_out;
      FWD_WB:  return wb_data;
      default: return reg_val;
    endcase
  endfunction

  assign ex_rs1_val = fwd_mux(fwd_a, id_ex.rs1_val);
  assign ex_rs2_val = fwd_mux(fwd_b, id_ex.rs2_val);

  always_comb begin
    unique case (id_ex.ctrl.opa_sel)
      OPA_PC:  op_a = id_ex.pc;
      OPA_PC4: op_a = id_ex.pc4;
      default: op_a = ex_rs1_val;
    endcase
  end
  assign op_b = (id_ex.ctrl.opb_sel == OPB_IMM) ? id_ex.imm : ex_rs2_val;

  alu_control u_aluc (
    .alu_class(id_ex.ctrl.alu_class), .funct3(id_ex.funct3),
    .funct7_b5(id_ex.funct7_b5), .alu_op(alu_op)
  );
  alu u_alu (.a(op_a), .b(op_b), .op(alu_op), .y(alu_y), .zero(alu_zero));

  always_ff @(posedge clk) begin
    if (rst) begin
      ex_mem <= '0;
    end else begin
      ex_mem.valid     <= id_ex.valid;
      ex_mem.reg_write <= id_ex.valid && id_ex.ctrl.reg_write;
      ex_mem.mem_read  <= id_ex.valid && id_ex.ctrl.mem_read;
      ex_mem.mem_write <= id_ex.valid && id_ex.ctrl.mem_write;
      ex_mem.wb_sel    <= id_ex.ctrl.wb_sel;
      ex_mem.alu_out   <= alu_y;
      ex_mem.rs2_val   <= ex_rs2_val;
      ex_mem.rd        <= id_ex.rd;
      ex_mem.funct3    <= id_ex.funct3;
    end
  end

  // ------------------------------------------------------------------ MEM
  logic [31:0] ld_data;

  mem_align u_align (
    .st_en(ex_mem.mem_write), .st_funct3(ex_mem.funct3), .st_addr(ex_mem.alu_out[1:0]),
    .st_data(ex_mem.rs2_val), .st_we(dmem_we), .st_wdata(dmem_wdata),
    .ld_funct3(mem_wb.funct3), .ld_addr(mem_wb.alu_out[1:0]),
    .ld_word(dmem_rdata), .ld_data(ld_data)
  );

  assign dmem_en   = ex_mem.mem_read || ex_mem.mem_write;
  assign dmem_addr = ex_mem.alu_out;

  always_ff @(posedge clk) begin
    if (rst) begin
      mem_wb <= '0;
    end else begin
      mem_wb.valid     <= ex_mem.valid;
      mem_wb.reg_write <= ex_mem.reg_write;
      mem_wb.wb_sel    <= ex_mem.wb_sel;
      mem_wb.alu_out   <= ex_mem.alu_out;
      mem_wb.rd        <= ex_mem.rd;
      mem_wb.funct3    <= ex_mem.funct3;
    end
  end

  // ------------------------------------------------------------------- WB
  assign wb_data = (mem_wb.wb_sel == WB_MEM) ? ld_data : mem_wb.alu_out;
  assign retire  = mem_wb.valid;

endmodule
