// tb_control_unit: checks the decoded control bundle for each RV32I
// opcode, and that unknown opcodes have no side effects.
module tb_control_unit;
  import rv32_pkg::*;
  logic [6:0] opc;
  ctrl_t c;
  int checks = 0, failures = 0;

  control_unit dut (.opcode(opc), .ctrl(c));

  task automatic expect_ctrl(input logic [6:0] o, input logic rw, mr, mw, br, jl, jr, u1, u2,
                             input alu_class_e cl, input opa_sel_e oa, input opb_sel_e ob,
                             input imm_sel_e im, input wb_sel_e wb);
    opc = o; #1;
    checks++;
    if (c.reg_write !== rw || c.mem_read !== mr || c.mem_write !== mw || c.branch !== br ||
        c.jal !== jl || c.jalr !== jr || c.uses_rs1 !== u1 || c.uses_rs2 !== u2 ||
        c.alu_class !== cl || c.opa_sel !== oa || c.opb_sel !== ob ||
        (c.imm_sel !== im && o != 7'h33) || c.wb_sel !== wb) begin
      failures++;
      $display("opcode %b: got %p", o, c);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    //           opcode      rw mr mw br jl jr u1 u2 class        opa      opb      imm    wb
    expect_ctrl(7'b0110011, 1, 0, 0, 0, 0, 0, 1, 1, ALUC_REG,    OPA_RS1, OPB_RS2, IMM_I, WB_ALU);
    expect_ctrl(7'b0010011, 1, 0, 0, 0, 0, 0, 1, 0, ALUC_IMM,    OPA_RS1, OPB_IMM, IMM_I, WB_ALU);
    expect_ctrl(7'b0000011, 1, 1, 0, 0, 0, 0, 1, 0, ALUC_ADD,    OPA_RS1, OPB_IMM, IMM_I, WB_MEM);
    expect_ctrl(7'b0100011, 0, 0, 1, 0, 0, 0, 1, 1, ALUC_ADD,    OPA_RS1, OPB_IMM, IMM_S, WB_ALU);
    expect_ctrl(7'b1100011, 0, 0, 0, 1, 0, 0, 1, 1, ALUC_BRANCH, OPA_RS1, OPB_RS2, IMM_B, WB_ALU);
    expect_ctrl(7'b1101111, 1, 0, 0, 0, 1, 0, 0, 0, ALUC_PASSA,  OPA_PC4, OPB_IMM, IMM_J, WB_ALU);
    expect_ctrl(7'b1100111, 1, 0, 0, 0, 0, 1, 1, 0, ALUC_PASSA,  OPA_PC4, OPB_IMM, IMM_I, WB_ALU);
    expect_ctrl(7'b0110111, 1, 0, 0, 0, 0, 0, 0, 0, ALUC_PASSB,  OPA_RS1, OPB_IMM, IMM_U, WB_ALU);
    expect_ctrl(7'b0010111, 1, 0, 0, 0, 0, 0, 0, 0, ALUC_ADD,    OPA_PC,  OPB_IMM, IMM_U, WB_ALU);
    // everything else: no register, memory or PC effect
    for (int o = 0; o < 128; o++) begin
      if (o inside {7'h33, 7'h13, 7'h03, 7'h23, 7'h63, 7'h6f, 7'h67, 7'h37, 7'h17}) continue;
      opc = 7'(o); #1;
      checks++;
      if (c.reg_write || c.mem_read || c.mem_write || c.branch || c.jal || c.jalr) begin
        failures++;
        $display("opcode %b has side effects", opc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
