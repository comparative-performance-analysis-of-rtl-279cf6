// tb_alu_control: checks the ALU operation chosen for every class,
// funct3 and funct7 bit 5 against the RV32I tables written out here.
module tb_alu_control;
  import rv32_pkg::*;
  alu_class_e cls;
  logic [2:0] f3;
  logic f7;
  alu_op_e op, exp_op;
  int checks = 0, failures = 0;

  alu_control dut (.alu_class(cls), .funct3(f3), .funct7_b5(f7), .alu_op(op));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    alu_op_e rtab [8] = '{ALU_ADD, ALU_SLL, ALU_SLT, ALU_SLTU, ALU_XOR, ALU_SRL, ALU_OR, ALU_AND};
    for (int c = 0; c < 6; c++)
      for (int f = 0; f < 8; f++)
        for (int s = 0; s < 2; s++) begin
          cls = alu_class_e'(c); f3 = 3'(f); f7 = 1'(s);
          #1;
          case (cls)
            ALUC_ADD:    exp_op = ALU_ADD;
            ALUC_PASSA:  exp_op = ALU_PASSA;
            ALUC_PASSB:  exp_op = ALU_PASSB;
            ALUC_BRANCH: exp_op = (f < 4) ? ALU_SUB : (f < 6) ? ALU_SLT : ALU_SLTU;
            ALUC_REG: begin
              exp_op = rtab[f];
              if (s == 1 && f == 0) exp_op = ALU_SUB;
              if (s == 1 && f == 5) exp_op = ALU_SRA;
            end
            default: begin
              exp_op = rtab[f];
              if (s == 1 && f == 5) exp_op = ALU_SRA;
            end
          endcase
          checks++;
          if (op !== exp_op) begin
            failures++;
            $display("cls=%s f3=%0d f7=%0d op=%s exp=%s", cls.name(), f, s, op.name(), exp_op.name());
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
