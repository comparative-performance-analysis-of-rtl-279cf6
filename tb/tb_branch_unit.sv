// tb_branch_unit: random and equal operand pairs for all six branch
// conditions, with branch high and low.
module tb_branch_unit;
  logic branch, taken, exp_t;
  logic [2:0] funct3;
  logic [31:0] op1, op2;
  int checks = 0, failures = 0;

  branch_unit dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [2:0] f3s [6] = '{3'd0, 3'd1, 3'd4, 3'd5, 3'd6, 3'd7};
    for (int i = 0; i < 3000; i++) begin
      funct3 = f3s[i % 6];
      branch = (i % 7) != 0;
      op1 = $urandom; op2 = (i % 3 == 0) ? op1 : (i % 3 == 1) ? $urandom : ~op1;
      #1;
      case (funct3)
        3'd0: exp_t = op1 == op2;
        3'd1: exp_t = op1 != op2;
        3'd4: exp_t = (op1[31] != op2[31]) ? op1[31] : (op1 < op2);
        3'd5: exp_t = !((op1[31] != op2[31]) ? op1[31] : (op1 < op2));
        3'd6: exp_t = {1'b0, op1} < {1'b0, op2};
        default: exp_t = !({1'b0, op1} < {1'b0, op2});
      endcase
      exp_t = exp_t && branch;
      checks++;
      if (taken !== exp_t) begin
        failures++;
        if (failures < 10) $display("f3=%0d %h %h got %b", funct3, op1, op2, taken);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
