// tb_imm_gen: encodes random immediates into each instruction format and
// checks that the generator gives back the sign-extended value.
module tb_imm_gen;
  import rv32_pkg::*;
  import rv_tb_pkg::*;
  logic [31:0] inst, imm;
  imm_sel_e sel;
  int checks = 0, failures = 0;

  imm_gen dut (.inst(inst), .imm_sel(sel), .imm(imm));

  task automatic chk(input imm_sel_e s, input logic [31:0] ins, input logic [31:0] exp);
    sel = s; inst = ins; #1;
    checks++;
    if (imm !== exp) begin
      failures++;
      $display("%s inst=%h imm=%h exp=%h", s.name(), ins, imm, exp);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      int v12, v13, v21, u20;
      v12 = int'($urandom % 4096) - 2048;
      v13 = (int'($urandom % 4096) - 2048) * 2;
      v21 = (int'($urandom % 1048576) - 524288) * 2;
      u20 = int'($urandom % 1048576);
      chk(IMM_I, addi(5, 6, v12), 32'(v12));
      chk(IMM_S, sw(7, v12, 8), 32'(v12));
      chk(IMM_B, beq(1, 2, v13), 32'(v13));
      chk(IMM_J, jal(1, v21), 32'(v21));
      chk(IMM_U, lui(3, u20), 32'(u20) << 12);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
