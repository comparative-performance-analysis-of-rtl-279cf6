// tb_hazard_unit: random decode/execute/memory register overlaps; checks
// load-use and early-operand (branch/JALR) stalls and flush gating.
module tb_hazard_unit;
  logic id_uses_rs1, id_uses_rs2, id_needs_early, id_redirect;
  logic ex_reg_write, ex_mem_read, mem_reg_write, stall, flush, exp_s;
  logic [4:0] id_rs1, id_rs2, ex_rd, mem_rd;
  int checks = 0, failures = 0;

  hazard_unit dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      logic m1e, m2e, m1m, m2m;
      {id_uses_rs1, id_uses_rs2, id_needs_early, id_redirect} = 4'($urandom);
      {ex_reg_write, ex_mem_read, mem_reg_write} = 3'($urandom);
      id_rs1 = 5'($urandom % 4); id_rs2 = 5'($urandom % 4);
      ex_rd = 5'($urandom % 4); mem_rd = 5'($urandom % 4);
      #1;
      m1e = id_uses_rs1 && id_rs1 == ex_rd && ex_rd != 0;
      m2e = id_uses_rs2 && id_rs2 == ex_rd && ex_rd != 0;
      m1m = id_uses_rs1 && id_rs1 == mem_rd && mem_rd != 0;
      m2m = id_uses_rs2 && id_rs2 == mem_rd && mem_rd != 0;
      exp_s = (ex_reg_write && (m1e || m2e) && (ex_mem_read || id_needs_early)) ||
              (mem_reg_write && (m1m || m2m) && id_needs_early);
      checks++;
      if (stall !== exp_s || flush !== (id_redirect && !exp_s)) begin
        failures++;
        if (failures < 10) $display("mismatch at %0d: stall %b exp %b", i, stall, exp_s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
