// tb_forwarding_unit: random producer/consumer register numbers; checks
// EX/MEM priority over MEM/WB, that loads in EX/MEM and x0 are never
// forwarded, and the decode-stage write-back bypass.
module tb_forwarding_unit;
  import rv32_pkg::*;
  logic [4:0] ex_rs1, ex_rs2, id_rs1, id_rs2, mem_rd, wb_rd;
  logic mem_reg_write, mem_mem_read, wb_reg_write, fwd_id_a, fwd_id_b;
  fwd_sel_e fwd_a, fwd_b;
  int checks = 0, failures = 0;

  forwarding_unit dut (.*);

  function automatic fwd_sel_e ref_sel(logic [4:0] rs);
    fwd_sel_e s;
    s = FWD_REG;
    if (wb_reg_write && wb_rd == rs && rs != 0) s = FWD_WB;
    if (mem_reg_write && !mem_mem_read && mem_rd == rs && rs != 0) s = FWD_EX;
    return s;
  endfunction

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      ex_rs1 = 5'($urandom % 4); ex_rs2 = 5'($urandom % 4);
      id_rs1 = 5'($urandom % 4); id_rs2 = 5'($urandom % 4);
      mem_rd = 5'($urandom % 4); wb_rd = 5'($urandom % 4);
      mem_reg_write = $urandom % 2; mem_mem_read = ($urandom % 4) == 0; wb_reg_write = $urandom % 2;
      #1;
      checks++;
      if (fwd_a !== ref_sel(ex_rs1) || fwd_b !== ref_sel(ex_rs2) ||
          fwd_id_a !== (wb_reg_write && wb_rd == id_rs1 && id_rs1 != 0) ||
          fwd_id_b !== (wb_reg_write && wb_rd == id_rs2 && id_rs2 != 0)) begin
        failures++;
        if (failures < 10) $display("mismatch at %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
