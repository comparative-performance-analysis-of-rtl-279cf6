// tb_rv32_single_core: runs the single-cycle core, with its memories,
// on the sum, factorial, mixed and straight-line programs.  Each result
// is compared with the reference instruction-set simulator: the data
// words the program stored, all 32 registers, and the cycle count (one
// instruction per cycle, so the halt instruction must be fetched in
// exactly the cycle the reference count predicts).
module tb_rv32_single_core;
  import rv_tb_pkg::*;
  localparam int unsigned MEM = 16384;

  logic clk = 0, rst;
  logic [31:0] imem_addr, imem_inst, dmem_addr, dmem_wr_data, dmem_rd_data;
  logic [2:0] dmem_funct3;
  logic dmem_wr_en, retire;
  logic [31:0] dbg;
  int checks = 0, failures = 0;

  rv32_single_core dut (.*);
  instr_mem #(.MEM_SIZE(MEM)) u_imem (.addr(imem_addr), .inst(imem_inst));
  data_mem  #(.MEM_SIZE(MEM)) u_dmem (.clk(clk), .wr_en(dmem_wr_en), .funct3(dmem_funct3),
    .addr(dmem_addr), .wr_data(dmem_wr_data), .rd_data(dmem_rd_data), .debug_data(dbg));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic run(input string name, input prog_t p);
    iss_result_t ref_r;
    int halt_cycle;
    ref_r = iss_run(p, 200000, MEM);
    rst = 1;
    for (int i = 0; i < 512; i++) u_imem.mem[i] = (i < p.size()) ? p[i] : 32'h0;
    for (int i = 0; i < MEM; i++) u_dmem.data_ram[i] = 0;
    @(posedge clk); @(posedge clk); #1 rst = 0;
    halt_cycle = -1;
    for (int c = 1; c <= int'(ref_r.count) + 5; c++) begin
      if (halt_cycle < 0 && imem_inst == HALT) halt_cycle = c;
      @(posedge clk); #1;
    end
    check(halt_cycle == int'(ref_r.count), $sformatf("%s: halt reached in cycle %0d, expected %0d",
          name, halt_cycle, ref_r.count));
    foreach (ref_r.mem[w])
      check(u_dmem.data_ram[w] == ref_r.mem[w], $sformatf("%s: word %0d = %h, expected %h",
            name, w, u_dmem.data_ram[w], ref_r.mem[w]));
    for (int r = 0; r < 32; r++)
      check(dut.u_rf.regs[r] == ref_r.x[r], $sformatf("%s: x%0d = %h, expected %h",
            name, r, dut.u_rf.regs[r], ref_r.x[r]));
    $display("%s: %0d instructions in %0d cycles, word 0 = %h", name, ref_r.count, halt_cycle, dbg);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1;
    run("sum10", prog_sum(10));
    check(dbg == 32'h37, "sum of 1..10 is 0x37");
    run("fact10", prog_fact(10));
    check(dbg == 32'h375F00, "10! is 0x375F00");
    run("mix", prog_mix());
    run("line10", prog_line(10));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
