// tb_rv32_pipe_core: runs the pipelined core, with its block-RAM style
// memories, on the sum, factorial and mixed programs, comparing stored
// data and registers with the reference simulator and checking that it
// retires exactly the reference instruction count.  Short programs then
// pin down the timing: n independent instructions retire the n-th in
// cycle n + 4 (k + n - 1 with k = 5), a load-use pair costs one stall
// cycle, a branch on the result of the previous instruction costs two
// stall cycles plus one squashed fetch, and a jump costs one squashed
// fetch.  Stalls, flushes and each kind of bypass are counted, and each
// must occur.
module tb_rv32_pipe_core;
  import rv32_pkg::*;
  import rv_tb_pkg::*;
  localparam int unsigned MEM = 16384;

  logic clk = 0, rst;
  logic imem_en, dmem_en, retire, stall, flush;
  logic [31:0] imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata;
  logic [3:0] dmem_we;
  int checks = 0, failures = 0;
  int n_stall = 0, n_flush = 0, n_fwd_ex = 0, n_fwd_wb = 0, n_fwd_id = 0, n_load_use = 0;

  rv32_pipe_core dut (.*);
  imem #(.MEM_SIZE(MEM)) u_imem (.clk(clk), .en(imem_en), .addr(imem_addr), .rdata(imem_rdata));
  dmem #(.MEM_SIZE(MEM)) u_dmem (.clk(clk), .en(dmem_en), .we(dmem_we), .addr(dmem_addr),
                                 .wdata(dmem_wdata), .rdata(dmem_rdata));

  always #5 clk = ~clk;

  always @(posedge clk) if (!rst) begin
    if (stall) n_stall++;
    if (stall && dut.id_ex.valid && dut.id_ex.ctrl.mem_read) n_load_use++;
    if (flush) n_flush++;
    if (dut.id_ex.valid && (dut.fwd_a == FWD_EX || dut.fwd_b == FWD_EX)) n_fwd_ex++;
    if (dut.id_ex.valid && (dut.fwd_a == FWD_WB || dut.fwd_b == FWD_WB)) n_fwd_wb++;
    if (dut.if_id.valid && (dut.fwd_id_a || dut.fwd_id_b)) n_fwd_id++;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Loads p, runs until `upto` instructions retired; returns the cycle of
  // that retirement (cycle 1 = first cycle after reset).
  task automatic run(input string name, input prog_t p, input int upto, output int cyc);
    int retired;
    rst = 1;
    for (int i = 0; i < 512; i++) u_imem.mem[i] = (i < p.size()) ? p[i] : 32'h0;
    for (int i = 0; i < MEM; i++) u_dmem.mem[i] = 0;
    @(posedge clk); @(posedge clk); #1 rst = 0;
    retired = 0; cyc = -1;
    for (int c = 1; c < 20 * upto + 50; c++) begin
      if (retire) retired++;
      if (retired == upto) begin cyc = c; break; end
      @(posedge clk); #1;
    end
    repeat (6) @(posedge clk);
    #1;
  endtask

  task automatic run_ref(input string name, input prog_t p);
    iss_result_t ref_r;
    int cyc;
    ref_r = iss_run(p, 200000, MEM);
    run(name, p, int'(ref_r.count), cyc);
    check(cyc > 0, $sformatf("%s: retired %0d instructions", name, ref_r.count));
    foreach (ref_r.mem[w])
      check(u_dmem.mem[w] == ref_r.mem[w], $sformatf("%s: word %0d = %h, expected %h",
            name, w, u_dmem.mem[w], ref_r.mem[w]));
    for (int r = 0; r < 32; r++)
      check(dut.u_rf.regs[r] == ref_r.x[r], $sformatf("%s: x%0d = %h, expected %h",
            name, r, dut.u_rf.regs[r], ref_r.x[r]));
    $display("%s: %0d instructions in %0d cycles, word 0 = %h", name, ref_r.count, cyc, u_dmem.mem[0]);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    prog_t p;
    int cyc, s0, f0;
    rst = 1;
    run_ref("sum11", prog_sum(11));
    check(u_dmem.mem[0] == 32'h42, "sum of 1..11 is 0x42");
    run_ref("fact5", prog_fact(5));
    check(u_dmem.mem[0] == 32'h78, "5! is 0x78");
    run_ref("fact10", prog_fact(10));
    check(u_dmem.mem[0] == 32'h375F00, "10! is 0x375F00");
    run_ref("mix", prog_mix());

    // timing: straight line, n = 10
    s0 = n_stall; f0 = n_flush;
    run("line10", prog_line(10), 10, cyc);
    check(cyc == 10 + 5 - 1, $sformatf("10 independent instructions: %0d cycles, expected 14", cyc));
    // load-use: one stall
    p = {}; p.push_back(lw(1, 0, 0)); p.push_back(addi(2, 1, 1)); p.push_back(HALT);
    s0 = n_stall;
    run("load-use", p, 3, cyc);
    check(cyc == 3 + 4 + 1, $sformatf("load-use: %0d cycles, expected 8", cyc));
    check(n_stall - s0 >= 1, "load-use stalled");
    // branch on the previous result: two stalls and one squashed fetch
    p = {}; p.push_back(addi(1, 0, 1)); p.push_back(bne(1, 0, 8)); p.push_back(addi(3, 0, 3));
    p.push_back(HALT);
    run("branch", p, 3, cyc);
    check(cyc == 3 + 4 + 2 + 1, $sformatf("dependent taken branch: %0d cycles, expected 10", cyc));
    check(dut.u_rf.regs[3] == 0, "instruction behind a taken branch is squashed");
    // jump: one squashed fetch
    p = {}; p.push_back(jal(0, 8)); p.push_back(addi(3, 0, 3)); p.push_back(HALT);
    run("jump", p, 2, cyc);
    check(cyc == 2 + 4 + 1, $sformatf("jump: %0d cycles, expected 7", cyc));

    check(n_stall > 0, "stalls occurred");
    check(n_load_use > 0, "load-use stalls occurred");
    check(n_flush > 0, "flushes occurred");
    check(n_fwd_ex > 0, "EX/MEM bypass used");
    check(n_fwd_wb > 0, "MEM/WB bypass used");
    check(n_fwd_id > 0, "decode write-back bypass used");
    $display("stalls=%0d load-use=%0d flushes=%0d fwd_ex=%0d fwd_wb=%0d fwd_id=%0d",
             n_stall, n_load_use, n_flush, n_fwd_ex, n_fwd_wb, n_fwd_id);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
