// tb_rv32_compare_top: end-to-end run of both processors, full size.
//
// The same programs run on the single-cycle and the pipelined processor:
// the sum of 1..10 and 1..11, the factorials of 5, 6 and 10, a mixed
// program that uses every instruction class and every hazard case, and
// straight runs of 10 and 1000 independent instructions.  For each, both
// results must equal the reference simulator's, the single-cycle design
// must take one cycle per instruction (T = n * Ts) and the pipelined
// design n + 4 cycles on the straight runs (T = (k + n - 1) * Tp, k = 5).
// With clock periods of 19.58 ns and 6.31 ns, the straight runs give a
// speedup of about 2.2 (n = 10) and 3.09 (n = 1000).  The pipeline
// mechanisms (load-use stall, branch-operand stall, flush, the three
// bypass paths) and the single-cycle Zero-flag branch must each occur.
module tb_rv32_compare_top;
  import rv32_pkg::*;
  import rv_tb_pkg::*;

  logic clk = 0, s_reset, p_rst_btn;
  logic [31:0] s_final_result;
  logic [15:0] p_leds, s_leds;
  int checks = 0, failures = 0;
  int n_load_use = 0, n_br_stall = 0, n_flush = 0, n_fwd_ex = 0, n_fwd_wb = 0, n_fwd_id = 0;
  int n_s_taken = 0, n_s_not_taken = 0;

  rv32_compare_top dut (
    .s_clk(clk), .s_reset(s_reset), .s_final_result(s_final_result), .s_leds(s_leds),
    .p_clk(clk), .p_rst_btn(p_rst_btn), .p_leds(p_leds)
  );

  always #5 clk = ~clk;

  // mechanism counters
  always @(posedge clk) begin
    if (!dut.u_pipe.rst) begin
      if (dut.u_pipe.u_core.stall && dut.u_pipe.u_core.id_ex.ctrl.mem_read) n_load_use++;
      else if (dut.u_pipe.u_core.stall) n_br_stall++;
      if (dut.u_pipe.u_core.flush) n_flush++;
      if (dut.u_pipe.u_core.id_ex.valid &&
          (dut.u_pipe.u_core.fwd_a == FWD_EX || dut.u_pipe.u_core.fwd_b == FWD_EX)) n_fwd_ex++;
      if (dut.u_pipe.u_core.id_ex.valid &&
          (dut.u_pipe.u_core.fwd_a == FWD_WB || dut.u_pipe.u_core.fwd_b == FWD_WB)) n_fwd_wb++;
      if (dut.u_pipe.u_core.if_id.valid &&
          (dut.u_pipe.u_core.fwd_id_a || dut.u_pipe.u_core.fwd_id_b)) n_fwd_id++;
    end
    if (!s_reset && dut.u_single.u_core.ctrl.branch) begin
      if (dut.u_single.u_core.br_taken) n_s_taken++;
      else n_s_not_taken++;
    end
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Runs p on both processors; returns their cycle counts.
  task automatic run(input string name, input prog_t p, output int s_cyc, output int p_cyc);
    iss_result_t ref_r;
    int retired;
    ref_r = iss_run(p, 500000, 16384);
    s_reset = 1; p_rst_btn = 1;
    for (int i = 0; i < p.size() + 8; i++) begin
      dut.u_single.u_imem.mem[i] = (i < p.size()) ? p[i] : 32'h0;
      dut.u_pipe.u_imem.mem[i]   = (i < p.size()) ? p[i] : 32'h0;
    end
    for (int i = 0; i < 16384; i++) begin
      dut.u_single.u_dmem.data_ram[i] = 0;
      dut.u_pipe.u_dmem.mem[i] = 0;
    end
    repeat (3) @(posedge clk);
    #1 s_reset = 0; p_rst_btn = 0;
    @(posedge clk); #1;   // two-flop button synchronizer: the pipeline leaves reset one
                          // cycle after this, its cycle 1 is loop cycle 2
    // single-cycle: every cycle retires one instruction
    s_cyc = -1; p_cyc = -1; retired = 0;
    for (int c = 1; c < 20 * int'(ref_r.count) + 100; c++) begin
      if (s_cyc < 0 && dut.u_single.u_core.imem_inst == HALT) s_cyc = c + 1;
      if (dut.u_pipe.u_core.retire) retired++;
      if (p_cyc < 0 && retired == int'(ref_r.count)) p_cyc = c - 1;
      if (s_cyc > 0 && p_cyc > 0) break;
      @(posedge clk); #1;
    end
    repeat (6) @(posedge clk);
    #1;
    check(s_cyc == int'(ref_r.count), $sformatf("%s: single-cycle took %0d cycles for %0d instructions",
          name, s_cyc, ref_r.count));
    check(p_cyc > 0, $sformatf("%s: pipeline retired all instructions", name));
    check(s_final_result == ref_r.mem[0], $sformatf("%s: single-cycle result %h, expected %h",
          name, s_final_result, ref_r.mem[0]));
    check(s_leds == ref_r.mem[0][15:0], $sformatf("%s: single-cycle LEDs %h", name, s_leds));
    check(p_leds == ref_r.mem[0][15:0], $sformatf("%s: pipelined LEDs %h, expected %h",
          name, p_leds, ref_r.mem[0][15:0]));
    foreach (ref_r.mem[w]) begin
      check(dut.u_single.u_dmem.data_ram[w] == ref_r.mem[w], $sformatf("%s: single word %0d", name, w));
      check(dut.u_pipe.u_dmem.mem[w] == ref_r.mem[w], $sformatf("%s: pipelined word %0d", name, w));
    end
    $display("%-8s n=%0d  single: %0d cycles  pipelined: %0d cycles  result %h",
             name, ref_r.count, s_cyc, p_cyc, s_final_result);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int sc, pc;
    real speedup;
    s_reset = 1; p_rst_btn = 1;
    run("sum10", prog_sum(10), sc, pc);   check(s_final_result == 32'h37, "sum 1..10 = 0x37");
    run("sum11", prog_sum(11), sc, pc);   check(p_leds == 16'h42, "sum 1..11 = 0x42");
    run("fact5", prog_fact(5), sc, pc);   check(p_leds == 16'h78, "5! = 0x78");
    run("fact6", prog_fact(6), sc, pc);   check(p_leds == 16'h2D0, "6! = 0x2D0");
    run("fact10", prog_fact(10), sc, pc); check(s_final_result == 32'h375F00, "10! = 0x375F00");
    run("mix", prog_mix(), sc, pc);
    // straight runs; the halt is instruction n + 1
    run("line10", prog_line(10), sc, pc);
    check(pc == 11 + 4, $sformatf("n=11 straight run: %0d pipelined cycles, expected 15", pc));
    speedup = (10 * 19.58) / ((5 + 10 - 1) * 6.31);
    check(speedup > 2.15 && speedup < 2.25, $sformatf("speedup n=10 %f", speedup));
    $display("speedup n=10: %0.2f", speedup);
    run("line1000", prog_line(1000), sc, pc);
    check(pc == 1001 + 4, $sformatf("n=1001 straight run: %0d pipelined cycles, expected 1005", pc));
    check(sc == 1001, "single-cycle straight run: one instruction per cycle");
    speedup = (1000 * 19.58) / ((5 + 1000 - 1) * 6.31);
    check(speedup > 3.05 && speedup < 3.12, $sformatf("speedup n=1000 %f", speedup));
    $display("speedup n=1000: %0.2f", speedup);

    check(n_load_use > 0, "load-use stall happened");
    check(n_br_stall > 0, "branch-operand stall happened");
    check(n_flush > 0, "flush happened");
    check(n_fwd_ex > 0, "EX/MEM bypass happened");
    check(n_fwd_wb > 0, "MEM/WB bypass happened");
    check(n_fwd_id > 0, "decode bypass happened");
    check(n_s_taken > 0 && n_s_not_taken > 0, "single-cycle branches taken and not taken");
    $display("load-use=%0d branch-stall=%0d flush=%0d fwd_ex=%0d fwd_wb=%0d fwd_id=%0d s_taken=%0d s_not=%0d",
             n_load_use, n_br_stall, n_flush, n_fwd_ex, n_fwd_wb, n_fwd_id, n_s_taken, n_s_not_taken);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
