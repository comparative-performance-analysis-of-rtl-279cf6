// tb_rv32_single_top: the single-cycle processor at full size runs the
// sum of 1..10 and 10 factorial; final_result must show 0x37 and
// 0x375F00 (the LEDs the low half), and each run must take exactly as many cycles as the
// reference simulator counts instructions.
module tb_rv32_single_top;
  import rv_tb_pkg::*;

  logic clk = 0, reset;
  logic [31:0] final_result;
  logic [15:0] leds;
  int checks = 0, failures = 0;

  rv32_single_top dut (.clk(clk), .reset(reset), .final_result(final_result), .leds(leds));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic run(input string name, input prog_t p, input logic [31:0] expect_result);
    iss_result_t ref_r;
    int done_cycle;
    ref_r = iss_run(p, 200000, 16384);
    reset = 1;
    for (int i = 0; i < 256; i++) dut.u_imem.mem[i] = (i < p.size()) ? p[i] : 32'h0;
    for (int i = 0; i < 16384; i++) dut.u_dmem.data_ram[i] = 0;
    @(posedge clk); @(posedge clk); #1 reset = 0;
    done_cycle = -1;
    for (int c = 1; c <= int'(ref_r.count) + 4; c++) begin
      if (done_cycle < 0 && dut.u_core.imem_inst == HALT) done_cycle = c;
      @(posedge clk); #1;
    end
    check(final_result == expect_result, $sformatf("%s: result %h, expected %h", name, final_result, expect_result));
    check(leds == expect_result[15:0], $sformatf("%s: LEDs %h", name, leds));
    check(final_result == ref_r.mem[0], $sformatf("%s: result differs from reference", name));
    check(done_cycle == int'(ref_r.count), $sformatf("%s: %0d cycles, expected %0d", name, done_cycle, ref_r.count));
    $display("%s: final_result = %h after %0d cycles", name, final_result, done_cycle);
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    reset = 1;
    run("sum 1..10", prog_sum(10), 32'h37);
    run("10!", prog_fact(10), 32'h375F00);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
