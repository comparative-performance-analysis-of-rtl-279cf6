// tb_rv32_pipe_top: the pipelined processor at full size, driven through
// its board ports (push-button reset, 16 LEDs).  It runs the sum of 1..11
// and the factorials of 5 and 6; the LEDs must show 0x0042, 0x0078 and
// 0x02D0.  It also checks that the LEDs are cleared by the button and
// that the reset takes effect through the two-flop synchronizer.
module tb_rv32_pipe_top;
  import rv_tb_pkg::*;

  logic clk = 0, rst_btn;
  logic [15:0] leds;
  int checks = 0, failures = 0;

  rv32_pipe_top dut (.clk(clk), .rst_btn(rst_btn), .leds(leds));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic run(input string name, input prog_t p, input logic [15:0] expect_leds);
    iss_result_t ref_r;
    int retired, cyc;
    ref_r = iss_run(p, 200000, 16384);
    rst_btn = 1;
    for (int i = 0; i < 256; i++) dut.u_imem.mem[i] = (i < p.size()) ? p[i] : 32'h0;
    for (int i = 0; i < 16384; i++) dut.u_dmem.mem[i] = 0;
    repeat (4) @(posedge clk);
    #1;
    check(leds == 16'h0, $sformatf("%s: LEDs cleared by reset", name));
    rst_btn = 0;
    @(posedge clk); #1;
    check(dut.rst == 1'b1, "reset still held one cycle after the button is released");
    retired = 0; cyc = 0;
    while (retired < int'(ref_r.count) && cyc < 20000) begin
      @(posedge clk); #1;
      cyc++;
      if (dut.retire) retired++;
    end
    repeat (4) @(posedge clk);
    #1;
    check(leds == expect_leds, $sformatf("%s: LEDs %h, expected %h", name, leds, expect_leds));
    check(leds == ref_r.mem[0][15:0], $sformatf("%s: LEDs differ from reference", name));
    $display("%s: LEDs = %h, %0d instructions in %0d cycles", name, leds, ref_r.count, cyc);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst_btn = 1;
    run("sum 1..11", prog_sum(11), 16'h0042);
    run("5!", prog_fact(5), 16'h0078);
    run("6!", prog_fact(6), 16'h02D0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
