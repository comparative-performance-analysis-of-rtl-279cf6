// tb_hex_boot: boots both processors from a $readmemh program image
// (tb/prog_sum10.hex, the sum of 1..10) through the INIT_FILE parameters,
// the way a compiled program is loaded, and checks that both leave 0x37
// in data word 0 (single-cycle final_result and LEDs, pipelined LEDs).
module tb_hex_boot;
  logic clk = 0, rst;
  logic [31:0] s_final_result;
  logic [15:0] s_leds, p_leds;
  int checks = 0, failures = 0;

  rv32_compare_top #(.S_INIT_FILE("tb/prog_sum10.hex"), .P_INIT_FILE("tb/prog_sum10.hex")) dut (
    .s_clk(clk), .s_reset(rst), .s_final_result(s_final_result), .s_leds(s_leds),
    .p_clk(clk), .p_rst_btn(rst), .p_leds(p_leds)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1;
    repeat (4) @(posedge clk);
    #1 rst = 0;
    // 34 instructions: 34 cycles single-cycle, 73 cycles pipelined (with stalls)
    repeat (32) @(posedge clk);   // the store is instruction 33
    #1;
    checks++;
    if (s_final_result != 0) begin failures++; $display("single-cycle result stored too early"); end
    repeat (1) @(posedge clk);
    #1;
    checks++;
    if (s_final_result != 32'h37 || s_leds != 16'h37) begin
      failures++; $display("single-cycle result %h", s_final_result);
    end
    repeat (100) @(posedge clk);
    #1;
    checks++;
    if (p_leds != 16'h37) begin failures++; $display("pipelined LEDs %h", p_leds); end
    $display("single-cycle %h, pipelined LEDs %h", s_final_result, p_leds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
