// tb_imem: checks the registered read (data one cycle after the address),
// that a low enable holds the output, and address wrap.
module tb_imem;
  localparam int unsigned SIZE = 128;
  logic clk = 0, en;
  logic [31:0] addr, rdata, exp_q;
  int checks = 0, failures = 0;

  imem #(.MEM_SIZE(SIZE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    en = 0; addr = 0;
    #1;
    for (int i = 0; i < SIZE; i++) dut.mem[i] = 32'hA500_0000 + 32'(i * 7);
    en = 1; addr = 0;
    @(posedge clk); #1;
    exp_q = 32'hA500_0000;
    for (int i = 0; i < 1000; i++) begin
      int w;
      w = int'($urandom % SIZE);
      en = ($urandom % 4) != 0;
      addr = 32'(4 * w) + (($urandom % 2) ? 32'(4 * SIZE) : 32'd0);
      checks++;
      if (rdata !== exp_q) begin
        failures++;
        if (failures < 10) $display("cycle %0d got %h exp %h", i, rdata, exp_q);
      end
      @(posedge clk); #1;
      if (en) exp_q = 32'hA500_0000 + 32'(w * 7);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
