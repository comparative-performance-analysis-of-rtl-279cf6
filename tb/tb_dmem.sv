// tb_dmem: random byte-enable writes and registered reads against a
// word model; checks read-before-write and that en low does nothing.
module tb_dmem;
  localparam int unsigned SIZE = 64;
  logic clk = 0, en;
  logic [3:0] we;
  logic [31:0] addr, wdata, rdata, exp_q;
  logic [31:0] model [SIZE];
  int checks = 0, failures = 0;

  dmem #(.MEM_SIZE(SIZE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < SIZE; i++) model[i] = 0;
    en = 1; we = 0; addr = 0; wdata = 0;
    @(posedge clk); #1;
    exp_q = 0;
    for (int i = 0; i < 2000; i++) begin
      int w;
      logic did;
      w = int'($urandom % SIZE);
      en = ($urandom % 4) != 0;
      we = 4'($urandom);
      wdata = $urandom;
      addr = 32'(4 * w) + 32'($urandom % 4) + (($urandom % 2) ? 32'(4 * SIZE) : 32'd0);
      checks++;
      if (rdata !== exp_q) begin
        failures++;
        if (failures < 10) $display("cycle %0d got %h exp %h", i, rdata, exp_q);
      end
      did = en;
      @(posedge clk); #1;
      if (did) begin
        exp_q = model[w];
        for (int b = 0; b < 4; b++) if (we[b]) model[w][8*b +: 8] = wdata[8*b +: 8];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
