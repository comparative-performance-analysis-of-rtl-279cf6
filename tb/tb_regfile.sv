// tb_regfile: random writes and reads against a shadow array; checks x0
// stays zero, reads are asynchronous and reset clears every register.
module tb_regfile;
  logic clk = 0, rst, we;
  logic [4:0] ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;

  regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1; we = 0; ra1 = 0; ra2 = 0; wa = 0; wd = 0;
    @(posedge clk); #1 rst = 0;
    for (int r = 0; r < 32; r++) begin
      ra1 = 5'(r); #1; checks++;
      if (rd1 !== 0) failures++;
      shadow[r] = 0;
    end
    for (int i = 0; i < 2000; i++) begin
      we = ($urandom % 3) != 0; wa = 5'($urandom); wd = $urandom;
      ra1 = 5'($urandom); ra2 = 5'($urandom);
      #1; checks++;
      if (rd1 !== shadow[ra1] || rd2 !== shadow[ra2]) begin
        failures++;
        if (failures < 10) $display("read %0d/%0d got %h/%h exp %h/%h", ra1, ra2, rd1, rd2, shadow[ra1], shadow[ra2]);
      end
      @(posedge clk); #1;
      if (we && wa != 0) shadow[wa] = wd;
    end
    we = 0; rst = 1; @(posedge clk); #1 rst = 0;
    for (int r = 0; r < 32; r++) begin
      ra2 = 5'(r); #1; checks++;
      if (rd2 !== 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
