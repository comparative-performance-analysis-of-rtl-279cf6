// tb_data_mem: random byte, halfword and word stores and loads against a
// byte-array model, including sign/zero extension, the asynchronous read
// and the debug view of word 0.
module tb_data_mem;
  localparam int unsigned SIZE = 64;
  logic clk = 0, wr_en;
  logic [2:0] funct3;
  logic [31:0] addr, wr_data, rd_data, debug_data, exp;
  logic [7:0] model [4*SIZE];
  int checks = 0, failures = 0;

  data_mem #(.MEM_SIZE(SIZE)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [31:0] mword(int a);
    return {model[a + 3], model[a + 2], model[a + 1], model[a]};
  endfunction

  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 4 * SIZE; i++) model[i] = 0;
    wr_en = 0; funct3 = 3'b010; addr = 0; wr_data = 0;
    for (int i = 0; i < 3000; i++) begin
      int sz, a;
      logic [2:0] f3s [5] = '{3'b000, 3'b001, 3'b010, 3'b100, 3'b101};
      sz = int'($urandom % 3);
      a = int'($urandom % (4 * SIZE)) & ~((1 << sz) - 1);
      addr = 32'(a) + (($urandom % 2) ? 32'(4 * SIZE) : 32'd0);   // wraps
      wr_en = $urandom % 2;
      if (wr_en) begin
        funct3 = 3'(sz);
        wr_data = $urandom;
        @(posedge clk); #1;
        for (int k = 0; k < (1 << sz); k++) model[a + k] = wr_data[8*k +: 8];
        wr_en = 0;
      end else begin
        funct3 = f3s[$urandom % 5];
        a = a & ~((1 << int'(funct3[1:0])) - 1);   // aligned to the load size
        addr = 32'(a);
        #1;
        case (funct3)
          3'b000: exp = {{24{model[a][7]}}, model[a]};
          3'b001: exp = {{16{model[a+1][7]}}, model[a+1], model[a]};
          3'b100: exp = {24'b0, model[a]};
          3'b101: exp = {16'b0, model[a+1], model[a]};
          default: exp = mword(a);
        endcase
        checks++;
        if (rd_data !== exp) begin
          failures++;
          if (failures < 10) $display("load f3=%0d a=%0d got %h exp %h", funct3, a, rd_data, exp);
        end
      end
      checks++;
      if (debug_data !== mword(0)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
