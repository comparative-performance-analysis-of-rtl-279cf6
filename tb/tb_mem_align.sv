// tb_mem_align: exhaustive over access size and byte offset with random
// data; checks byte enables, lane placement of store data and extension
// of load data.
module tb_mem_align;
  logic st_en;
  logic [2:0] st_funct3, ld_funct3;
  logic [1:0] st_addr, ld_addr;
  logic [31:0] st_data, st_wdata, ld_word, ld_data, exp_d;
  logic [3:0] st_we, exp_we;
  int checks = 0, failures = 0;

  mem_align dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int sz, off;
      logic [2:0] f3s [5] = '{3'b000, 3'b001, 3'b010, 3'b100, 3'b101};
      sz = i % 3;
      off = int'($urandom % 4) & ~((1 << sz) - 1);
      st_en = $urandom % 2; st_funct3 = 3'(sz); st_addr = 2'(off); st_data = $urandom;
      ld_funct3 = f3s[$urandom % 5]; ld_addr = 2'($urandom % 4);
      if (ld_funct3[0]) ld_addr[0] = 1'b0;
      if (ld_funct3 == 3'b010) ld_addr = 0;
      ld_word = $urandom;
      #1;
      exp_we = st_en ? 4'(((1 << (1 << sz)) - 1) << off) : 4'b0;
      checks++;
      if (st_we !== exp_we) begin failures++; $display("we %b exp %b", st_we, exp_we); end
      for (int b = 0; b < 4; b++)
        if (exp_we[b]) begin
          checks++;
          if (st_wdata[8*b +: 8] !== st_data[8*(b - off) +: 8]) failures++;
        end
      case (ld_funct3)
        3'b000: exp_d = 32'($signed(ld_word[8*ld_addr +: 8]));
        3'b001: exp_d = 32'($signed(ld_word[8*ld_addr +: 16]));
        3'b100: exp_d = 32'(ld_word[8*ld_addr +: 8]);
        3'b101: exp_d = 32'(ld_word[8*ld_addr +: 16]);
        default: exp_d = ld_word;
      endcase
      checks++;
      if (ld_data !== exp_d) begin
        failures++;
        if (failures < 10) $display("load f3=%0d off=%0d got %h exp %h", ld_funct3, ld_addr, ld_data, exp_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
