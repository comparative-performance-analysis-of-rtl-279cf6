// tb_instr_mem: loads a program image from a hex file, checks each word
// reads back in the same cycle (asynchronous read), that addresses wrap
// modulo the size and that the low address bits are ignored.
module tb_instr_mem;
  import rv_tb_pkg::*;
  localparam int unsigned SIZE = 256;
  logic [31:0] addr, inst;
  prog_t p;
  int checks = 0, failures = 0;

  instr_mem #(.MEM_SIZE(SIZE), .INIT_FILE("tb/prog_sum10.hex")) dut (.addr(addr), .inst(inst));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    p = prog_sum(10);
    #1;
    for (int i = 0; i < SIZE; i++) begin
      addr = 32'(4 * i) + 32'($urandom % 4) + (($urandom % 2) ? 32'(4 * SIZE) : 32'd0);
      #1; checks++;
      if (inst !== ((i < p.size()) ? p[i] : 32'h0)) begin
        failures++;
        $display("word %0d: got %h", i, inst);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
