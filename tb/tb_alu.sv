// tb_alu: random and corner-case check of every ALU operation and the
// Zero flag against results computed here.
module tb_alu;
  import rv32_pkg::*;
  logic [31:0] a, b, y, exp_y;
  alu_op_e op;
  logic zero;
  int checks = 0, failures = 0;

  alu dut (.a(a), .b(b), .op(op), .y(y), .zero(zero));

  function automatic logic [31:0] model(alu_op_e o, logic [31:0] x, logic [31:0] z);
    longint sx, sz;
    sx = longint'($signed(x)); sz = longint'($signed(z));
    case (o)
      ALU_ADD:   return 32'(x + z);
      ALU_SUB:   return 32'(x + ~z + 1);
      ALU_SLL:   return 32'(64'(x) << z[4:0]);
      ALU_SLT:   return (sx < sz) ? 32'd1 : 32'd0;
      ALU_SLTU:  return (64'(x) < 64'(z)) ? 32'd1 : 32'd0;
      ALU_XOR:   return x ^ z;
      ALU_SRL:   return x >> z[4:0];
      ALU_SRA:   return 32'(sx >>> z[4:0]);
      ALU_OR:    return x | z;
      ALU_AND:   return x & z;
      ALU_PASSA: return x;
      default:   return z;
    endcase
  endfunction

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      op = alu_op_e'(i % 12);
      case (i % 5)
        0: begin a = $urandom; b = $urandom; end
        1: begin a = 32'h8000_0000; b = $urandom % 40; end
        2: begin a = $urandom; b = a; end
        3: begin a = 32'hFFFF_FFFF; b = 32'h1; end
        default: begin a = $urandom % 8; b = $urandom % 8; end
      endcase
      #1;
      exp_y = model(op, a, b);
      checks++;
      if (y !== exp_y || zero !== (exp_y == 0)) begin
        failures++;
        if (failures < 10) $display("ALU op=%s a=%h b=%h y=%h exp=%h", op.name(), a, b, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
