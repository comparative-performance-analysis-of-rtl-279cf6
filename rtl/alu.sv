// alu: 32-bit RV32I arithmetic and logic unit.
//
// Purely combinational.  Performs add, subtract, the three shifts, the
// signed and unsigned set-less-than compares and the bitwise operations
// of RV32I, plus two pass-through operations that let the link value
// (PC+4) and the LUI immediate reach the write-back path through the ALU.
// The Zero flag is set when the result is all zeros; the single-cycle
// processor decides its branches from it.  Shift amounts use the low five
// bits of operand B, as RV32I requires.
//
// The ALU and its Zero flag are part of the reference datapath; the
// pass-through operations are this design's own.
module alu
  import rv32_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  alu_op_e     op,
  output logic [31:0] y,
  output logic        zero
);

  always_comb begin
    unique case (op)
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = a - b;
      ALU_SLL:   y = a << b[4:0];
      ALU_SLT:   y = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU:  y = {31'b0, a < b};
      ALU_XOR:   y = a ^ b;
      ALU_SRL:   y = a >> b[4:0];
      ALU_SRA:   y = 32'($signed(a) >>> b[4:0]);
      ALU_OR:    y = a | b;
      ALU_AND:   y = a & b;
      ALU_PASSA: y = a;
      ALU_PASSB: y = b;
      default:   y = '0;
    endcase
  end

  assign zero = (y == '0);

endmodule
