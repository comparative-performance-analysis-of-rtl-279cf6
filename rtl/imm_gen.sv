// imm_gen: immediate generator.
//
// Combinational.  Reassembles and sign-extends the immediate of the I, S,
// B, U and J instruction formats from its scattered instruction bits, as
// the RV32I encoding places them.  B and J immediates come out with bit 0
// zero (halfword offsets); the U immediate fills bits 31:12.  The format
// is chosen by imm_sel, which the control unit derives from the opcode.
//
// Follows the reference datapath's immediate generator (I/S/B/U/J).
module imm_gen
  import rv32_pkg::*;
(
  input  logic [31:0] inst,
  input  imm_sel_e    imm_sel,
  output logic [31:0] imm
);

  always_comb begin
    unique case (imm_sel)
      IMM_I:   imm = {{20{inst[31]}}, inst[31:20]};
      IMM_S:   imm = {{20{inst[31]}}, inst[31:25], inst[11:7]};
      IMM_B:   imm = {{19{inst[31]}}, inst[31], inst[7], inst[30:25], inst[11:8], 1'b0};
      IMM_U:   imm = {inst[31:12], 12'b0};
      IMM_J:   imm = {{11{inst[31]}}, inst[31], inst[19:12], inst[20], inst[30:21], 1'b0};
      default: imm = '0;
    endcase
  end

endmodule
