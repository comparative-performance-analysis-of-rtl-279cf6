// mem_align: byte-lane steering between the pipelined core and dmem.
//
// Combinational, two independent halves.  Store side (memory stage):
// from the store's funct3 and address bits 1:0 it builds the four byte
// write enables and replicates the byte or halfword of st_data into every
// lane, so the enabled lane receives it.  Load side (write-back stage):
// from the load's funct3 and address bits 1:0, it picks the addressed
// byte or halfword out of the memory word and sign- or zero-extends it
// (LB, LH, LW, LBU, LHU).  Halfwords use address bit 1 only; accesses are
// assumed aligned.
//
// The reference design shows the byte enables but not their logic; this
// steering is this design's own.
module mem_align (
  // store side
  input  logic        st_en,
  input  logic [2:0]  st_funct3,
  input  logic [1:0]  st_addr,
  input  logic [31:0] st_data,
  output logic [3:0]  st_we,
  output logic [31:0] st_wdata,
  // load side
  input  logic [2:0]  ld_funct3,
  input  logic [1:0]  ld_addr,
  input  logic [31:0] ld_word,
  output logic [31:0] ld_data
);

  logic [7:0]  lbyte;
  logic [15:0] lhalf;

  always_comb begin
    st_we    = '0;
    st_wdata = st_data;
    unique case (st_funct3[1:0])
      2'b00: begin
        st_wdata = {4{st_data[7:0]}};
        st_we    = 4'b0001 << st_addr;
      end
      2'b01: begin
        st_wdata = {2{st_data[15:0]}};
        st_we    = st_addr[1] ? 4'b1100 : 4'b0011;
      end
      default: st_we = 4'b1111;
    endcase
    if (!st_en) st_we = '0;
  end

  assign lbyte = ld_word[8*ld_addr +: 8];
  assign lhalf = ld_word[16*ld_addr[1] +: 16];

  always_comb begin
    unique case (ld_funct3)
      3'b000:  ld_data = {{24{lbyte[7]}}, lbyte};
      3'b001:  ld_data = {{16{lhalf[15]}}, lhalf};
      3'b100:  ld_data = {24'b0, lbyte};
      3'b101:  ld_data = {16'b0, lhalf};
      default: ld_data = ld_word;
    endcase
  end

endmodule
