// rv32_compare_top: both RV32I processors side by side.
//
// The single-cycle processor (rv32_single_top) and the five-stage
// pipelined processor (rv32_pipe_top) run the same RV32I programs and are
// compared on clock rate, area and run time.  They share nothing, so each
// keeps its own clock, reset and result ports here: s_* for the
// single-cycle design, p_* for the pipelined one.  Each has its own 64 KB
// instruction and data memories, loaded from S_INIT_FILE / P_INIT_FILE.
//
// Placing the two designs side by side is this design's own; they are
// otherwise unchanged.
module rv32_compare_top #(
  parameter int unsigned MEM_SIZE    = 16384,
  parameter string       S_INIT_FILE = "",
  parameter string       P_INIT_FILE = ""
) (
  input  logic        s_clk,
  input  logic        s_reset,
  output logic [31:0] s_final_result,
  output logic [15:0] s_leds,
  input  logic        p_clk,
  input  logic        p_rst_btn,
  output logic [15:0] p_leds
);

  rv32_single_top #(.MEM_SIZE(MEM_SIZE), .INIT_FILE(S_INIT_FILE)) u_single (
    .clk(s_clk), .reset(s_reset), .final_result(s_final_result), .leds(s_leds)
  );

  rv32_pipe_top #(.MEM_SIZE(MEM_SIZE), .INIT_FILE(P_INIT_FILE)) u_pipe (
    .clk(p_clk), .rst_btn(p_rst_btn), .leds(p_leds)
  );

endmodule
