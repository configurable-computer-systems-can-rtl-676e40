// fu_mul: the multiplier pipeline's functional unit (MUL).
//
// An 8 x 8 unsigned multiplier: only the low eight bits of OPD1 and OPD2 are
// used and the 16-bit product is the result, as on the FPGA, where an 18 x 18
// hard multiplier has its upper inputs tied to zero. The result is held in a
// register (RESULT MUL) as a token {IAD, RESULT}.
// Timing: a token one clock after the instruction is taken; while stall is
// high the register holds and in_instr is not taken. The operand widths follow
// the document; the register and stall rule are this design's choices.
module fu_mul
  import d2_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  fu_instr_t in_instr,
  input  logic      stall,
  output vtoken_t   tok
);
  data_t prod;

  always_comb prod = data_t'(in_instr.opd1[7:0]) * data_t'(in_instr.opd2[7:0]);

  always_ff @(posedge clk) begin
    if (rst) tok <= '0;
    else if (!stall) begin
      tok.v   <= in_instr.v;
      tok.iad <= in_instr.iad;
      tok.res <= prod;
    end
  end
endmodule
